// address_unit: effective-address adder between the load reservation station
// and the load buffer.
//
// addr = base + offset, where base is the rs1 value and offset the sign-extended
// immediate the load station holds in place of its second operand.
// Combinational (its latency is this design's choice).
module address_unit (
  input  logic [31:0] base,
  input  logic [31:0] offset,
  output logic [31:0] addr
);

  assign addr = base + offset;

endmodule
