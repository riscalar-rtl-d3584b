// branch_alu: combinational branch unit.
//
// For a conditional branch (op = {0, funct3}) it compares the two register
// operands and reports taken on bit 0 of the result. For jalr (op = BR_JALR)
// it adds the register and the immediate and clears bit 0, giving the jump
// target. Zero latency, as in the source design: the result is requested on the
// common data bus in the same cycle the station issues the operation. Handling
// jalr here is this design's choice.
module branch_alu
  import riscalar_pkg::*;
(
  input  logic [3:0]  op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] result
);

  logic taken;

  always_comb begin
    unique case (op[2:0])
      3'b000:  taken = (a == b);
      3'b001:  taken = (a != b);
      3'b100:  taken = $signed(a) < $signed(b);
      3'b101:  taken = $signed(a) >= $signed(b);
      3'b110:  taken = a < b;
      3'b111:  taken = a >= b;
      default: taken = 1'b0;
    endcase
    result = (op == BR_JALR) ? ((a + b) & ~32'd1) : {31'b0, taken};
  end

endmodule
