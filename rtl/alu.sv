// alu: general-purpose integer unit for the RV32I register and immediate
// operations (add, sub, shifts, comparisons, logic).
//
// The operation code is {funct7[5], funct3} of the instruction (this design's
// encoding). The result is registered, so the unit has a latency of one clock
// cycle as in the source design. The result stays in the output register,
// requesting the common data bus with out_valid, until out_grant; meanwhile
// in_ready is low. The ROB entry number travels with the operation.
module alu
  import riscalar_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [3:0]  op,
  input  tag_t        in_rob,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  input  logic        out_grant,
  output tag_t        out_rob,
  output logic [31:0] out_value
);

  logic [31:0] res;

  always_comb begin
    unique case (op)
      ALU_ADD:  res = a + b;
      ALU_SUB:  res = a - b;
      ALU_SLL:  res = a << b[4:0];
      ALU_SLT:  res = {31'b0, $signed(a) < $signed(b)};
      ALU_SLTU: res = {31'b0, a < b};
      ALU_XOR:  res = a ^ b;
      ALU_SRL:  res = a >> b[4:0];
      ALU_SRA:  res = $unsigned($signed(a) >>> b[4:0]);
      ALU_OR:   res = a | b;
      ALU_AND:  res = a & b;
      default:  res = a + b;
    endcase
  end

  assign in_ready = !out_valid || out_grant;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      out_valid <= 1'b0;
      out_rob   <= '0;
      out_value <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      out_rob   <= in_rob;
      out_value <= res;
    end
  end

endmodule
