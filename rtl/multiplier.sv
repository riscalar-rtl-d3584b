// multiplier: six-stage pipelined multiplier for mul, mulh, mulhsu and mulhu.
//
// The operands are extended to 33 bits (signed or unsigned per operation) and
// multiplied in the first stage; five more register stages follow, matching the
// six-cycle latency of the source design's DSP multiplier. mul returns the low
// word, the other three the high word. When a finished result is waiting for
// the common data bus (out_valid without out_grant) the whole pipeline stalls
// and in_ready is low; this stall policy is this design's choice.
//
// Timing: an operation accepted in cycle t is on the output in cycle t+6 at the
// earliest. flush drops everything in flight.
module multiplier
  import riscalar_pkg::*;
#(
  parameter int unsigned STAGES = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [1:0]  op,
  input  tag_t        in_rob,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  input  logic        out_grant,
  output tag_t        out_rob,
  output logic [31:0] out_value
);

  logic        v   [STAGES];
  tag_t        rob [STAGES];
  logic [31:0] val [STAGES];

  logic signed [32:0] sa, sb;
  logic signed [65:0] prod;
  logic [31:0]        res;
  logic               advance;

  always_comb begin
    sa   = $signed({(op != 2'b11) && a[31], a});
    sb   = $signed({(op == 2'b01) && b[31], b});
    prod = sa * sb;
    res  = (op == 2'b00) ? prod[31:0] : prod[63:32];
  end

  assign advance   = !v[STAGES-1] || out_grant;
  assign in_ready  = advance;
  assign out_valid = v[STAGES-1];
  assign out_rob   = rob[STAGES-1];
  assign out_value = val[STAGES-1];

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      for (int s = 0; s < STAGES; s++) begin
        v[s]   <= 1'b0;
        rob[s] <= '0;
        val[s] <= '0;
      end
    end else if (advance) begin
      v[0]   <= in_valid;
      rob[0] <= in_rob;
      val[0] <= res;
      for (int s = 1; s < STAGES; s++) begin
        v[s]   <= v[s-1];
        rob[s] <= rob[s-1];
        val[s] <= val[s-1];
      end
    end
  end

endmodule
