// muldiv_unit: the multiply/divide functional unit behind the single multiply
// reservation station.
//
// Operations with funct3[2] = 0 go to the six-stage multiplier, the others to
// the iterative divider. The station may issue only when the multiplier can
// accept and the divider is idle (this design's simplification, so that the
// station needs one ready signal). When both units hold a result, the
// multiplier's goes to the common data bus first.
module muldiv_unit
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

  logic        m_ready, m_valid, d_ready, d_valid;
  tag_t        m_rob, d_rob;
  logic [31:0] m_value, d_value;

  assign in_ready = m_ready && d_ready;

  multiplier u_mul (
    .clk, .rst, .flush,
    .in_valid (in_valid && in_ready && !op[2]),
    .in_ready (m_ready),
    .op       (op[1:0]),
    .in_rob, .a, .b,
    .out_valid(m_valid),
    .out_grant(out_grant && m_valid),
    .out_rob  (m_rob),
    .out_value(m_value)
  );

  divider u_div (
    .clk, .rst, .flush,
    .in_valid (in_valid && in_ready && op[2]),
    .in_ready (d_ready),
    .op       (op[1:0]),
    .in_rob, .a, .b,
    .out_valid(d_valid),
    .out_grant(out_grant && !m_valid),
    .out_rob  (d_rob),
    .out_value(d_value)
  );

  assign out_valid = m_valid || d_valid;
  assign out_rob   = m_valid ? m_rob : d_rob;
  assign out_value = m_valid ? m_value : d_value;

endmodule
