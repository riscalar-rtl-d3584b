// divider: iterative divider for div, divu, rem and remu.
//
// Signed operations divide the magnitudes and fix the signs afterwards. The
// core is a restoring divider producing one quotient bit per cycle, so an
// operation takes 32 cycles plus one to load and one to present the result.
// Division by zero and signed overflow give the RISC-V defined results
// (quotient all ones / dividend; remainder dividend / zero). The document only
// names this unit; its structure and latency are this design's choice.
//
// Interface: in_valid/in_ready accept one operation while idle; the result is
// held on out_value with out_valid until out_grant. flush returns to idle.
module divider
  import riscalar_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [1:0]  op,      // funct3[1:0]: 00 div, 01 divu, 10 rem, 11 remu
  input  tag_t        in_rob,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        out_valid,
  input  logic        out_grant,
  output tag_t        out_rob,
  output logic [31:0] out_value
);

  typedef enum logic [1:0] {D_IDLE, D_RUN, D_DONE} state_e;
  state_e state;

  logic [31:0] quo, rem, divisor;
  logic [5:0]  cnt;
  logic        is_rem, neg_q, neg_r, by_zero;
  logic [31:0] dividend0;
  logic [32:0] trial;

  logic        sgn;
  logic [31:0] abs_a, abs_b;
  assign sgn   = !op[0];
  assign abs_a = (sgn && a[31]) ? -a : a;
  assign abs_b = (sgn && b[31]) ? -b : b;

  assign in_ready  = (state == D_IDLE);
  assign out_valid = (state == D_DONE);
  assign trial     = {rem, quo[31]} - {1'b0, divisor};

  always_comb begin
    if (by_zero)     out_value = is_rem ? dividend0 : 32'hFFFF_FFFF;
    else if (is_rem) out_value = neg_r ? -rem : rem;
    else             out_value = neg_q ? -quo : quo;
  end

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      state     <= D_IDLE;
      quo       <= '0;
      rem       <= '0;
      divisor   <= '0;
      cnt       <= '0;
      is_rem    <= 1'b0;
      neg_q     <= 1'b0;
      neg_r     <= 1'b0;
      by_zero   <= 1'b0;
      dividend0 <= '0;
      out_rob   <= '0;
    end else begin
      unique case (state)
        D_IDLE: if (in_valid) begin
          state     <= D_RUN;
          quo       <= abs_a;
          rem       <= '0;
          divisor   <= abs_b;
          cnt       <= 6'd32;
          is_rem    <= op[1];
          neg_q     <= sgn && (a[31] ^ b[31]);
          neg_r     <= sgn && a[31];
          by_zero   <= (b == '0);
          dividend0 <= a;
          out_rob   <= in_rob;
        end
        D_RUN: begin
          if (!trial[32]) begin
            rem <= trial[31:0];
            quo <= {quo[30:0], 1'b1};
          end else begin
            rem <= {rem[30:0], quo[31]};
            quo <= {quo[30:0], 1'b0};
          end
          cnt <= cnt - 1'b1;
          if (cnt == 6'd1) state <= D_DONE;
        end
        D_DONE: if (out_grant) state <= D_IDLE;
        default: state <= D_IDLE;
      endcase
    end
  end

endmodule
