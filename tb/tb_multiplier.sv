// tb_multiplier: back-to-back issue of random mul/mulh/mulhsu/mulhu with
// results checked against 64-bit products computed here; checks the six-cycle
// latency, one result per cycle when the bus always grants, and in-order
// results with no loss when the bus withholds grants (pipeline stall).
module tb_multiplier;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_grant;
  logic [1:0] op; tag_t in_rob, out_rob; logic [31:0] a, b, out_value;
  multiplier #(.STAGES(6)) dut (.*);
  function automatic logic [31:0] ref_mul(input logic [1:0] o, input logic [31:0] x, input logic [31:0] y);
    logic [63:0] p;
    case (o)
      0, 1: p = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y});
      2:    p = $signed({{32{x[31]}}, x}) * $signed({32'b0, y});
      default: p = {32'b0, x} * {32'b0, y};
    endcase
    return (o == 0) ? p[31:0] : p[63:32];
  endfunction
  logic [31:0] exp_q [$];
  longint cyc = 0, t_first_in = -1, t_first_out = -1;
  always @(posedge clk) cyc++;
  task automatic take();
    if (out_valid && out_grant) begin
      if (t_first_out < 0) t_first_out = cyc;
      check(exp_q.size() > 0 && out_value == exp_q[0], $sformatf("result %h exp %h", out_value, exp_q.size() ? exp_q[0] : 0));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  endtask
  initial begin
    rst = 1; flush = 0; in_valid = 0; out_grant = 1; op = 0; in_rob = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      #2;
      out_grant = (n < 500) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_valid = 1; op = 2'($urandom); a = $urandom; b = $urandom;
      if (n % 9 == 0) a = 32'h8000_0000;
      if (n % 13 == 0) b = 32'hFFFF_FFFF;
      #1;
      take();
      if (in_valid && in_ready) exp_q.push_back(ref_mul(op, a, b));
      if (in_valid && in_ready && t_first_in < 0) t_first_in = cyc;
    end
    @(negedge clk);
    in_valid = 0; out_grant = 1;
    #3 take();
    repeat (20) begin @(negedge clk); #3 take(); end
    check(exp_q.size() == 0, $sformatf("%0d results lost", exp_q.size()));
    check(t_first_out - t_first_in == 6, $sformatf("latency %0d cycles, expected 6", t_first_out - t_first_in));
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
