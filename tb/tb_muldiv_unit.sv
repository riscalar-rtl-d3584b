// tb_muldiv_unit: a random mix of multiply and divide operations with a
// randomly granting bus. Each result is matched by its ROB entry number to a
// value computed here; checks that the unit refuses new work while the
// divider is busy and that no operation is lost or duplicated.
module tb_muldiv_unit;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  `include "rv_asm.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_grant;
  logic [3:0] op; tag_t in_rob, out_rob; logic [31:0] a, b, out_value;
  muldiv_unit dut (.*);
  logic [31:0] exp [8]; bit pend [8];
  int n_done = 0, n_blocked = 0;
  function automatic logic [31:0] ref_md(input logic [2:0] f3, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] r [32]; logic [4:0] rd [$]; logic [31:0] v [$]; logic [31:0] p [$];
    p = '{ADDI(1, 0, 0), ADDI(2, 0, 0)};
    // build x and y with lui/addi so the reference model computes the result
    p = '{{x[31:12] + 20'(x[11]), 5'd1, 7'b0110111}, ADDI(1, 1, int'($signed(x[11:0]))),
          {y[31:12] + 20'(y[11]), 5'd2, 7'b0110111}, ADDI(2, 2, int'($signed(y[11:0]))),
          r_type(7'd1, 2, 1, f3, 3, 7'b0110011)};
    iss_run(p, 10, r, rd, v);
    return r[3];
  endfunction
  initial begin
    rst = 1; flush = 0; in_valid = 0; out_grant = 0; op = 0; in_rob = 0; a = 0; b = 0;
    foreach (pend[i]) pend[i] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      out_grant = $urandom_range(0, 3) != 0;
      in_rob = tag_t'($urandom);
      in_valid = !pend[in_rob];
      op = {1'b0, 3'($urandom_range(0, 9) == 0 ? $urandom_range(4, 7) : $urandom_range(0, 3))};
      a = $urandom; b = $urandom >> $urandom_range(0, 31);
      #1;
      if (out_valid && out_grant) begin
        check(pend[out_rob] && out_value == exp[out_rob], $sformatf("rob %0d value %h exp %h", out_rob, out_value, exp[out_rob]));
        pend[out_rob] = 0;
        n_done++;
      end
      if (in_valid && !in_ready && dut.u_div.state != dut.u_div.D_IDLE) n_blocked++;
      if (in_valid && in_ready) begin
        exp[in_rob] = ref_md(op[2:0], a, b);
        pend[in_rob] = 1;
      end
    end
    @(negedge clk);
    in_valid = 0; out_grant = 1;
    #1 if (out_valid) begin
      check(pend[out_rob] && out_value == exp[out_rob], "drain");
      pend[out_rob] = 0;
    end
    repeat (200) begin
      @(negedge clk); #1;
      if (out_valid) begin
        check(pend[out_rob] && out_value == exp[out_rob], "drain");
        pend[out_rob] = 0;
      end
    end
    foreach (pend[i]) check(!pend[i], $sformatf("rob %0d never returned", i));
    check(n_blocked > 0, "divider never blocked issue");
    check(n_done > 500, $sformatf("only %0d results", n_done));
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
