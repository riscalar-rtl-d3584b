// tb_bram: checks the two-cycle, write-first block RAM against an array model:
// random byte-enabled writes and reads, the exact read latency (data appears
// in the second cycle after the request, not the first), and write-first
// read-back of a merged row.
module tb_bram;
  `include "tb_check.svh"
  logic clk = 0;
  always #5 clk = ~clk;
  logic en; logic [3:0] we; logic [10:0] addr; logic [31:0] din, dout;
  bram #(.DEPTH(2048), .WIDTH(32)) dut (.*);
  logic [31:0] model [2048];
  initial begin
    en = 0; we = 0; addr = 0; din = 0;
    for (int i = 0; i < 64; i++) begin   // initialise a region
      @(negedge clk); en = 1; we = 4'hF; addr = 11'(i); din = 32'(i) * 32'h01010101 ^ 32'hA5A5_0000;
      model[i] = din;
    end
    @(negedge clk); en = 0; we = 0;
    repeat (2) @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      logic [31:0] exp, prev;
      @(negedge clk);
      prev = dout;
      en = 1; addr = 11'($urandom_range(0, 63)); we = 4'($urandom_range(0, 1) ? $urandom_range(0, 15) : 0); din = $urandom;
      exp = model[addr];
      for (int b = 0; b < 4; b++) if (we[b]) exp[8*b +: 8] = din[8*b +: 8];
      model[addr] = exp;
      @(negedge clk); en = 0; we = 0;
      check(dout == prev || prev == exp, "data must not appear after one cycle");
      @(negedge clk);
      check(dout == exp, $sformatf("read %0d got %h exp %h", addr, dout, exp));
    end
    // latency: after a read request, dout must not change at the first edge
    @(negedge clk); en = 1; we = 0; addr = 5;
    @(negedge clk); en = 1; addr = 6;
    @(negedge clk); en = 0;
    check(dout == model[5], "read latency two cycles (first read)");
    @(negedge clk);
    check(dout == model[6], "pipelined back-to-back read");
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
