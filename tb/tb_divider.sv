// tb_divider: div, divu, rem and remu on random, boundary, division-by-zero
// and signed-overflow operands, compared with the RISC-V defined results
// computed here; checks the fixed latency (result 33 cycles after issue), that
// the result is held until granted, and that flush abandons an operation.
module tb_divider;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_grant;
  logic [1:0] op; tag_t in_rob, out_rob; logic [31:0] a, b, out_value;
  divider dut (.*);
  function automatic logic [31:0] ref_div(input logic [1:0] o, input logic [31:0] x, input logic [31:0] y);
    case (o)
      0: return (y == 0) ? '1 : (x == 32'h8000_0000 && y == '1) ? x : $unsigned($signed(x) / $signed(y));
      1: return (y == 0) ? '1 : x / y;
      2: return (y == 0) ? x : (x == 32'h8000_0000 && y == '1) ? 0 : $unsigned($signed(x) % $signed(y));
      default: return (y == 0) ? x : x % y;
    endcase
  endfunction
  logic [31:0] sp [5] = '{0, 1, 32'hFFFF_FFFF, 32'h8000_0000, 7};
  initial begin
    int lat;
    rst = 1; flush = 0; in_valid = 0; out_grant = 0; op = 0; in_rob = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      logic [31:0] exp;
      @(negedge clk);
      op = 2'(n); a = (n % 4 == 1) ? sp[(n / 4) % 5] : $urandom; b = (n % 3 == 0) ? sp[(n / 3) % 5] : $urandom >> (n % 30);
      in_rob = tag_t'(n); in_valid = 1;
      exp = ref_div(op, a, b);
      check(in_ready, "idle divider ready");
      @(negedge clk);
      in_valid = 0;
      if (n == 50) begin
        flush = 1; @(negedge clk); flush = 0;
        check(in_ready && !out_valid, "flush returns to idle");
        continue;
      end
      lat = 1;
      while (!out_valid && lat < 100) begin @(negedge clk); lat++; end
      check(lat == 33, $sformatf("latency %0d", lat));
      check(out_value == exp && out_rob == tag_t'(n), $sformatf("op %0d %h / %h = %h exp %h", op, a, b, out_value, exp));
      @(negedge clk);
      check(out_valid && out_value == exp, "held until granted");
      out_grant = 1;
      @(negedge clk);
      out_grant = 0;
      check(!out_valid, "released after grant");
    end
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
