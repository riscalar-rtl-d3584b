// tb_alu: random operands for every ALU operation compared with expected
// results computed here; checks the one-cycle latency and that a result waits
// in the output register (in_ready low) until the bus grants it.
module tb_alu;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_grant;
  logic [3:0] op; tag_t in_rob, out_rob; logic [31:0] a, b, out_value;
  alu dut (.*);
  function automatic logic [31:0] ref_alu(input logic [3:0] o, input logic [31:0] x, input logic [31:0] y);
    case (o)
      4'b0000: return x + y;
      4'b1000: return x - y;
      4'b0001: return x << y[4:0];
      4'b0010: return ($signed(x) < $signed(y)) ? 1 : 0;
      4'b0011: return (x < y) ? 1 : 0;
      4'b0100: return x ^ y;
      4'b0101: return x >> y[4:0];
      4'b1101: return $unsigned($signed(x) >>> y[4:0]);
      4'b0110: return x | y;
      default: return x & y;
    endcase
  endfunction
  logic [3:0] ops [10] = '{0, 8, 1, 2, 3, 4, 5, 13, 6, 7};
  initial begin
    logic [31:0] exp; tag_t t;
    rst = 1; flush = 0; in_valid = 0; out_grant = 0; op = 0; in_rob = 0; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      op = ops[n % 10]; a = $urandom; b = (n % 3 == 0) ? 32'($urandom_range(0, 40)) : $urandom;
      if (n % 7 == 0) a = 32'h8000_0000;
      in_rob = tag_t'(n); in_valid = 1; out_grant = 0;
      exp = ref_alu(op, a, b); t = in_rob;
      check(in_ready, "ready when empty");
      @(negedge clk);
      in_valid = 0;
      check(out_valid && out_value == exp && out_rob == t, $sformatf("op %b a=%h b=%h got %h exp %h", op, a, b, out_value, exp));
      if (n % 5 == 0) begin   // bus busy for a cycle: result must be held
        #1 check(!in_ready, "in_ready low while result waits");
        @(negedge clk);
        check(out_valid && out_value == exp, "result held");
      end
      out_grant = 1;
      @(negedge clk);
      out_grant = 0;
      check(!out_valid, "result leaves after grant");
    end
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
