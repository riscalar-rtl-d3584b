// tb_branch_alu: every branch condition on random and boundary operands, and
// jalr target computation (bit 0 cleared), compared with expected values.
module tb_branch_alu;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic [3:0] op; logic [31:0] a, b, result;
  branch_alu dut (.*);
  logic [31:0] vals [6] = '{0, 1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 5};
  initial begin
    for (int n = 0; n < 2000; n++) begin
      bit t;
      logic [2:0] f3;
      f3 = 3'($urandom_range(0, 5)); if (f3 >= 2) f3 = f3 + 2;
      op = {1'b0, f3};
      a = (n % 2) ? $urandom : vals[n % 6]; b = (n % 3) ? vals[(n / 6) % 6] : $urandom;
      if (n % 11 == 0) b = a;
      case (f3)
        0: t = a == b; 1: t = a != b;
        4: t = $signed(a) < $signed(b); 5: t = $signed(a) >= $signed(b);
        6: t = a < b; default: t = a >= b;
      endcase
      #1 check(result == {31'b0, t}, $sformatf("f3=%0d a=%h b=%h", f3, a, b));
    end
    for (int n = 0; n < 200; n++) begin
      op = BR_JALR; a = $urandom; b = 32'($signed(12'($urandom)));
      #1 check(result == ((a + b) & ~32'd1), "jalr target");
    end
    finish();
  end
endmodule
