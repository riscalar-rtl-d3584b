// tb_address_unit: effective address = base + offset for random and negative
// offsets.
module tb_address_unit;
  `include "tb_check.svh"
  logic [31:0] base, offset, addr;
  address_unit dut (.*);
  initial begin
    for (int n = 0; n < 500; n++) begin
      base = $urandom; offset = 32'($signed(12'($urandom)));
      #1 check(addr == base + offset, $sformatf("%h + %h = %h", base, offset, addr));
    end
    finish();
  end
endmodule
