// tb_cdb_arbiter: all request patterns; checks that exactly the
// lowest-numbered requester is granted, that its word is driven with valid
// set, and that the bus is idle with no request.
module tb_cdb_arbiter;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic [4:0] req, grant;
  cdb_t src [5];
  cdb_t cdb;
  cdb_arbiter #(.N(5)) dut (.*);
  initial begin
    for (int p = 0; p < 32; p++) begin
      int w;
      req = 5'(p);
      foreach (src[k]) src[k] = '{valid: 1'b0, rob: tag_t'(k), value: $urandom, dest: $urandom};
      #1;
      w = -1;
      for (int k = 4; k >= 0; k--) if (req[k]) w = k;
      if (w < 0) check(grant == 0 && !cdb.valid, "idle bus");
      else check(grant == (5'd1 << w) && cdb.valid && cdb.rob == src[w].rob && cdb.value == src[w].value &&
                 cdb.dest == src[w].dest, $sformatf("req %b grant %b", req, grant));
    end
    finish();
  end
endmodule
