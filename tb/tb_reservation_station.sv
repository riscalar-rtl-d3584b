// tb_reservation_station: random dispatches with missing operands, random CDB
// broadcasts and a randomly ready functional unit, compared with a model of
// the station rows. Checks that an operation issues only with both operands,
// with the values captured from the CDB (including one broadcast in the
// dispatch cycle, passed in ready by dispatch), that out_valid is exact, that
// in_ready falls when all 8 rows are busy, and that flush empties the station.
module tb_reservation_station;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_ri, in_rj, out_valid, out_ready;
  logic [3:0] in_op, out_op;
  tag_t in_rob, in_qi, in_qj, out_rob;
  logic [31:0] in_vi, in_vj, out_vi, out_vj;
  cdb_t cdb;
  reservation_station #(.DEPTH(8)) dut (.*);

  typedef struct { tag_t rob; logic [3:0] op; tag_t qi, qj; logic [31:0] vi, vj; bit ri, rj; } ent_t;
  ent_t m [$];
  int n_full = 0, n_issued = 0;

  function automatic bit tag_free(input tag_t t);
    foreach (m[i]) if (m[i].rob == t) return 0;
    return 1;
  endfunction

  initial begin
    rst = 1; flush = 0; in_valid = 0; out_ready = 0; cdb = '0;
    {in_op, in_rob, in_qi, in_qj, in_vi, in_vj, in_ri, in_rj} = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      bit any_rdy;
      @(negedge clk);
      any_rdy = 0;
      foreach (m[i]) if (m[i].ri && m[i].rj) any_rdy = 1;
      check(out_valid == any_rdy, $sformatf("out_valid=%0b model %0b", out_valid, any_rdy));
      check(in_ready == (m.size() < 8), "in_ready");
      if (m.size() == 8) n_full++;
      out_ready = $urandom_range(0, 2) == 0;
      cdb = '{valid: $urandom_range(0, 1), rob: tag_t'($urandom), value: $urandom, dest: $urandom};
      in_valid = (n % 500 < 250) ? 1'b1 : ($urandom_range(0, 3) == 0);
      in_rob = tag_t'($urandom);
      in_op = 4'($urandom); in_qi = tag_t'($urandom); in_qj = tag_t'($urandom);
      in_ri = $urandom_range(0, 2) == 0; in_rj = $urandom_range(0, 2) == 0;
      in_vi = $urandom; in_vj = $urandom;
      if (!tag_free(in_rob)) in_valid = 0;
      flush = (n % 1000 == 999);
      #1;
      if (out_valid && out_ready) begin
        automatic int idx = -1;
        foreach (m[i]) if (m[i].rob == out_rob) idx = i;
        check(idx >= 0, "issued an unknown entry");
        if (idx >= 0) begin
          check(m[idx].ri && m[idx].rj, "issued before operands were ready");
          check(out_vi == m[idx].vi && out_vj == m[idx].vj && out_op == m[idx].op,
                $sformatf("issued values rob %0d", out_rob));
          m.delete(idx);
          n_issued++;
        end
      end
      foreach (m[i]) if (cdb.valid) begin
        if (!m[i].ri && m[i].qi == cdb.rob) begin m[i].ri = 1; m[i].vi = cdb.value; end
        if (!m[i].rj && m[i].qj == cdb.rob) begin m[i].rj = 1; m[i].vj = cdb.value; end
      end
      if (in_valid && in_ready)
        m.push_back('{rob: in_rob, op: in_op, qi: in_qi, qj: in_qj, vi: in_ri ? in_vi : 0, vj: in_rj ? in_vj : 0,
                      ri: in_ri, rj: in_rj});
      if (flush) m.delete();
    end
    check(n_full > 0, "station reached 8 busy rows");
    check(n_issued > 500, $sformatf("only %0d issued", n_issued));
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
