// tb_reorder_buffer: random allocation of register, store, branch, jalr and
// no-op rows, with results returned on the CDB in random order. A model of
// the rows predicts each commit: register writes (rd, value), store address
// (offset from dispatch plus base from the CDB) and data, predictor updates,
// and the flush with redirect PC for a mispredicted branch or a jalr. Also
// checks in-order commit, alloc_ready at 8 rows and the exported row view.
module tb_reorder_buffer;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic alloc_valid, alloc_ready, alloc_done;
  tag_t alloc_tag, commit_tag, head;
  logic [3:0] alloc_itype; logic [31:0] alloc_dest, alloc_value;
  cdb_t cdb;
  logic commit_valid, commit_we, st_valid, bp_upd_valid, bp_upd_taken, flush;
  logic [4:0] commit_rd; logic [31:0] commit_data, st_addr, st_data, bp_upd_pc, redirect_pc;
  logic [1:0] st_size;
  logic v_valid [ROB_DEPTH]; logic [3:0] v_itype [ROB_DEPTH]; logic v_ready [ROB_DEPTH];
  logic [31:0] v_dest [ROB_DEPTH]; logic [31:0] v_value [ROB_DEPTH];
  reorder_buffer dut (.*);

  typedef struct { tag_t tag; logic [3:0] it; bit done; logic [31:0] dest, value, pc; bit pred, taken; logic [31:0] res; } e_t;
  e_t m [$];
  int n_flush = 0, n_full = 0, n_commit = 0, n_st = 0, n_bp = 0;

  initial begin
    rst = 1; alloc_valid = 0; alloc_itype = 0; alloc_dest = 0; alloc_value = 0; alloc_done = 0; cdb = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 5000; n++) begin
      automatic int k;
      @(negedge clk);
      #1;
      // commit side
      check(alloc_ready == (m.size() < 8), "alloc_ready");
      if (m.size() == 8) n_full++;
      check(commit_valid == (m.size() > 0 && m[0].done), "commit_valid");
      if (m.size() > 0) check(head == m[0].tag, "head pointer");
      foreach (m[i]) check(v_valid[m[i].tag] && v_itype[m[i].tag] == m[i].it, "row view");
      if (commit_valid && m.size() > 0) begin
        automatic e_t h = m[0];
        automatic bit exp_flush = 0;
        n_commit++;
        check(commit_tag == h.tag, "commit tag");
        case (h.it)
          IT_REG: check(commit_we && commit_rd == h.dest[4:0] && commit_data == h.res && !st_valid && !flush,
                        $sformatf("reg commit rd %0d=%h exp %0d=%h", commit_rd, commit_data, h.dest[4:0], h.res));
          IT_SW: begin
            check(st_valid && !commit_we && st_addr == h.dest && st_data == h.res && st_size == 2'b10, "store commit");
            n_st++;
          end
          IT_BRANCH: begin
            exp_flush = h.pred != h.taken;
            check(bp_upd_valid && bp_upd_pc == h.pc && bp_upd_taken == h.taken && !commit_we, "branch update");
            if (exp_flush) check(redirect_pc == h.value, "mispredict redirect to alternate PC");
            n_bp++;
          end
          IT_JALR: begin
            exp_flush = 1;
            check(commit_we && commit_rd == h.dest[4:0] && commit_data == {5'b0, h.dest[31:5]}, "jalr link");
            check(redirect_pc == h.res, "jalr redirect");
          end
          default: check(!commit_we && !st_valid && !bp_upd_valid, "nop commit");
        endcase
        check(flush == exp_flush, "flush");
        void'(m.pop_front());
        if (exp_flush) begin m.delete(); n_flush++; end
      end
      // CDB: complete one random pending row
      cdb = '0;
      if ($urandom_range(0, 1)) begin
        automatic int cand [$];
        foreach (m[i]) if (!m[i].done) cand.push_back(i);
        if (cand.size() > 0) begin
          automatic int i = cand[$urandom_range(0, cand.size() - 1)];
          cdb.valid = 1; cdb.rob = m[i].tag; cdb.value = $urandom; cdb.dest = $urandom;
          case (m[i].it)
            IT_BRANCH: begin cdb.value = {31'b0, 1'($urandom)}; m[i].taken = cdb.value[0]; end
            IT_SW: begin m[i].dest = m[i].dest + cdb.dest; m[i].res = cdb.value; end
            default: m[i].res = cdb.value;
          endcase
        end
      end
      // allocation
      k = $urandom_range(0, 9);
      alloc_valid = !flush && ($urandom_range(0, 2) != 0);
      alloc_done = 0;
      alloc_value = $urandom;
      case (k)
        0, 1, 2, 3: begin alloc_itype = IT_REG; alloc_dest = {27'b0, 5'($urandom)}; end
        4, 5: begin alloc_itype = IT_SW; alloc_dest = 32'($signed(12'($urandom))); end
        6, 7: begin
          alloc_itype = IT_BRANCH; alloc_dest = $urandom & ~32'd3;
          alloc_value = {30'($urandom), 1'b0, ($urandom_range(0, 3) != 0) ? 1'b0 : 1'b1};
        end
        8: begin alloc_itype = IT_JALR; alloc_dest = $urandom; end
        default: begin alloc_itype = IT_NOP; alloc_dest = 0; alloc_done = 1; end
      endcase
      #1;
      if (cdb.valid) foreach (m[i]) if (m[i].tag == cdb.rob) m[i].done = 1;
      if (alloc_valid && alloc_ready) begin
        automatic e_t e;
        e.tag = alloc_tag; e.it = alloc_itype; e.done = alloc_done; e.dest = alloc_dest; e.value = alloc_dest;
        e.pc = {alloc_value[31:2], 2'b00}; e.pred = alloc_value[0]; e.taken = 0; e.res = alloc_value;
        m.push_back(e);
      end
    end
    check(n_flush > 20 && n_full > 20 && n_st > 20 && n_bp > 20, $sformatf("coverage flush=%0d full=%0d st=%0d bp=%0d", n_flush, n_full, n_st, n_bp));
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
