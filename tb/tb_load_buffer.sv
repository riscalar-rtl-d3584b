// tb_load_buffer: random loads against a randomly changing reorder-buffer
// view. A model decides for each waiting load whether an older store (by
// distance from the ROB head) has an unknown or equal word address. Checks
// that only hazard-free loads issue, that out_valid is raised whenever one
// exists, the hazard_stall flag, in_ready at 4 entries, and flush.
module tb_load_buffer;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, hazard_stall;
  tag_t in_rob, out_rob, rob_head;
  logic [31:0] in_addr, out_addr;
  logic [2:0] in_op, out_op;
  logic rob_valid [ROB_DEPTH]; logic [3:0] rob_itype [ROB_DEPTH]; logic rob_ready [ROB_DEPTH]; logic [31:0] rob_dest [ROB_DEPTH];
  load_buffer #(.DEPTH(4)) dut (.*);
  typedef struct { tag_t rob; logic [31:0] addr; logic [2:0] op; } ld_t;
  ld_t m [$];
  int n_haz = 0, n_iss = 0, n_full = 0;
  function automatic bit blocked(input ld_t l);
    int age_l, age_e;
    age_l = (int'(l.rob) - int'(rob_head) + 8) % 8;
    for (int e = 0; e < 8; e++) begin
      age_e = (e - int'(rob_head) + 8) % 8;
      if (rob_valid[e] && (rob_itype[e] == 4'd4 || rob_itype[e] == 4'd5 || rob_itype[e] == 4'd6) && age_e < age_l &&
          (!rob_ready[e] || rob_dest[e][31:2] == l.addr[31:2]))
        return 1;
    end
    return 0;
  endfunction
  initial begin
    rst = 1; flush = 0; in_valid = 0; out_ready = 0; in_rob = 0; in_addr = 0; in_op = 0; rob_head = 0;
    foreach (rob_valid[e]) begin rob_valid[e] = 0; rob_itype[e] = 0; rob_ready[e] = 0; rob_dest[e] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      bit any_ok, any_haz;
      @(negedge clk);
      if (n % 4 == 0) begin
        rob_head = tag_t'($urandom);
        foreach (rob_valid[e]) begin
          rob_valid[e] = $urandom_range(0, 3) != 0;
          rob_itype[e] = $urandom_range(0, 1) ? 4'(IT_SW) : 4'(IT_REG);
          rob_ready[e] = $urandom_range(0, 2) != 0;
          rob_dest[e]  = {28'b0, 4'($urandom)} << 2;
        end
      end
      #1;
      any_ok = 0; any_haz = 0;
      foreach (m[i]) if (blocked(m[i])) any_haz = 1; else any_ok = 1;
      check(out_valid == any_ok, "out_valid matches model");
      check(hazard_stall == any_haz, "hazard_stall matches model");
      check(in_ready == (m.size() < 4), "in_ready");
      if (m.size() == 4) n_full++;
      if (any_haz) n_haz++;
      out_ready = $urandom_range(0, 1);
      in_valid = $urandom_range(0, 1);
      in_rob = tag_t'($urandom); in_addr = {28'b0, 4'($urandom)} << 2 | 32'($urandom_range(0, 3)); in_op = 3'($urandom);
      flush = (n % 700 == 699);
      #1;
      if (out_valid && out_ready) begin
        automatic int idx = -1;
        foreach (m[i]) if (m[i].rob == out_rob && m[i].addr == out_addr && m[i].op == out_op && idx < 0) idx = i;
        check(idx >= 0, "issued load is one that was written");
        if (idx >= 0) begin
          check(!blocked(m[idx]), $sformatf("load rob %0d issued past an older store", out_rob));
          m.delete(idx);
          n_iss++;
        end
      end
      if (in_valid && in_ready) m.push_back('{rob: in_rob, addr: in_addr, op: in_op});
      if (flush) m.delete();
    end
    check(n_haz > 100 && n_iss > 100 && n_full > 0, $sformatf("coverage haz=%0d iss=%0d full=%0d", n_haz, n_iss, n_full));
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
