// tb_register_file: checks combinational reads, writes at commit, the rename
// tags and busy flags (a younger rename survives an older commit), that x0 is
// never written, and that flush clears every busy flag. Random traffic is
// compared with a model.
module tb_register_file;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic [4:0] rs1, rs2, rename_rd, commit_rd, dbg_addr;
  logic [31:0] rd1, rd2, commit_data, dbg_data;
  logic busy1, busy2, rename_en, commit_en;
  tag_t tag1, tag2, rename_tag, commit_tag;
  register_file dut (.*);
  logic [31:0] m_val [32]; bit m_busy [32]; tag_t m_tag [32];
  initial begin
    rst = 1; flush = 0; rename_en = 0; commit_en = 0; rs1 = 0; rs2 = 0; dbg_addr = 0;
    rename_rd = 0; rename_tag = 0; commit_rd = 0; commit_tag = 0; commit_data = 0;
    foreach (m_val[i]) begin m_val[i] = 0; m_busy[i] = 0; m_tag[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      rs1 = 5'($urandom); rs2 = 5'($urandom); dbg_addr = 5'($urandom);
      #1;
      check(rd1 == m_val[rs1] && rd2 == m_val[rs2] && dbg_data == m_val[dbg_addr], "read values");
      check(busy1 == m_busy[rs1] && busy2 == m_busy[rs2], $sformatf("busy x%0d/x%0d", rs1, rs2));
      if (m_busy[rs1]) check(tag1 == m_tag[rs1], "tag1");
      if (m_busy[rs2]) check(tag2 == m_tag[rs2], "tag2");
      rename_en = $urandom_range(0, 1); rename_rd = 5'($urandom_range(0, 7)); rename_tag = tag_t'($urandom);
      commit_en = $urandom_range(0, 1); commit_rd = 5'($urandom_range(0, 7)); commit_data = $urandom;
      commit_tag = ($urandom_range(0, 1) && m_busy[commit_rd]) ? m_tag[commit_rd] : tag_t'($urandom);
      flush = ($urandom_range(0, 63) == 0);
      @(posedge clk);
      if (commit_en && commit_rd != 0) begin
        m_val[commit_rd] = commit_data;
        if (m_tag[commit_rd] == commit_tag) m_busy[commit_rd] = 0;
      end
      if (rename_en && rename_rd != 0) begin m_busy[rename_rd] = 1; m_tag[rename_rd] = rename_tag; end
      if (flush) foreach (m_busy[i]) m_busy[i] = 0;
      #1;
      rename_en = 0; commit_en = 0; flush = 0;
    end
    check(m_val[0] == 0, "x0 stays zero");
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
