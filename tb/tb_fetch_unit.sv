// tb_fetch_unit: the fetch unit reads from a two-cycle instruction memory
// model holding adds, conditional branches and jal; the predictor input is a
// fixed function of the PC. Every entry pushed into the instruction queue is
// compared with the path the prediction implies (PC, instruction, prediction,
// alternate PC), while the queue randomly refuses entries (forcing replays)
// and the commit stage randomly redirects fetch. Also checks one instruction
// per cycle on straight-line code and the two-cycle gap after a taken jump.
module tb_fetch_unit;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  `include "rv_asm.svh"
  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic imem_en, iq_ready, iq_valid, bp_taken, redirect_valid, replay;
  logic [31:0] imem_addr, imem_rdata, bp_pc, redirect_pc;
  fetch_entry_t iq_entry;
  fetch_unit dut (.*);

  logic [31:0] mem [256];
  logic [31:0] a_q, r_q;
  always_ff @(posedge clk) begin
    if (imem_en) a_q <= imem_addr;
    r_q <= mem[a_q[9:2]];
  end
  assign imem_rdata = r_q;
  assign bp_taken = bp_pc[4] ^ bp_pc[6];

  function automatic logic [31:0] tgt(input logic [31:0] pc, input logic [31:0] ins);
    if (ins[6:0] == 7'b1101111) return pc + {{12{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
    return pc + {{20{ins[31]}}, ins[7], ins[30:25], ins[11:8], 1'b0};
  endfunction

  logic [31:0] exp_pc;
  int n_push = 0, n_replay = 0, n_redirect = 0, gap_checks = 0;
  int last_push = -10, cyc = 0, taken_at = -1;
  bit free_run;

  initial begin
    for (int i = 0; i < 256; i++) begin
      automatic int t = $urandom_range(0, 255);
      if (i % 7 == 3)       mem[i] = b_type((t - i) * 4, 5'(i), 5'(i + 1), 3'd1);
      else if (i % 11 == 5) mem[i] = j_type((t - i) * 4, 5'd1);
      else                  mem[i] = ADDI(5'(i % 31 + 1), 0, i);
    end
    rst = 1; iq_ready = 1; redirect_valid = 0; redirect_pc = 0;
    exp_pc = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      cyc++;
      free_run = (n < 1000);
      iq_ready = free_run ? 1'b1 : ($urandom_range(0, 3) != 0);
      redirect_valid = !free_run && ($urandom_range(0, 40) == 0);
      redirect_pc = {22'b0, 8'($urandom), 2'b00};
      #1;
      if (iq_valid) begin
        automatic logic [31:0] ins = mem[exp_pc[9:2]];
        automatic bit br = ins[6:0] == 7'b1100011, jl = ins[6:0] == 7'b1101111;
        automatic bit pr = br && (exp_pc[4] ^ exp_pc[6]);
        check(iq_entry.pc == exp_pc && iq_entry.instr == ins, $sformatf("pushed pc %h exp %h", iq_entry.pc, exp_pc));
        check(iq_entry.pred_taken == pr, "prediction carried");
        check(iq_entry.alt_pc == ((br && !pr) ? tgt(exp_pc, ins) : exp_pc + 4), "alternate PC");
        if (free_run && last_push >= 0) begin
          if (taken_at == last_push) check(cyc - last_push == 3, $sformatf("gap after taken jump %0d", cyc - last_push));
          else check(cyc - last_push == 1, "one instruction per cycle");
          gap_checks++;
        end
        last_push = cyc;
        taken_at = (pr || jl) ? cyc : -1;
        exp_pc = (pr || jl) ? tgt(exp_pc, ins) : exp_pc + 4;
        n_push++;
      end
      if (replay) n_replay++;
      if (redirect_valid) begin
        check(!iq_valid, "no push during redirect");
        exp_pc = redirect_pc;
        n_redirect++;
      end
    end
    check(n_push > 2000 && n_replay > 50 && n_redirect > 50 && gap_checks > 300,
          $sformatf("coverage push=%0d replay=%0d redirect=%0d gaps=%0d", n_push, n_replay, n_redirect, gap_checks));
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
