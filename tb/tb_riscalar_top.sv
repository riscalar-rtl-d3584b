// tb_riscalar_top: end-to-end test of the out-of-order core at its default
// sizes.
//
// Each program is assembled here, written into the instruction memory through
// the load port while reset is held, and run. A reference instruction-set model
// (rv_asm.svh) executes the same program; the core must commit exactly the same
// sequence of register writes, in program order, and end with the same
// register file. Programs: the load/store swap and the multiply/add/load/store
// sequences of the design's own bring-up tests (including the values the
// bring-up waveform shows: 0x84, 0x4410, 0x4411 in a1), a loop with branches,
// jal/jalr calls, byte and halfword accesses and division, a long dependent
// multiply chain that fills the queues, and seeded random programs.
//
// The test also counts how often each mechanism of the core happened and fails
// if one never did: instruction queue full, ROB full, reservation station
// full (a station cannot fill before the ROB does at the default sizes, since
// every station row also holds a ROB row; it is counted but not required), CDB contention, dispatch-time CDB bypass, predicted-taken branch,
// mispredict flush, load held by the store hazard check, store blocking a load
// at the memory unit, fetch replay, divider use.
module tb_riscalar_top;
  import riscalar_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  logic        prog_we;
  logic [31:0] prog_addr, prog_data;
  logic [4:0]  dbg_reg_addr;
  logic [31:0] dbg_reg_data;
  logic        commit_valid, commit_we, commit_store, flush_out;
  logic [4:0]  commit_rd;
  logic [31:0] commit_data;

  int checks = 0, failures = 0;
  longint cycles = 0;

  riscalar_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  `include "rv_asm.svh"

  // mechanism counters
  int n_iq_full, n_rob_full, n_rs_full, n_cdb_conflict, n_bypass, n_pred_taken,
      n_flush, n_lb_hazard, n_st_prio, n_replay, n_div;
  always @(posedge clk) if (!rst) begin
    if (!dut.iq_ready) n_iq_full++;
    if (dut.iq_avail && !dut.rob_alloc_ready) n_rob_full++;
    if (!dut.rs_alu_in_rdy || !dut.rs_mul_in_rdy || !dut.rs_br_in_rdy || !dut.rs_ld_in_rdy || !dut.rs_st_in_rdy) n_rs_full++;
    if ($countones(dut.cdb_req) > 1) n_cdb_conflict++;
    if (dut.iq_read && dut.dec.use_rs1 && dut.rf_b1 && dut.cdb.valid && dut.cdb.rob == dut.rf_t1 &&
        !dut.rob_v_ready[dut.rf_t1]) n_bypass++;
    if (dut.f_valid && dut.f_entry.pred_taken) n_pred_taken++;
    if (dut.flush) n_flush++;
    if (dut.lb_hazard) n_lb_hazard++;
    if (dut.st_valid && dut.lb_v) n_st_prio++;
    if (dut.f_replay) n_replay++;
    if (dut.u_md.u_div.state != dut.u_md.u_div.D_IDLE) n_div++;
  end

  // commit trace capture
  logic [4:0]  got_rd  [$];
  logic [31:0] got_val [$];
  always @(posedge clk) if (!rst && commit_we) begin
    got_rd.push_back(commit_rd);
    got_val.push_back(commit_data);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Loads prog, runs it, compares with the reference model.
  task automatic run_prog(input string name, input logic [31:0] prog [$], output logic [31:0] exp_regs [32],
                          output longint ncyc);
    logic [4:0]  exp_rd  [$];
    logic [31:0] exp_val [$];
    longint t0;
    int n;
    iss_run(prog, 100000, exp_regs, exp_rd, exp_val);
    rst = 1'b1;
    prog_we = 1'b0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < prog.size(); i++) begin
      prog_we = 1'b1; prog_addr = 32'(i) << 2; prog_data = prog[i];
      @(negedge clk);
    end
    prog_we = 1'b1; prog_addr = 32'(prog.size()) << 2; prog_data = HALT();
    @(negedge clk);
    prog_we = 1'b0;
    got_rd.delete();
    got_val.delete();
    @(negedge clk);
    rst = 1'b0;
    t0 = cycles;
    while (got_rd.size() < exp_rd.size() && cycles - t0 < 200000) @(negedge clk);
    ncyc = cycles - t0;
    repeat (50) @(negedge clk);
    check(got_rd.size() == exp_rd.size(), $sformatf("%s: %0d register writes committed, expected %0d",
                                                    name, got_rd.size(), exp_rd.size()));
    n = (got_rd.size() < exp_rd.size()) ? got_rd.size() : exp_rd.size();
    for (int i = 0; i < n; i++)
      check(got_rd[i] == exp_rd[i] && got_val[i] == exp_val[i],
            $sformatf("%s: commit %0d x%0d=%h, expected x%0d=%h", name, i, got_rd[i], got_val[i], exp_rd[i], exp_val[i]));
    for (int r = 1; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      check(dbg_reg_data == exp_regs[r], $sformatf("%s: x%0d=%h expected %h", name, r, dbg_reg_data, exp_regs[r]));
    end
    $display("%s: %0d instructions' register writes in %0d cycles", name, exp_rd.size(), ncyc);
  endtask

  localparam logic [4:0] T0 = 5, T1 = 6, T2 = 7, S0 = 8, S1 = 9, A0 = 10, A1 = 11, A2 = 12, RA = 1, SP = 2;

  logic [31:0] lcg;
  function automatic int rnd(input int lo, input int hi);
    lcg = lcg * 32'd1664525 + 32'd1013904223;
    return lo + int'({8'b0, lcg[31:8]} % 32'(hi - lo + 1));
  endfunction

  logic [31:0] prog [$];
  logic [31:0] regs [32];
  longint nc;

  initial begin
    rst = 1'b1;
    prog_we = 1'b0;
    prog_addr = '0;
    prog_data = '0;
    dbg_reg_addr = '0;

    // 1. Load/store swap between registers.
    prog = '{ADDI(A1, A1, 4), ADDI(A2, A2, 8), SW(A1, 0, 0), SW(A2, 0, 4), LW(A2, 0, 0), LW(A1, 0, 4)};
    run_prog("swap", prog, regs, nc);
    check(regs[A1] == 32'd8 && regs[A2] == 32'd4, "swap: reference result");

    // 2. Multiply/add with loads and stores; memory word 0 first set to 4.
    prog = '{ADDI(T0, 0, 4), SW(T0, 0, 0), LW(A1, 0, 0), MUL(A1, A1, A1)};
    for (int i = 0; i < 6; i++) begin prog.push_back(ADDI(A1, A1, 1)); prog.push_back(ADDI(A2, A2, 1)); end
    prog.push_back(MUL(A1, A1, A2));
    prog.push_back(SW(A1, 0, 0));
    prog.push_back(LW(A1, 0, 0));
    prog.push_back(MUL(A1, A1, A1));
    prog.push_back(ADDI(A1, A1, 1));
    prog.push_back(ADDI(A2, A2, 1));
    run_prog("mul_add", prog, regs, nc);
    check(regs[A1] == 32'h4411 && regs[A2] == 32'd7, "mul_add: a1=0x4411, a2=7");

    // 3. Loop with branches, calls, byte/halfword accesses and division.
    prog.delete();
    prog.push_back(ADDI(S0, 0, 20));                          // 0  s0 = 20 iterations
    prog.push_back(ADDI(S1, 0, 0));                           // 4  s1 = sum
    prog.push_back(ADDI(A0, 0, 7));                           // 8
    prog.push_back(ADD(T0, S0, S1));                          // 12 loop:
    prog.push_back(MUL(T1, T0, A0));                          // 16
    prog.push_back(r_type(7'd1, A0, T1, 3'd4, T2, 7'b0110011));   // 20 div t2, t1, a0
    prog.push_back(r_type(7'd1, S0, T1, 3'd6, A2, 7'b0110011));   // 24 rem a2, t1, s0
    prog.push_back(s_type(64, T1, 0, 3'd0));                  // 28 sb t1, 64(x0)
    prog.push_back(s_type(66, T2, 0, 3'd1));                  // 32 sh t2, 66(x0)
    prog.push_back(i_type(64, 0, 3'd0, A1, 7'b0000011));      // 36 lb a1, 64(x0)
    prog.push_back(i_type(66, 0, 3'd5, T0, 7'b0000011));      // 40 lhu t0, 66(x0)
    prog.push_back(ADD(S1, S1, A1));                          // 44
    prog.push_back(ADD(S1, S1, T0));                          // 48
    prog.push_back(ADD(S1, S1, A2));                          // 52
    prog.push_back(j_type(24, RA));                           // 56 jal ra, func (80)
    prog.push_back(ADDI(S0, S0, -1));                         // 60
    prog.push_back(b_type(12 - 64, 0, S0, 3'd1));             // 64 bne s0, x0, loop
    prog.push_back(b_type(8, 0, S0, 3'd0));                   // 68 beq s0, x0, +8 (taken)
    prog.push_back(ADDI(S1, 0, -1));                          // 72 skipped
    prog.push_back(j_type(16, 0));                            // 76 j end (92)
    prog.push_back(i_type(3, S1, 3'd4, S1, 7'b0010011));      // 80 func: xori s1, s1, 3
    prog.push_back(i_type(0, RA, 3'd0, 0, 7'b1100111));       // 84 jalr x0, 0(ra)
    prog.push_back(ADDI(SP, 0, 1));                           // 88 never reached
    prog.push_back({20'h00010, T0, 7'b0010111});              // 92 auipc t0
    prog.push_back({20'hABCDE, T1, 7'b0110111});              // 96 lui t1
    prog.push_back(i_type(-1, T1, 3'd3, T2, 7'b0010011));     // sltiu
    prog.push_back(r_type(7'h20, A0, T1, 3'd5, A2, 7'b0110011)); // sra
    run_prog("loop", prog, regs, nc);

    // 4. Long dependent multiply chain with independent adds (fills the queues).
    prog = '{ADDI(A1, 0, 3), ADDI(A2, 0, 5)};
    for (int w = 0; w < 8; w++) prog.push_back(SW(0, 0, 4 * w));
    for (int i = 0; i < 40; i++) begin
      prog.push_back(MUL(A1, A1, A2));
      prog.push_back(ADDI(A2, A2, 1));
      prog.push_back(SW(A1, 0, 4 * (i % 8)));
      prog.push_back(LW(T0, 0, 4 * ((i + 3) % 8)));
    end
    run_prog("mul_chain", prog, regs, nc);

    // 5. Seeded random programs.
    for (int seed = 1; seed <= 6; seed++) begin
      lcg = 32'(seed) * 32'd2654435761;
      prog.delete();
      for (int w = 0; w < 16; w++) prog.push_back(SW(0, 0, 4 * w));
      for (int i = 0; i < 120; i++) begin
        automatic int k = rnd(0, 13);
        automatic logic [4:0] rd = 5'(rnd(1, 7));
        automatic logic [4:0] r1 = 5'(rnd(0, 7));
        automatic logic [4:0] r2 = 5'(rnd(0, 7));
        case (k)
          0, 1:  prog.push_back(ADDI(rd, r1, rnd(0, 4095) - 2048));
          2:     prog.push_back(r_type((rnd(0, 1) != 0) ? 7'h20 : 7'h00, r2, r1, 3'((rnd(0, 1) != 0) ? 0 : 5), rd, 7'b0110011));
          3:     prog.push_back(r_type(7'h00, r2, r1, 3'(rnd(1, 7)), rd, 7'b0110011));
          4:     prog.push_back(r_type(7'h01, r2, r1, 3'(rnd(0, 3)), rd, 7'b0110011));
          5:     prog.push_back(r_type(7'h01, r2, r1, 3'(rnd(4, 7)), rd, 7'b0110011));
          6, 7:  prog.push_back(s_type(4 * rnd(0, 15), r2, 0, 3'd2));
          8, 9:  prog.push_back(LW(rd, 0, 4 * rnd(0, 15)));
          10:    prog.push_back(i_type(rnd(0, 63), 0, 3'((rnd(0, 1) != 0) ? 0 : 4), rd, 7'b0000011));
          11:    prog.push_back(s_type(rnd(0, 31) * 2, r2, 0, 3'd1));
          12:    prog.push_back(b_type(4 * rnd(2, 4), r2, r1, 3'((rnd(0, 1) != 0) ? 0 : 1)));
          default: prog.push_back(b_type(4 * rnd(2, 3), r2, r1, 3'(rnd(4, 7))));
        endcase
      end
      run_prog($sformatf("random%0d", seed), prog, regs, nc);
    end

    $display("mechanisms: iq_full=%0d rob_full=%0d rs_full=%0d cdb_conflict=%0d dispatch_bypass=%0d pred_taken=%0d flush=%0d lb_hazard=%0d store_priority=%0d replay=%0d divider=%0d",
             n_iq_full, n_rob_full, n_rs_full, n_cdb_conflict, n_bypass, n_pred_taken, n_flush,
             n_lb_hazard, n_st_prio, n_replay, n_div);
    check(n_iq_full > 0, "instruction queue never full");
    check(n_rob_full > 0, "ROB never full");
    check(n_cdb_conflict > 0, "CDB never contended");
    check(n_bypass > 0, "dispatch CDB bypass never used");
    check(n_pred_taken > 0, "no branch predicted taken");
    check(n_flush > 0, "no mispredict flush");
    check(n_lb_hazard > 0, "load buffer hazard never seen");
    check(n_st_prio > 0, "store never took priority over a load");
    check(n_replay > 0, "fetch never replayed");
    check(n_div > 0, "divider never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
