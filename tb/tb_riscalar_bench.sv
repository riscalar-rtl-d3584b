// tb_riscalar_bench: the two benchmark kinds the core was evaluated with, each
// at about 10, 20 and 100 instructions, run on the core at its default sizes.
//
// "alu" programs are a mix of register and immediate ALU operations (add, sub,
// logic, shifts, compares) with short dependence chains; "muladd" programs
// repeat a ten-instruction block of multiplies, adds, loads and stores that
// pass values through memory. The instruction mix is this testbench's own;
// only the two kinds and the three sizes come from the evaluation. Each
// program is checked against the reference model (every committed register
// write, in order, and the final register file), and its cycle count from
// reset release to the last commit is printed with the instructions per
// cycle. The core must also stay within a loose bound of 12 cycles per
// instruction plus start-up, which catches a stall that never clears.
module tb_riscalar_bench;
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
  int n_committed;

  riscalar_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  `include "rv_asm.svh"

  logic [4:0]  got_rd  [$];
  logic [31:0] got_val [$];
  always @(posedge clk) if (!rst) begin
    if (commit_valid) n_committed++;
    if (commit_we) begin
      got_rd.push_back(commit_rd);
      got_val.push_back(commit_data);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Loads prog (followed by a jump-to-self), runs it until the last expected
  // register write commits, and compares with the reference model.
  task automatic run_prog(input string name, input logic [31:0] prog [$]);
    logic [4:0]  exp_rd  [$];
    logic [31:0] exp_val [$];
    logic [31:0] exp_regs [32];
    longint t0, ncyc;
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
    n_committed = 0;
    while (n_committed < prog.size() && cycles - t0 < 100000) @(negedge clk);
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
    check(ncyc <= 12 * prog.size() + 20, $sformatf("%s: %0d cycles for %0d instructions", name, ncyc, prog.size()));
    $display("%s: %0d instructions committed in %0d cycles (IPC %0.2f)", name, prog.size(), ncyc,
             real'(prog.size()) / real'(ncyc));
  endtask

  localparam logic [4:0] A1 = 11, A2 = 12;

  // ALU mix: registers x5..x12 rotate as destinations; sources are the two
  // most recent destinations, so most instructions depend on the one before.
  function automatic void alu_prog(input int size, ref logic [31:0] p [$]);
    p.delete();
    for (int i = 0; i < size; i++) begin
      automatic logic [4:0] rd = 5'(5 + i % 8);
      automatic logic [4:0] s1 = 5'(5 + (i + 7) % 8);
      automatic logic [4:0] s2 = 5'(5 + (i + 6) % 8);
      unique case (i % 10)
        0: p.push_back(ADDI(rd, s1, (i * 37 + 1) % 2048));
        1: p.push_back(ADD(rd, s1, s2));
        2: p.push_back(r_type(7'h20, s2, s1, 3'd0, rd, 7'b0110011));   // sub
        3: p.push_back(r_type(7'h00, s2, s1, 3'd4, rd, 7'b0110011));   // xor
        4: p.push_back(i_type(3, s1, 3'd1, rd, 7'b0010011));       // slli
        5: p.push_back(r_type(7'h00, s2, s1, 3'd6, rd, 7'b0110011));   // or
        6: p.push_back(r_type(7'h00, s2, s1, 3'd2, rd, 7'b0110011));   // slt
        7: p.push_back(i_type('h402, s1, 3'd5, rd, 7'b0010011));     // srai 2
        8: p.push_back(r_type(7'h00, s2, s1, 3'd7, rd, 7'b0110011));   // and
        default: p.push_back(i_type('h7f0, s1, 3'd3, rd, 7'b0010011)); // sltiu
      endcase
    end
  endfunction

  // Multiply/add/load/store block of ten, repeated; the first store gives
  // memory word 0 a known value before the first load reads it.
  function automatic void muladd_prog(input int size, ref logic [31:0] p [$]);
    p.delete();
    for (int i = 0; i < size; i++) begin
      unique case (i % 10)
        0: p.push_back(SW(A1, 0, 0));
        1: p.push_back(LW(A2, 0, 0));
        2: p.push_back(MUL(A1, A1, A2));
        3: p.push_back(ADDI(A1, A1, 1));
        4: p.push_back(ADDI(A2, A2, 1));
        5: p.push_back(ADD(A1, A1, A2));
        6: p.push_back(MUL(A2, A2, A1));
        7: p.push_back(SW(A2, 0, 4));
        8: p.push_back(LW(A1, 0, 4));
        default: p.push_back(ADDI(A2, A2, 3));
      endcase
    end
  endfunction

  logic [31:0] prog [$];
  int sizes [3] = '{10, 20, 100};

  initial begin
    rst = 1'b1;
    prog_we = 1'b0;
    prog_addr = '0;
    prog_data = '0;
    dbg_reg_addr = '0;
    foreach (sizes[k]) begin
      alu_prog(sizes[k], prog);
      run_prog($sformatf("alu_%0d", sizes[k]), prog);
    end
    foreach (sizes[k]) begin
      muladd_prog(sizes[k], prog);
      run_prog($sformatf("muladd_%0d", sizes[k]), prog);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
