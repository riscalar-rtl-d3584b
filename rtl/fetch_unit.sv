// fetch_unit: program counter, instruction-BRAM addressing and branch prediction.
//
// The instruction BRAM answers two cycles after it is addressed, so the unit
// keeps two reads in flight: the address it sends runs two instructions ahead of
// the instruction that arrives. Each arriving instruction is pre-decoded; a
// conditional branch is looked up in the branch predictor, and a branch
// predicted taken or a jal restarts fetch at its target. Restarting drops the
// one younger read already in flight, so every such jump costs two empty cycles,
// as in the source design. The entry written into the instruction queue holds
// the instruction, its PC, the prediction and the alternate PC (the other
// direction of the branch), which the reorder buffer later uses to recover.
//
// When the queue is full the arriving instruction cannot be written; the unit
// then drops both reads in flight and refetches from that instruction's PC once
// the queue has room (this replay is how this design holds the PC). A redirect
// from the commit stage (mispredict or jalr) overrides everything. jalr targets
// are not predicted: fetch simply continues at PC+4.
//
// Interface: imem_addr/imem_en drive the BRAM; iq_valid/iq_entry push into the
// queue when iq_ready. Synchronous reset starts fetch at address 0.
module fetch_unit
  import riscalar_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  output logic         imem_en,
  output logic [31:0]  imem_addr,
  input  logic [31:0]  imem_rdata,
  input  logic         iq_ready,
  output logic         iq_valid,
  output fetch_entry_t iq_entry,
  output logic [31:0]  bp_pc,
  input  logic         bp_taken,
  input  logic         redirect_valid,
  input  logic [31:0]  redirect_pc,
  output logic         replay          // arriving instruction dropped (queue full)
);

  logic [31:0] fetch_pc;
  logic        p1_v, p2_v;
  logic [31:0] p1_pc, p2_pc;

  logic [31:0] instr;
  logic        is_branch, is_jal, take;
  logic [31:0] imm_b, imm_j, target;

  assign instr     = imem_rdata;
  assign is_branch = p2_v && (instr[6:0] == OPC_BRANCH);
  assign is_jal    = p2_v && (instr[6:0] == OPC_JAL);
  assign imm_b     = {{20{instr[31]}}, instr[7], instr[30:25], instr[11:8], 1'b0};
  assign imm_j     = {{12{instr[31]}}, instr[19:12], instr[20], instr[30:21], 1'b0};
  assign bp_pc     = p2_pc;
  assign take      = is_jal || (is_branch && bp_taken);
  assign target    = p2_pc + (is_jal ? imm_j : imm_b);

  assign replay    = !redirect_valid && p2_v && !iq_ready;
  assign iq_valid  = !redirect_valid && p2_v && iq_ready;

  always_comb begin
    iq_entry.instr      = instr;
    iq_entry.pc         = p2_pc;
    iq_entry.pred_taken = is_branch && bp_taken;
    iq_entry.alt_pc     = (is_branch && !bp_taken) ? target : p2_pc + 32'd4;
  end

  // A new read is started only when nothing redirects fetch in this cycle.
  assign imem_en   = !rst && !redirect_valid && !replay && !(iq_valid && take) && iq_ready;
  assign imem_addr = fetch_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      fetch_pc <= '0;
      p1_v     <= 1'b0;
      p2_v     <= 1'b0;
      p1_pc    <= '0;
      p2_pc    <= '0;
    end else begin
      p1_v  <= imem_en;
      p1_pc <= fetch_pc;
      p2_pc <= p1_pc;
      if (redirect_valid) begin
        fetch_pc <= redirect_pc;
        p2_v     <= 1'b0;
      end else if (replay) begin
        fetch_pc <= p2_pc;
        p2_v     <= 1'b0;
      end else if (iq_valid && take) begin
        fetch_pc <= target;
        p2_v     <= 1'b0;
      end else begin
        p2_v <= p1_v;
        if (imem_en) fetch_pc <= fetch_pc + 32'd4;
      end
    end
  end

endmodule
