// decoder: turns the instruction at the head of the instruction queue into the
// fields dispatch needs.
//
// For each RV32IM instruction it selects the reservation station (ALU,
// multiply/divide, branch, load or store), the 4-bit operation code held in that
// station, which operands come from registers and which are constants, and the
// initial contents of the instruction's reorder-buffer row. As in the source
// design, no station holds a separate immediate field: the immediate of an
// OP-IMM or load instruction takes the place of the second register operand, a
// store's offset waits in the ROB destination field, and a branch keeps its
// alternate PC in the ROB destination and its prediction in the ROB value.
// This design's own choices: lui, auipc and jal run on the ALU with constant
// operands (0 or PC, and the immediate or 4); a branch also keeps its PC in
// value[31:2] for training the predictor; jalr runs on the branch unit and keeps
// PC+4 and rd packed in the destination field as {PC+4[26:0], rd}.
// Anything else (fence, ecall, ebreak, the all-zero word) is a no-operation.
//
// Purely combinational.
module decoder
  import riscalar_pkg::*;
(
  input  fetch_entry_t fe,
  output decoded_t     dec
);

  logic [31:0] instr, pc;
  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [31:0] imm_i, imm_s, imm_u;

  assign instr = fe.instr;
  assign pc    = fe.pc;
  assign opc   = instr[6:0];
  assign f3    = instr[14:12];
  assign imm_i = {{20{instr[31]}}, instr[31:20]};
  assign imm_s = {{20{instr[31]}}, instr[31:25], instr[11:7]};
  assign imm_u = {instr[31:12], 12'b0};

  always_comb begin
    dec           = '0;
    dec.rs        = RS_NONE;
    dec.itype     = IT_NOP;
    dec.rs1       = instr[19:15];
    dec.rs2       = instr[24:20];
    dec.rd        = instr[11:7];
    dec.rob_dest  = {27'b0, instr[11:7]};
    unique case (opc)
      OPC_OP: begin
        dec.rs      = (instr[31:25] == 7'b0000001) ? RS_MUL : RS_ALU;
        dec.op      = (instr[31:25] == 7'b0000001) ? {1'b0, f3} : {instr[30], f3};
        dec.itype   = IT_REG;
        dec.use_rs1 = 1'b1;
        dec.use_rs2 = 1'b1;
      end
      OPC_OPIMM: begin
        dec.rs      = RS_ALU;
        dec.op      = {(f3 == 3'b101) && instr[30], f3};
        dec.itype   = IT_REG;
        dec.use_rs1 = 1'b1;
        dec.imm2    = imm_i;
      end
      OPC_LUI: begin
        dec.rs    = RS_ALU;
        dec.op    = ALU_ADD;
        dec.itype = IT_REG;
        dec.imm2  = imm_u;
      end
      OPC_AUIPC: begin
        dec.rs    = RS_ALU;
        dec.op    = ALU_ADD;
        dec.itype = IT_REG;
        dec.imm1  = pc;
        dec.imm2  = imm_u;
      end
      OPC_JAL: begin
        dec.rs    = RS_ALU;
        dec.op    = ALU_ADD;
        dec.itype = IT_REG;
        dec.imm1  = pc;
        dec.imm2  = 32'd4;
      end
      OPC_JALR: begin
        dec.rs       = RS_BR;
        dec.op       = BR_JALR;
        dec.itype    = IT_JALR;
        dec.use_rs1  = 1'b1;
        dec.imm2     = imm_i;
        dec.rob_dest = {pc[26:0] + 27'd4, instr[11:7]};
        dec.rob_value = pc + 32'd4;
      end
      OPC_BRANCH: begin
        dec.rs        = RS_BR;
        dec.op        = {1'b0, f3};
        dec.itype     = IT_BRANCH;
        dec.use_rs1   = 1'b1;
        dec.use_rs2   = 1'b1;
        dec.rob_dest  = fe.alt_pc;
        dec.rob_value = {pc[31:2], 1'b0, fe.pred_taken};
      end
      OPC_LOAD: begin
        dec.rs      = RS_LOAD;
        dec.op      = {1'b0, f3};
        dec.itype   = IT_REG;
        dec.use_rs1 = 1'b1;
        dec.imm2    = imm_i;
      end
      OPC_STORE: begin
        dec.rs       = RS_STORE;
        dec.op       = {1'b0, f3};
        dec.itype    = (f3[1:0] == 2'b00) ? IT_SB : (f3[1:0] == 2'b01) ? IT_SH : IT_SW;
        dec.use_rs1  = 1'b1;
        dec.use_rs2  = 1'b1;
        dec.rob_dest = imm_s;
      end
      default: ;
    endcase
    dec.writes_rd = (dec.itype == IT_REG || dec.itype == IT_JALR) && (dec.rd != 5'd0);
  end

endmodule
