// tb_decoder: feeds one instruction of each RV32IM class through the decoder
// and checks the station, operation code, operand sources, immediate and the
// initial reorder-buffer fields against hand-computed values, then checks
// register fields and sign-extended immediates of random adds, loads and stores.
module tb_decoder;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  `include "rv_asm.svh"
  fetch_entry_t fe;
  decoded_t dec;
  decoder dut (.fe, .dec);

  task automatic t(input logic [31:0] ins, input logic [31:0] pc, input rs_sel_e rs, input itype_e it,
                   input logic [3:0] op, input bit u1, input bit u2, input logic [31:0] i1, input logic [31:0] i2,
                   input bit wr, input string name);
    fe = '{instr: ins, pc: pc, pred_taken: 1'b1, alt_pc: 32'h0000_0444};
    #1;
    check(dec.rs == rs && dec.itype == it && dec.op == op && dec.use_rs1 == u1 && dec.use_rs2 == u2 &&
          dec.imm1 == i1 && dec.imm2 == i2 && dec.writes_rd == wr,
          $sformatf("%s: rs=%0d it=%0d op=%h u=%0b%0b imm=%h/%h wr=%0b", name, dec.rs, dec.itype, dec.op,
                    dec.use_rs1, dec.use_rs2, dec.imm1, dec.imm2, dec.writes_rd));
  endtask

  initial begin
    t(ADD(3, 1, 2), 0, RS_ALU, IT_REG, 4'b0000, 1, 1, 0, 0, 1, "add");
    t(r_type(7'h20, 2, 1, 3'd0, 3, 7'b0110011), 0, RS_ALU, IT_REG, 4'b1000, 1, 1, 0, 0, 1, "sub");
    t(r_type(7'h20, 2, 1, 3'd5, 3, 7'b0110011), 0, RS_ALU, IT_REG, 4'b1101, 1, 1, 0, 0, 1, "sra");
    t(ADDI(3, 1, -5), 0, RS_ALU, IT_REG, 4'b0000, 1, 0, 0, -5, 1, "addi");
    t(i_type('h405, 1, 3'd5, 3, 7'b0010011), 0, RS_ALU, IT_REG, 4'b1101, 1, 0, 0, 32'h405, 1, "srai");
    t(i_type(-1, 1, 3'd7, 3, 7'b0010011), 0, RS_ALU, IT_REG, 4'b0111, 1, 0, 0, 32'hFFFF_FFFF, 1, "andi -1");
    t(MUL(3, 1, 2), 0, RS_MUL, IT_REG, 4'b0000, 1, 1, 0, 0, 1, "mul");
    t(r_type(7'd1, 2, 1, 3'd6, 3, 7'b0110011), 0, RS_MUL, IT_REG, 4'b0110, 1, 1, 0, 0, 1, "rem");
    t({20'h12345, 5'd4, 7'b0110111}, 0, RS_ALU, IT_REG, ALU_ADD, 0, 0, 0, 32'h1234_5000, 1, "lui");
    t({20'h00001, 5'd4, 7'b0010111}, 32'h40, RS_ALU, IT_REG, ALU_ADD, 0, 0, 32'h40, 32'h1000, 1, "auipc");
    t(j_type(16, 1), 32'h40, RS_ALU, IT_REG, ALU_ADD, 0, 0, 32'h40, 4, 1, "jal");
    t(j_type(16, 0), 32'h40, RS_ALU, IT_REG, ALU_ADD, 0, 0, 32'h40, 4, 0, "jal x0");
    t(i_type(8, 1, 3'd0, 5, 7'b1100111), 32'h40, RS_BR, IT_JALR, BR_JALR, 1, 0, 0, 8, 1, "jalr");
    check(dec.rob_dest == {27'h44, 5'd5}, "jalr dest packs PC+4 and rd");
    t(b_type(-8, 2, 1, 3'd1), 32'h80, RS_BR, IT_BRANCH, 4'b0001, 1, 1, 0, 0, 0, "bne");
    check(dec.rob_dest == 32'h444 && dec.rob_value == 32'h81, "branch: alt PC in dest, PC and prediction in value");
    t(LW(3, 1, 12), 0, RS_LOAD, IT_REG, 4'b0010, 1, 0, 0, 12, 1, "lw");
    t(i_type(-3, 1, 3'd4, 3, 7'b0000011), 0, RS_LOAD, IT_REG, 4'b0100, 1, 0, 0, -3, 1, "lbu");
    t(SW(2, 1, -20), 0, RS_STORE, IT_SW, 4'b0010, 1, 1, 0, 0, 0, "sw");
    check(dec.rob_dest == -20, "store offset in ROB dest");
    t(s_type(3, 2, 1, 3'd0), 0, RS_STORE, IT_SB, 4'b0000, 1, 1, 0, 0, 0, "sb");
    t(s_type(2, 2, 1, 3'd1), 0, RS_STORE, IT_SH, 4'b0001, 1, 1, 0, 0, 0, "sh");
    t(32'h0000_0073, 0, RS_NONE, IT_NOP, 0, 0, 0, 0, 0, 0, "ecall");
    t(32'h0, 0, RS_NONE, IT_NOP, 0, 0, 0, 0, 0, 0, "zero word");
    t(ADDI(0, 1, 1), 0, RS_ALU, IT_REG, 4'b0000, 1, 0, 0, 1, 0, "addi x0");
    // Random register numbers and immediates: fields and sign extension.
    for (int n = 0; n < 500; n++) begin
      automatic logic [4:0] a = 5'($urandom), b = 5'($urandom), d = 5'($urandom);
      automatic int imm = int'($urandom_range(0, 4095)) - 2048;
      fe = '{instr: ADD(d, a, b), pc: 0, pred_taken: 1'b0, alt_pc: 0};
      #1 check(dec.rs1 == a && dec.rs2 == b && dec.rd == d && dec.writes_rd == (d != 0), "R-type fields");
      fe.instr = ADDI(d, a, imm);
      #1 check(dec.rs1 == a && dec.rd == d && dec.imm2 == 32'(imm), $sformatf("addi imm %0d", imm));
      fe.instr = LW(d, a, imm);
      #1 check(dec.rs1 == a && dec.rd == d && dec.imm2 == 32'(imm), $sformatf("lw imm %0d", imm));
      fe.instr = SW(b, a, imm);
      #1 check(dec.rs1 == a && dec.rs2 == b && dec.rob_dest == 32'(imm), $sformatf("sw offset %0d", imm));
    end
    finish();
  end
endmodule
