// riscalar_pkg: types and constants shared by the Riscalar out-of-order RV32IM core.
//
// The common data bus (CDB) carries a result from one functional unit to the
// reservation stations and the reorder buffer (ROB) each cycle. Its four fields,
// destination (32), value (32), ROB entry number (3) and valid (1), follow the
// core's block diagram. ROB entries carry a 4-bit instruction type; the encoding
// of that type and of the reservation-station classes is this design's own.
package riscalar_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned ROB_DEPTH = 8;
  localparam int unsigned TAG_W     = $clog2(ROB_DEPTH);
  localparam int unsigned OP_W      = 4;

  typedef logic [TAG_W-1:0] tag_t;

  // Common data bus.
  typedef struct packed {
    logic        valid;
    tag_t        rob;
    logic [31:0] value;
    logic [31:0] dest;
  } cdb_t;

  // ROB instruction type (4 bits per ROB row).
  typedef enum logic [3:0] {
    IT_NOP    = 4'd0,   // no architectural effect
    IT_REG    = 4'd1,   // writes rd with value (OP, OPIMM, LUI, AUIPC, JAL, MUL/DIV, LOAD)
    IT_BRANCH = 4'd2,   // conditional branch
    IT_JALR   = 4'd3,   // indirect jump: writes rd and always redirects
    IT_SB     = 4'd4,   // stores: dest = offset, then address; value = data
    IT_SH     = 4'd5,
    IT_SW     = 4'd6
  } itype_e;

  // Reservation station a dispatched instruction goes to.
  typedef enum logic [2:0] {
    RS_NONE  = 3'd0,
    RS_ALU   = 3'd1,
    RS_MUL   = 3'd2,
    RS_BR    = 3'd3,
    RS_LOAD  = 3'd4,
    RS_STORE = 3'd5
  } rs_sel_e;

  // RV32 major opcodes.
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_OPIMM  = 7'b0010011;
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  localparam logic [6:0] OPC_JALR   = 7'b1100111;
  localparam logic [6:0] OPC_LUI    = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC  = 7'b0010111;

  // ALU operation codes: {funct7[5], funct3}.
  localparam logic [3:0] ALU_ADD  = 4'b0000;
  localparam logic [3:0] ALU_SUB  = 4'b1000;
  localparam logic [3:0] ALU_SLL  = 4'b0001;
  localparam logic [3:0] ALU_SLT  = 4'b0010;
  localparam logic [3:0] ALU_SLTU = 4'b0011;
  localparam logic [3:0] ALU_XOR  = 4'b0100;
  localparam logic [3:0] ALU_SRL  = 4'b0101;
  localparam logic [3:0] ALU_SRA  = 4'b1101;
  localparam logic [3:0] ALU_OR   = 4'b0110;
  localparam logic [3:0] ALU_AND  = 4'b0111;

  // Branch-unit operation codes: funct3 of the branch, plus jalr.
  localparam logic [3:0] BR_JALR = 4'b1000;

  // One instruction queue entry.
  typedef struct packed {
    logic [31:0] instr;
    logic [31:0] pc;
    logic        pred_taken;
    logic [31:0] alt_pc;      // PC to use if the prediction turns out wrong
  } fetch_entry_t;

  // Decoded instruction.
  typedef struct packed {
    rs_sel_e     rs;
    itype_e      itype;
    logic [3:0]  op;
    logic        use_rs1;     // operand 1 comes from rs1 (else from imm1)
    logic        use_rs2;     // operand 2 comes from rs2 (else from imm2)
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [4:0]  rd;
    logic        writes_rd;
    logic [31:0] imm1;        // constant operand 1 (0 or PC)
    logic [31:0] imm2;        // constant operand 2 (immediate or 4)
    logic [31:0] rob_dest;    // initial ROB destination field
    logic [31:0] rob_value;   // initial ROB value field
  } decoded_t;

endpackage
