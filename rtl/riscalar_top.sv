// riscalar_top: an out-of-order RV32IM core built on Tomasulo's algorithm.
//
// Instruction flow:
//   fetch      fetch_unit reads the two-cycle instruction BRAM two instructions
//              ahead, predicts conditional branches with the tournament
//              branch_predictor and pushes {instruction, PC, prediction,
//              alternate PC} into the 16-entry instruction_queue.
//   dispatch   the head of the queue is decoded and, when the reorder buffer
//              has a free row and the instruction's reservation station has a
//              free row, sent to that station in one cycle. Each source operand
//              is taken from the register file if no instruction in flight will
//              write it, otherwise from the reorder buffer if already computed,
//              otherwise from the common data bus (CDB) if broadcast in this
//              very cycle; failing all three the station waits for the
//              producer's ROB entry number. rd is then renamed to the new ROB
//              entry.
//   execute    five stations (ALU, multiply/divide, branch, load, store), eight
//              rows each, feed the one-cycle ALU, the six-cycle multiplier and
//              iterative divider, the combinational branch unit, and the load
//              path (address unit, load buffer, memory unit). The store station
//              puts base and data straight on the CDB.
//   write-back one result per cycle crosses the CDB, chosen by a fixed priority
//              (memory, multiply/divide, ALU, branch, store); losers hold.
//   commit     the eight-row reorder buffer retires its head in order, writing
//              the register file, sending stores to memory and training the
//              predictor. A mispredicted branch or a jalr flushes every queue,
//              station and unit and restarts fetch at the correct PC.
//
// The structure, sizes and latencies follow the source design. The program
// load port, the debug register port and the commit trace are this design's
// additions for use without a host. While rst is high, prog_we writes
// prog_data into instruction word prog_addr[..:2]; execution starts at address
// 0 when rst falls. All resets are synchronous and active high.
module riscalar_top
  import riscalar_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 2048,
  parameter int unsigned DMEM_DEPTH = 2048,
  parameter int unsigned IQ_DEPTH   = 16,
  parameter int unsigned RS_DEPTH   = 8,
  parameter int unsigned LB_DEPTH   = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  output logic        commit_valid,
  output logic        commit_we,
  output logic [4:0]  commit_rd,
  output logic [31:0] commit_data,
  output logic        commit_store,
  output logic        flush_out
);

  localparam int unsigned IAW = $clog2(IMEM_DEPTH);
  localparam int unsigned FEW = $bits(fetch_entry_t);

  // ---------------------------------------------------------------- signals
  logic         flush;
  logic [31:0]  redirect_pc;
  cdb_t         cdb;

  // ---------------------------------------------------------------- fetch
  logic         f_en;
  logic [31:0]  f_addr, imem_rdata;
  logic         iq_ready, f_valid, f_replay;
  fetch_entry_t f_entry;
  logic [31:0]  bp_pc;
  logic         bp_taken;
  logic         bp_upd_valid, bp_upd_taken;
  logic [31:0]  bp_upd_pc;

  bram #(.DEPTH(IMEM_DEPTH), .WIDTH(32)) u_imem (
    .clk,
    .en  (rst ? prog_we : f_en),
    .we  ((rst && prog_we) ? 4'hF : 4'h0),
    .addr(rst ? prog_addr[2 +: IAW] : f_addr[2 +: IAW]),
    .din (prog_data),
    .dout(imem_rdata)
  );

  branch_predictor u_bp (
    .clk, .rst,
    .pred_pc   (bp_pc),
    .pred_taken(bp_taken),
    .upd_valid (bp_upd_valid),
    .upd_pc    (bp_upd_pc),
    .upd_taken (bp_upd_taken)
  );

  fetch_unit u_fetch (
    .clk, .rst,
    .imem_en       (f_en),
    .imem_addr     (f_addr),
    .imem_rdata,
    .iq_ready,
    .iq_valid      (f_valid),
    .iq_entry      (f_entry),
    .bp_pc,
    .bp_taken,
    .redirect_valid(flush),
    .redirect_pc,
    .replay        (f_replay)
  );

  // ---------------------------------------------------------------- instruction queue
  logic         iq_avail, iq_read;
  logic [FEW-1:0] iq_out;
  fetch_entry_t iq_head;

  instruction_queue #(.DEPTH(IQ_DEPTH), .WIDTH(FEW)) u_iq (
    .clk, .rst, .flush,
    .valid_in           (f_valid),
    .ready_out          (iq_ready),
    .instruction_in     (f_entry),
    .inst_available_out (iq_avail),
    .instruction_read_in(iq_read),
    .instruction_out    (iq_out)
  );
  assign iq_head = fetch_entry_t'(iq_out);

  // ---------------------------------------------------------------- dispatch
  decoded_t    dec;
  logic [31:0] rf_d1, rf_d2;
  logic        rf_b1, rf_b2;
  tag_t        rf_t1, rf_t2;

  logic        rob_alloc_ready;
  tag_t        rob_tag;
  logic        rob_v_valid [ROB_DEPTH];
  logic [3:0]  rob_v_itype [ROB_DEPTH];
  logic        rob_v_ready [ROB_DEPTH];
  logic [31:0] rob_v_dest  [ROB_DEPTH];
  logic [31:0] rob_v_value [ROB_DEPTH];
  tag_t        rob_head;

  logic        c_valid, c_we, st_valid;
  tag_t        c_tag;
  logic [4:0]  c_rd;
  logic [31:0] c_data, st_addr, st_data;
  logic [1:0]  st_size;

  decoder u_dec (.fe(iq_head), .dec);

  register_file u_rf (
    .clk, .rst, .flush,
    .rs1(dec.rs1), .rs2(dec.rs2),
    .rd1(rf_d1), .rd2(rf_d2),
    .busy1(rf_b1), .busy2(rf_b2),
    .tag1(rf_t1), .tag2(rf_t2),
    .rename_en (iq_read && dec.writes_rd),
    .rename_rd (dec.rd),
    .rename_tag(rob_tag),
    .commit_en (c_we),
    .commit_rd (c_rd),
    .commit_tag(c_tag),
    .commit_data(c_data),
    .dbg_addr(dbg_reg_addr),
    .dbg_data(dbg_reg_data)
  );

  // Operand lookup: register file, then reorder buffer, then the CDB.
  typedef struct packed {
    logic        ready;
    logic [31:0] value;
    tag_t        q;
  } operand_t;

  function automatic operand_t lookup(input logic busy, input tag_t tag, input logic [31:0] regval,
                                      input logic rv, input logic [3:0] rit, input logic rr,
                                      input logic [31:0] rdest, input logic [31:0] rval,
                                      input cdb_t bus);
    operand_t o;
    o = '{ready: 1'b1, value: regval, q: tag};
    if (busy) begin
      if (rv && rit == IT_JALR)        o.value = {5'b0, rdest[31:5]};
      else if (rv && rr)               o.value = rval;
      else if (bus.valid && bus.rob == tag) o.value = bus.value;
      else                             o.ready = 1'b0;
    end
    return o;
  endfunction

  operand_t op1, op2;
  assign op1 = lookup(rf_b1, rf_t1, rf_d1, rob_v_valid[rf_t1], rob_v_itype[rf_t1], rob_v_ready[rf_t1],
                      rob_v_dest[rf_t1], rob_v_value[rf_t1], cdb);
  assign op2 = lookup(rf_b2, rf_t2, rf_d2, rob_v_valid[rf_t2], rob_v_itype[rf_t2], rob_v_ready[rf_t2],
                      rob_v_dest[rf_t2], rob_v_value[rf_t2], cdb);

  logic        vi_rdy, vj_rdy;
  logic [31:0] vi, vj;
  assign vi_rdy = dec.use_rs1 ? op1.ready : 1'b1;
  assign vj_rdy = dec.use_rs2 ? op2.ready : 1'b1;
  assign vi     = dec.use_rs1 ? op1.value : dec.imm1;
  assign vj     = dec.use_rs2 ? op2.value : dec.imm2;

  logic rs_alu_in_rdy, rs_mul_in_rdy, rs_br_in_rdy, rs_ld_in_rdy, rs_st_in_rdy;
  logic station_ready;
  always_comb begin
    unique case (dec.rs)
      RS_ALU:   station_ready = rs_alu_in_rdy;
      RS_MUL:   station_ready = rs_mul_in_rdy;
      RS_BR:    station_ready = rs_br_in_rdy;
      RS_LOAD:  station_ready = rs_ld_in_rdy;
      RS_STORE: station_ready = rs_st_in_rdy;
      default:  station_ready = 1'b1;
    endcase
  end
  assign iq_read = iq_avail && rob_alloc_ready && station_ready && !flush;

  // ---------------------------------------------------------------- reservation stations and units
  logic [4:0] cdb_req, cdb_grant;
  cdb_t       cdb_src [5];

  // ALU
  logic        alu_rs_v, alu_rdy;
  logic [3:0]  alu_rs_op;
  tag_t        alu_rs_rob;
  logic [31:0] alu_rs_a, alu_rs_b;
  logic        alu_ov;
  tag_t        alu_orob;
  logic [31:0] alu_oval;

  reservation_station #(.DEPTH(RS_DEPTH)) u_rs_alu (
    .clk, .rst, .flush,
    .in_valid(iq_read && dec.rs == RS_ALU), .in_ready(rs_alu_in_rdy),
    .in_op(dec.op), .in_rob(rob_tag), .in_qi(op1.q), .in_qj(op2.q),
    .in_vi(vi), .in_vj(vj), .in_ri(vi_rdy), .in_rj(vj_rdy), .cdb,
    .out_valid(alu_rs_v), .out_ready(alu_rdy),
    .out_op(alu_rs_op), .out_rob(alu_rs_rob), .out_vi(alu_rs_a), .out_vj(alu_rs_b)
  );

  alu u_alu (
    .clk, .rst, .flush,
    .in_valid(alu_rs_v), .in_ready(alu_rdy),
    .op(alu_rs_op), .in_rob(alu_rs_rob), .a(alu_rs_a), .b(alu_rs_b),
    .out_valid(alu_ov), .out_grant(cdb_grant[2]), .out_rob(alu_orob), .out_value(alu_oval)
  );

  // multiply / divide
  logic        md_rs_v, md_rdy;
  logic [3:0]  md_rs_op;
  tag_t        md_rs_rob;
  logic [31:0] md_rs_a, md_rs_b;
  logic        md_ov;
  tag_t        md_orob;
  logic [31:0] md_oval;

  reservation_station #(.DEPTH(RS_DEPTH)) u_rs_mul (
    .clk, .rst, .flush,
    .in_valid(iq_read && dec.rs == RS_MUL), .in_ready(rs_mul_in_rdy),
    .in_op(dec.op), .in_rob(rob_tag), .in_qi(op1.q), .in_qj(op2.q),
    .in_vi(vi), .in_vj(vj), .in_ri(vi_rdy), .in_rj(vj_rdy), .cdb,
    .out_valid(md_rs_v), .out_ready(md_rdy),
    .out_op(md_rs_op), .out_rob(md_rs_rob), .out_vi(md_rs_a), .out_vj(md_rs_b)
  );

  muldiv_unit u_md (
    .clk, .rst, .flush,
    .in_valid(md_rs_v), .in_ready(md_rdy),
    .op(md_rs_op), .in_rob(md_rs_rob), .a(md_rs_a), .b(md_rs_b),
    .out_valid(md_ov), .out_grant(cdb_grant[1]), .out_rob(md_orob), .out_value(md_oval)
  );

  // branch unit
  logic        br_rs_v;
  logic [3:0]  br_rs_op;
  tag_t        br_rs_rob;
  logic [31:0] br_rs_a, br_rs_b, br_res;

  reservation_station #(.DEPTH(RS_DEPTH)) u_rs_br (
    .clk, .rst, .flush,
    .in_valid(iq_read && dec.rs == RS_BR), .in_ready(rs_br_in_rdy),
    .in_op(dec.op), .in_rob(rob_tag), .in_qi(op1.q), .in_qj(op2.q),
    .in_vi(vi), .in_vj(vj), .in_ri(vi_rdy), .in_rj(vj_rdy), .cdb,
    .out_valid(br_rs_v), .out_ready(cdb_grant[3]),
    .out_op(br_rs_op), .out_rob(br_rs_rob), .out_vi(br_rs_a), .out_vj(br_rs_b)
  );

  branch_alu u_bru (.op(br_rs_op), .a(br_rs_a), .b(br_rs_b), .result(br_res));

  // store station: base and data go straight to the CDB
  logic        st_rs_v;
  logic [3:0]  st_rs_op;
  tag_t        st_rs_rob;
  logic [31:0] st_rs_base, st_rs_data;

  reservation_station #(.DEPTH(RS_DEPTH)) u_rs_st (
    .clk, .rst, .flush,
    .in_valid(iq_read && dec.rs == RS_STORE), .in_ready(rs_st_in_rdy),
    .in_op(dec.op), .in_rob(rob_tag), .in_qi(op1.q), .in_qj(op2.q),
    .in_vi(vi), .in_vj(vj), .in_ri(vi_rdy), .in_rj(vj_rdy), .cdb,
    .out_valid(st_rs_v), .out_ready(cdb_grant[4]),
    .out_op(st_rs_op), .out_rob(st_rs_rob), .out_vi(st_rs_base), .out_vj(st_rs_data)
  );

  // load path
  logic        ld_rs_v, lb_in_rdy;
  logic [3:0]  ld_rs_op;
  tag_t        ld_rs_rob;
  logic [31:0] ld_rs_base, ld_rs_off, ld_addr;
  logic        lb_v, mu_ld_rdy, lb_hazard;
  tag_t        lb_rob;
  logic [31:0] lb_addr;
  logic [2:0]  lb_op;
  logic        mu_ov;
  tag_t        mu_orob;
  logic [31:0] mu_oval;

  reservation_station #(.DEPTH(RS_DEPTH)) u_rs_ld (
    .clk, .rst, .flush,
    .in_valid(iq_read && dec.rs == RS_LOAD), .in_ready(rs_ld_in_rdy),
    .in_op(dec.op), .in_rob(rob_tag), .in_qi(op1.q), .in_qj(op2.q),
    .in_vi(vi), .in_vj(vj), .in_ri(vi_rdy), .in_rj(vj_rdy), .cdb,
    .out_valid(ld_rs_v), .out_ready(lb_in_rdy),
    .out_op(ld_rs_op), .out_rob(ld_rs_rob), .out_vi(ld_rs_base), .out_vj(ld_rs_off)
  );

  address_unit u_agu (.base(ld_rs_base), .offset(ld_rs_off), .addr(ld_addr));

  load_buffer #(.DEPTH(LB_DEPTH)) u_lb (
    .clk, .rst, .flush,
    .in_valid(ld_rs_v), .in_ready(lb_in_rdy),
    .in_rob(ld_rs_rob), .in_addr(ld_addr), .in_op(ld_rs_op[2:0]),
    .rob_valid(rob_v_valid), .rob_itype(rob_v_itype), .rob_ready(rob_v_ready),
    .rob_dest(rob_v_dest), .rob_head,
    .out_valid(lb_v), .out_ready(mu_ld_rdy),
    .out_rob(lb_rob), .out_addr(lb_addr), .out_op(lb_op),
    .hazard_stall(lb_hazard)
  );

  memory_unit #(.DEPTH(DMEM_DEPTH)) u_mem (
    .clk, .rst, .flush,
    .st_valid, .st_addr, .st_data, .st_size,
    .ld_valid(lb_v), .ld_ready(mu_ld_rdy),
    .ld_addr(lb_addr), .ld_op(lb_op), .ld_rob(lb_rob),
    .out_valid(mu_ov), .out_rob(mu_orob), .out_value(mu_oval)
  );

  // ---------------------------------------------------------------- common data bus
  always_comb begin
    cdb_req    = {st_rs_v, br_rs_v, alu_ov, md_ov, mu_ov};
    cdb_src[0] = '{valid: 1'b1, rob: mu_orob,   value: mu_oval,    dest: '0};
    cdb_src[1] = '{valid: 1'b1, rob: md_orob,   value: md_oval,    dest: '0};
    cdb_src[2] = '{valid: 1'b1, rob: alu_orob,  value: alu_oval,   dest: '0};
    cdb_src[3] = '{valid: 1'b1, rob: br_rs_rob, value: br_res,     dest: '0};
    cdb_src[4] = '{valid: 1'b1, rob: st_rs_rob, value: st_rs_data, dest: st_rs_base};
  end

  cdb_arbiter #(.N(5)) u_cdb (.req(cdb_req), .src(cdb_src), .grant(cdb_grant), .cdb);

  // ---------------------------------------------------------------- reorder buffer
  reorder_buffer u_rob (
    .clk, .rst,
    .alloc_valid(iq_read), .alloc_ready(rob_alloc_ready), .alloc_tag(rob_tag),
    .alloc_itype(dec.itype), .alloc_dest(dec.rob_dest), .alloc_value(dec.rob_value),
    .alloc_done(dec.rs == RS_NONE),
    .cdb,
    .commit_valid(c_valid), .commit_tag(c_tag), .commit_we(c_we), .commit_rd(c_rd), .commit_data(c_data),
    .st_valid, .st_addr, .st_data, .st_size,
    .bp_upd_valid, .bp_upd_pc, .bp_upd_taken,
    .flush, .redirect_pc,
    .v_valid(rob_v_valid), .v_itype(rob_v_itype), .v_ready(rob_v_ready),
    .v_dest(rob_v_dest), .v_value(rob_v_value), .head(rob_head)
  );

  assign commit_valid = c_valid;
  assign commit_we    = c_we && (c_rd != 5'd0);
  assign commit_rd    = c_rd;
  assign commit_data  = c_data;
  assign commit_store = st_valid;
  assign flush_out    = flush;

  // The memory unit's result is never held, so the CDB must always take it.
  a_mem_always_granted: assert property (@(posedge clk) disable iff (rst) mu_ov |-> cdb_grant[0]);

endmodule
