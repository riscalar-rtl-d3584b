// reorder_buffer: circular buffer that lets instructions finish out of order
// but change architectural state strictly in program order.
//
// Each row holds the four fields of the source design: instruction type (4),
// value (32), destination (32) and ready (1), 69 bits. Rows are allocated at
// dispatch at the tail and retired from the head, one per cycle, once ready.
// How the fields are used depends on the type:
//   IT_REG    dest = rd; value = result from the common data bus (CDB).
//   IT_SB/SH/SW  dest = store offset at dispatch; when the store station puts
//             base register (on the CDB destination field) and data (value
//             field) on the bus, the row adds base to offset and keeps the
//             address in dest and the data in value. The store goes to memory
//             only at commit.
//   IT_BRANCH dest = alternate PC; value = {PC[31:2], taken, mispredict}: at
//             dispatch bit 0 holds the prediction, and the branch result from
//             the CDB turns it into "prediction was wrong" and sets bit 1.
//   IT_JALR   dest = {PC+4[26:0], rd}; value = jump target from the CDB.
//   IT_NOP    allocated already ready, retires with no effect.
// At commit a register write, a store, or a predictor update is produced. A
// mispredicted branch or a jalr at the head also raises flush with the correct
// PC: the whole buffer empties and every other unit discards its work, so the
// wrong-path instructions never change state. Keeping the branch PC in the
// value field and the jalr packing are this design's choices; the rest follows
// the source design.
//
// The buffer also exports every row (valid, type, ready, dest, value) and the
// head pointer, used by the load buffer's hazard check and by dispatch to read
// operands that are computed but not yet committed.
//
// Timing: a row allocated in cycle t can commit at the earliest in cycle t+1;
// a CDB write in cycle t makes the row committable in t+1.
module reorder_buffer
  import riscalar_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // dispatch
  input  logic        alloc_valid,
  output logic        alloc_ready,
  output tag_t        alloc_tag,
  input  logic [3:0]  alloc_itype,
  input  logic [31:0] alloc_dest,
  input  logic [31:0] alloc_value,
  input  logic        alloc_done,
  // results
  input  cdb_t        cdb,
  // commit
  output logic        commit_valid,
  output tag_t        commit_tag,
  output logic        commit_we,
  output logic [4:0]  commit_rd,
  output logic [31:0] commit_data,
  output logic        st_valid,
  output logic [31:0] st_addr,
  output logic [31:0] st_data,
  output logic [1:0]  st_size,
  output logic        bp_upd_valid,
  output logic [31:0] bp_upd_pc,
  output logic        bp_upd_taken,
  output logic        flush,
  output logic [31:0] redirect_pc,
  // view of every row
  output logic        v_valid [ROB_DEPTH],
  output logic [3:0]  v_itype [ROB_DEPTH],
  output logic        v_ready [ROB_DEPTH],
  output logic [31:0] v_dest  [ROB_DEPTH],
  output logic [31:0] v_value [ROB_DEPTH],
  output tag_t        head
);

  typedef struct packed {
    logic [3:0]  itype;
    logic [31:0] value;
    logic [31:0] dest;
    logic        ready;
  } rob_row_t;

  rob_row_t    rows  [ROB_DEPTH];
  logic        valid [ROB_DEPTH];
  tag_t        tail;
  logic [TAG_W:0] count;

  rob_row_t h;
  logic     is_st;

  assign h           = rows[head];
  assign alloc_ready = (count != ROB_DEPTH[TAG_W:0]);
  assign alloc_tag   = tail;
  assign commit_valid = (count != '0) && h.ready;
  assign commit_tag   = head;
  assign is_st        = (h.itype == IT_SB) || (h.itype == IT_SH) || (h.itype == IT_SW);

  always_comb begin
    commit_we    = commit_valid && (h.itype == IT_REG || h.itype == IT_JALR);
    commit_rd    = h.dest[4:0];
    commit_data  = (h.itype == IT_JALR) ? {5'b0, h.dest[31:5]} : h.value;
    st_valid     = commit_valid && is_st;
    st_addr      = h.dest;
    st_data      = h.value;
    st_size      = h.itype[1:0];
    bp_upd_valid = commit_valid && (h.itype == IT_BRANCH);
    bp_upd_pc    = {h.value[31:2], 2'b00};
    bp_upd_taken = h.value[1];
    flush        = commit_valid && ((h.itype == IT_BRANCH && h.value[0]) || h.itype == IT_JALR);
    redirect_pc  = (h.itype == IT_JALR) ? h.value : h.dest;
  end

  always_comb begin
    for (int e = 0; e < ROB_DEPTH; e++) begin
      v_valid[e] = valid[e];
      v_itype[e] = rows[e].itype;
      v_ready[e] = rows[e].ready;
      v_dest[e]  = rows[e].dest;
      v_value[e] = rows[e].value;
    end
  end

  logic do_alloc;
  assign do_alloc = alloc_valid && alloc_ready;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      for (int e = 0; e < ROB_DEPTH; e++) begin
        rows[e]  <= '0;
        valid[e] <= 1'b0;
      end
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      // results from the common data bus
      if (cdb.valid && valid[cdb.rob]) begin
        unique case (rows[cdb.rob].itype)
          IT_BRANCH: begin
            rows[cdb.rob].value[1] <= cdb.value[0];
            rows[cdb.rob].value[0] <= rows[cdb.rob].value[0] ^ cdb.value[0];
          end
          IT_SB, IT_SH, IT_SW: begin
            rows[cdb.rob].dest  <= rows[cdb.rob].dest + cdb.dest;
            rows[cdb.rob].value <= cdb.value;
          end
          default: rows[cdb.rob].value <= cdb.value;
        endcase
        rows[cdb.rob].ready <= 1'b1;
      end
      if (commit_valid) begin
        valid[head] <= 1'b0;
        head        <= head + 1'b1;
      end
      if (do_alloc) begin
        rows[tail]  <= '{itype: alloc_itype, value: alloc_value, dest: alloc_dest, ready: alloc_done};
        valid[tail] <= 1'b1;
        tail        <= tail + 1'b1;
      end
      count <= count + (TAG_W+1)'(do_alloc) - (TAG_W+1)'(commit_valid);
    end
  end

  a_commit_in_order: assert property (@(posedge clk) disable iff (rst)
    commit_valid |-> valid[head]);

endmodule
