// reservation_station: holds dispatched instructions until their operands are
// known and their functional unit can take them.
//
// Each row has the nine fields of the source design: OP (4 bits), the ROB entry
// number of the instruction, Qi and Qj (ROB entries that will produce missing
// operands), Vi and Vj (operand values), the operand-ready bits i and j, and the
// busy bit B: 4+3+3+3+32+32+1+1+1 = 80 bits. Every cycle each busy row compares
// its Qi/Qj with the ROB entry number on the common data bus and captures the
// value when they match. A row whose operands are both ready can issue; among
// several, the lowest-numbered row goes first (the choice of order is this
// design's). Dispatch writes the lowest free row.
//
// Interface: in_valid/in_ready dispatch handshake; out_valid/out_ready issue
// handshake (issue happens when both are high). Timing: a row written in cycle t
// can issue in cycle t+1; a value broadcast in cycle t lets the row issue in
// t+1. flush and reset empty the station.
module reservation_station
  import riscalar_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [3:0]  in_op,
  input  tag_t        in_rob,
  input  tag_t        in_qi,
  input  tag_t        in_qj,
  input  logic [31:0] in_vi,
  input  logic [31:0] in_vj,
  input  logic        in_ri,
  input  logic        in_rj,
  input  cdb_t        cdb,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [3:0]  out_op,
  output tag_t        out_rob,
  output logic [31:0] out_vi,
  output logic [31:0] out_vj
);

  localparam int unsigned IW = $clog2(DEPTH);

  typedef struct packed {
    logic [3:0]  op;
    tag_t        rob;
    tag_t        qi;
    tag_t        qj;
    logic [31:0] vi;
    logic [31:0] vj;
    logic        ri;
    logic        rj;
    logic        busy;
  } row_t;

  row_t rows [DEPTH];

  logic [IW-1:0] free_idx, iss_idx;
  logic          any_free, any_ready;

  always_comb begin
    any_free  = 1'b0;
    free_idx  = '0;
    any_ready = 1'b0;
    iss_idx   = '0;
    for (int k = DEPTH - 1; k >= 0; k--) begin
      if (!rows[k].busy) begin
        any_free = 1'b1;
        free_idx = IW'(k);
      end
      if (rows[k].busy && rows[k].ri && rows[k].rj) begin
        any_ready = 1'b1;
        iss_idx   = IW'(k);
      end
    end
  end

  assign in_ready  = any_free;
  assign out_valid = any_ready;
  assign out_op    = rows[iss_idx].op;
  assign out_rob   = rows[iss_idx].rob;
  assign out_vi    = rows[iss_idx].vi;
  assign out_vj    = rows[iss_idx].vj;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      for (int k = 0; k < DEPTH; k++) rows[k] <= '0;
    end else begin
      for (int k = 0; k < DEPTH; k++) begin
        if (rows[k].busy && cdb.valid) begin
          if (!rows[k].ri && rows[k].qi == cdb.rob) begin
            rows[k].vi <= cdb.value;
            rows[k].ri <= 1'b1;
            rows[k].qi <= '0;
          end
          if (!rows[k].rj && rows[k].qj == cdb.rob) begin
            rows[k].vj <= cdb.value;
            rows[k].rj <= 1'b1;
            rows[k].qj <= '0;
          end
        end
      end
      if (out_valid && out_ready) rows[iss_idx].busy <= 1'b0;
      if (in_valid && in_ready) begin
        rows[free_idx].op   <= in_op;
        rows[free_idx].rob  <= in_rob;
        rows[free_idx].qi   <= in_ri ? '0 : in_qi;
        rows[free_idx].qj   <= in_rj ? '0 : in_qj;
        rows[free_idx].vi   <= in_ri ? in_vi : '0;
        rows[free_idx].vj   <= in_rj ? in_vj : '0;
        rows[free_idx].ri   <= in_ri;
        rows[free_idx].rj   <= in_rj;
        rows[free_idx].busy <= 1'b1;
      end
    end
  end

endmodule
