// load_buffer: loads whose address is known wait here until no older store
// could write the same memory word.
//
// For every load the buffer checks every in-flight reorder-buffer entry. A load
// must wait (a read-after-write memory hazard) while some store is older than
// it in program order and that store's address is either still unknown or
// equal to the load's address. "Older" is measured as distance from the ROB
// head. These two conditions are those of the source design; comparing word
// addresses (so any overlap within a word counts as a hazard) is this design's
// choice. Any hazard-free load may go to the memory unit, lowest row first, so
// loads can issue out of order.
//
// Interface: in_* from the load reservation station through the address unit;
// rob_* is the reorder buffer's view of its rows; out_* to the memory unit
// (handshake out_valid/out_ready). Timing: a load written in cycle t can issue
// in cycle t+1. flush and reset empty the buffer.
module load_buffer
  import riscalar_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        in_valid,
  output logic        in_ready,
  input  tag_t        in_rob,
  input  logic [31:0] in_addr,
  input  logic [2:0]  in_op,
  input  logic        rob_valid [ROB_DEPTH],
  input  logic [3:0]  rob_itype [ROB_DEPTH],
  input  logic        rob_ready [ROB_DEPTH],
  input  logic [31:0] rob_dest  [ROB_DEPTH],
  input  tag_t        rob_head,
  output logic        out_valid,
  input  logic        out_ready,
  output tag_t        out_rob,
  output logic [31:0] out_addr,
  output logic [2:0]  out_op,
  output logic        hazard_stall     // some waiting load is blocked by a store
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  typedef struct packed {
    logic        valid;
    tag_t        rob;
    logic [31:0] addr;
    logic [2:0]  op;
  } lb_row_t;

  lb_row_t rows [DEPTH];

  logic          hazard [DEPTH];
  logic [IW-1:0] free_idx, iss_idx;
  logic          any_free, any_ok;

  function automatic logic is_store(input logic [3:0] it);
    return it == IT_SB || it == IT_SH || it == IT_SW;
  endfunction

  always_comb begin
    hazard_stall = 1'b0;
    for (int k = 0; k < DEPTH; k++) begin
      hazard[k] = 1'b0;
      for (int e = 0; e < ROB_DEPTH; e++) begin
        if (rob_valid[e] && is_store(rob_itype[e]) &&
            tag_t'(tag_t'(e) - rob_head) < tag_t'(rows[k].rob - rob_head) &&
            (!rob_ready[e] || rob_dest[e][31:2] == rows[k].addr[31:2]))
          hazard[k] = 1'b1;
      end
      if (rows[k].valid && hazard[k]) hazard_stall = 1'b1;
    end
    any_free = 1'b0;
    free_idx = '0;
    any_ok   = 1'b0;
    iss_idx  = '0;
    for (int k = DEPTH - 1; k >= 0; k--) begin
      if (!rows[k].valid) begin
        any_free = 1'b1;
        free_idx = IW'(k);
      end
      if (rows[k].valid && !hazard[k]) begin
        any_ok  = 1'b1;
        iss_idx = IW'(k);
      end
    end
  end

  assign in_ready  = any_free;
  assign out_valid = any_ok;
  assign out_rob   = rows[iss_idx].rob;
  assign out_addr  = rows[iss_idx].addr;
  assign out_op    = rows[iss_idx].op;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      for (int k = 0; k < DEPTH; k++) rows[k] <= '0;
    end else begin
      if (out_valid && out_ready) rows[iss_idx].valid <= 1'b0;
      if (in_valid && in_ready) rows[free_idx] <= '{valid: 1'b1, rob: in_rob, addr: in_addr, op: in_op};
    end
  end

endmodule
