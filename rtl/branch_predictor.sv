// branch_predictor: tournament predictor modelled on the Alpha 21264 scheme.
//
// Two component predictors and a chooser:
//   * local:  a 64 x 6 local history table indexed by PC[7:2]; the 6-bit history
//             indexes a 64 x 2 table of saturating counters;
//   * global: an 8-bit path history of the most recent branch outcomes indexes a
//             256 x 2 table of saturating counters;
//   * choice: a 256 x 2 table, indexed by the same path history, whose counter
//             MSB selects the global (1) or the local (0) prediction.
// Table sizes are those of the source design. How the tables are trained is
// this design's choice: all of them are updated when a branch commits, so the
// histories hold committed outcomes only; the chooser moves toward whichever
// component was right when the two disagreed.
//
// Interface: pred_pc -> pred_taken is combinational. An update (upd_valid,
// upd_pc, upd_taken) is applied on the next clock edge. Synchronous reset puts
// every counter at weakly-not-taken / weakly-local and clears the histories.
module branch_predictor #(
  parameter int unsigned LHT_ENTRIES = 64,
  parameter int unsigned LHIST_BITS  = 6,
  parameter int unsigned GHIST_BITS  = 8,
  parameter int unsigned CTR_BITS    = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] pred_pc,
  output logic        pred_taken,
  input  logic        upd_valid,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken
);

  localparam int unsigned LIDX_W = $clog2(LHT_ENTRIES);
  localparam int unsigned LPT_N  = 2 ** LHIST_BITS;
  localparam int unsigned GPT_N  = 2 ** GHIST_BITS;
  localparam logic [CTR_BITS-1:0] CTR_MAX  = '1;
  localparam logic [CTR_BITS-1:0] CTR_INIT = CTR_BITS'(2 ** (CTR_BITS - 1) - 1);

  typedef logic [CTR_BITS-1:0] ctr_t;

  logic [LHIST_BITS-1:0] lht [LHT_ENTRIES];
  ctr_t                  lpt [LPT_N];
  ctr_t                  gpt [GPT_N];
  ctr_t                  cpt [GPT_N];
  logic [GHIST_BITS-1:0] path_hist;

  function automatic ctr_t sat(input ctr_t c, input logic up);
    if (up) return (c == CTR_MAX) ? c : c + 1'b1;
    else    return (c == '0)      ? c : c - 1'b1;
  endfunction

  // Prediction.
  logic [LHIST_BITS-1:0] p_lh;
  logic p_local, p_global, p_choice;
  always_comb begin
    p_lh       = lht[pred_pc[2 +: LIDX_W]];
    p_local    = lpt[p_lh][CTR_BITS-1];
    p_global   = gpt[path_hist][CTR_BITS-1];
    p_choice   = cpt[path_hist][CTR_BITS-1];
    pred_taken = p_choice ? p_global : p_local;
  end

  // Training at commit.
  logic [LIDX_W-1:0]     u_idx;
  logic [LHIST_BITS-1:0] u_lh;
  logic u_local, u_global;
  always_comb begin
    u_idx    = upd_pc[2 +: LIDX_W];
    u_lh     = lht[u_idx];
    u_local  = lpt[u_lh][CTR_BITS-1];
    u_global = gpt[path_hist][CTR_BITS-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LHT_ENTRIES; i++) lht[i] <= '0;
      for (int i = 0; i < LPT_N; i++)       lpt[i] <= CTR_INIT;
      for (int i = 0; i < GPT_N; i++) begin
        gpt[i] <= CTR_INIT;
        cpt[i] <= CTR_INIT;
      end
      path_hist <= '0;
    end else if (upd_valid) begin
      lpt[u_lh]      <= sat(lpt[u_lh], upd_taken);
      gpt[path_hist] <= sat(gpt[path_hist], upd_taken);
      if (u_local != u_global)
        cpt[path_hist] <= sat(cpt[path_hist], u_global == upd_taken);
      lht[u_idx] <= {u_lh[LHIST_BITS-2:0], upd_taken};
      path_hist  <= {path_hist[GHIST_BITS-2:0], upd_taken};
    end
  end

endmodule
