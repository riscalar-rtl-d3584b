// tb_branch_predictor: drives the tournament predictor with branch outcome
// streams and compares every prediction with a separately written model of
// the tables (64 x 6 local histories, 64 x 2 local counters, 256 x 2 global and
// choice counters, 8-bit path history). Also checks learned behaviour: an
// always-taken branch becomes predicted taken, and an alternating branch is
// predicted perfectly once its local history has trained.
module tb_branch_predictor;
  `include "tb_check.svh"
  logic clk = 0, rst;
  always #5 clk = ~clk;
  logic [31:0] pred_pc, upd_pc;
  logic pred_taken, upd_valid, upd_taken;
  branch_predictor dut (.*);

  int m_lht [64]; int m_lpt [64]; int m_gpt [256]; int m_cpt [256]; int m_ph;

  function automatic bit m_pred(input logic [31:0] pc);
    int lh = m_lht[pc[7:2]];
    bit l = m_lpt[lh] >= 2, g = m_gpt[m_ph] >= 2;
    return (m_cpt[m_ph] >= 2) ? g : l;
  endfunction
  function automatic int bump(input int c, input bit up);
    return up ? ((c < 3) ? c + 1 : 3) : ((c > 0) ? c - 1 : 0);
  endfunction
  task automatic m_update(input logic [31:0] pc, input bit t);
    int i = pc[7:2];
    int lh = m_lht[i];
    bit l = m_lpt[lh] >= 2, g = m_gpt[m_ph] >= 2;
    m_lpt[lh] = bump(m_lpt[lh], t);
    if (l != g) m_cpt[m_ph] = bump(m_cpt[m_ph], g == t);
    m_gpt[m_ph] = bump(m_gpt[m_ph], t);
    m_lht[i] = ((lh << 1) | t) & 63;
    m_ph = ((m_ph << 1) | t) & 255;
  endtask

  task automatic step(input logic [31:0] pc, input bit t, output bit p);
    @(negedge clk);
    pred_pc = pc;
    #1;
    p = pred_taken;
    check(pred_taken == m_pred(pc), $sformatf("pc %h predicted %0b model %0b", pc, pred_taken, m_pred(pc)));
    upd_valid = 1; upd_pc = pc; upd_taken = t;
    @(negedge clk);
    upd_valid = 0;
    m_update(pc, t);
  endtask

  initial begin
    bit p;
    int correct;
    rst = 1; upd_valid = 0; pred_pc = 0; upd_pc = 0; upd_taken = 0;
    foreach (m_lht[i]) m_lht[i] = 0;
    foreach (m_lpt[i]) m_lpt[i] = 1;
    foreach (m_gpt[i]) begin m_gpt[i] = 1; m_cpt[i] = 1; end
    m_ph = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 10; i++) step(32'h100, 1'b1, p);
    check(p == 1'b1, "always-taken branch learned");
    for (int i = 0; i < 40; i++) step(32'h204, i % 2 == 0, p);
    correct = 0;
    for (int i = 0; i < 20; i++) begin step(32'h204, i % 2 == 0, p); correct += (p == (i % 2 == 0)); end
    check(correct == 20, $sformatf("alternating branch: %0d of 20 correct", correct));
    for (int i = 0; i < 600; i++) begin
      automatic logic [31:0] pc = {22'b0, 8'($urandom_range(0, 255)), 2'b00};
      step(pc, ($urandom_range(0, 3) != 0) ^ pc[4], p);
    end
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
