// tb_instruction_queue: random pushes and pops against a queue model; checks
// order, ready_out going low at exactly 16 entries, inst_available_out, and
// that flush empties the queue.
module tb_instruction_queue;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic valid_in, ready_out, inst_available_out, instruction_read_in;
  logic [31:0] instruction_in, instruction_out;
  instruction_queue #(.DEPTH(16), .WIDTH(32)) dut (.*);
  logic [31:0] model [$];
  int n_full = 0;
  initial begin
    rst = 1; flush = 0; valid_in = 0; instruction_read_in = 0; instruction_in = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      bit push_p, pop_p;
      @(negedge clk);
      check(ready_out == (model.size() < 16), $sformatf("ready_out with %0d entries", model.size()));
      check(inst_available_out == (model.size() > 0), "inst_available_out");
      if (model.size() > 0) check(instruction_out == model[0], "head value");
      if (model.size() == 16) n_full++;
      push_p = (n % 400 < 200) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop_p  = (n % 400 < 200) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      valid_in = push_p; instruction_in = $urandom; instruction_read_in = pop_p;
      flush = (n % 400 == 150);
      #1;
      if (flush) begin check(model.size() > 0, "flush of a non-empty queue"); model.delete(); end
      else begin
        automatic bit acc = push_p && model.size() < 16;
        if (pop_p && model.size() > 0) void'(model.pop_front());
        if (acc) model.push_back(instruction_in);
      end
    end
    check(n_full > 0, "queue reached 16 entries");
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
