// instruction_queue: circular FIFO between instruction fetch and dispatch.
//
// Fetch pushes with valid_in while ready_out says there is room; dispatch sees
// inst_available_out with the oldest entry on instruction_out and pops it with
// instruction_read_in. A push and a pop may happen in the same cycle. flush
// empties the queue (used when a mispredicted branch commits). The port names
// and the default depth of 16 follow the source design; the entry width is a
// parameter so the core can store the PC and the branch prediction beside the
// instruction. The same structure serves any other small queue.
//
// Timing: an entry pushed in cycle t is visible on instruction_out in cycle t+1.
module instruction_queue #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             flush,
  input  logic             valid_in,
  output logic             ready_out,
  input  logic [WIDTH-1:0] instruction_in,
  output logic             inst_available_out,
  input  logic             instruction_read_in,
  output logic [WIDTH-1:0] instruction_out
);

  localparam int unsigned PW = $clog2(DEPTH);

  logic [WIDTH-1:0] q [DEPTH];
  logic [PW-1:0]    head, tail;
  logic [PW:0]      count;
  logic             push, pop;

  assign ready_out          = (count != DEPTH[PW:0]);
  assign inst_available_out = (count != '0);
  assign instruction_out    = q[head];
  assign push = valid_in && ready_out;
  assign pop  = instruction_read_in && inst_available_out;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (push) begin
        q[tail] <= instruction_in;
        tail    <= (tail == PW'(DEPTH - 1)) ? '0 : tail + 1'b1;
      end
      if (pop) head <= (head == PW'(DEPTH - 1)) ? '0 : head + 1'b1;
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (rst) count <= (PW+1)'(DEPTH));

endmodule
