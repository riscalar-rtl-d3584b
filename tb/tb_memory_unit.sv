// tb_memory_unit: random byte/halfword/word stores and signed/unsigned loads
// against a byte-array model. Checks the two-cycle load latency, that a store
// presented with a load wins (ld_ready low), that a load issued right after a
// store to the same word sees the new data, and that flush drops a load in
// flight.
module tb_memory_unit;
  import riscalar_pkg::*;
  `include "tb_check.svh"
  logic clk = 0, rst, flush;
  always #5 clk = ~clk;
  logic st_valid, ld_valid, ld_ready, out_valid;
  logic [31:0] st_addr, st_data, ld_addr, out_value;
  logic [1:0] st_size; logic [2:0] ld_op; tag_t ld_rob, out_rob;
  memory_unit #(.DEPTH(2048)) dut (.*);
  logic [7:0] mem [256];
  typedef struct { tag_t rob; logic [31:0] val; int due; } pend_t;
  pend_t q [$];
  int cyc = 0, n_prio = 0, n_loads = 0;
  function automatic logic [31:0] ref_ld(input logic [31:0] ad, input logic [2:0] o);
    logic [7:0] b0 = mem[ad[7:0]];
    logic [15:0] h = {mem[{ad[7:1], 1'b1}], mem[{ad[7:1], 1'b0}]};
    case (o)
      0: return {{24{b0[7]}}, b0};
      1: return {{16{h[15]}}, h};
      4: return {24'b0, b0};
      5: return {16'b0, h};
      default: return {mem[{ad[7:2], 2'd3}], mem[{ad[7:2], 2'd2}], mem[{ad[7:2], 2'd1}], mem[{ad[7:2], 2'd0}]};
    endcase
  endfunction
  initial begin
    rst = 1; flush = 0; st_valid = 0; ld_valid = 0; st_addr = 0; st_data = 0; st_size = 0; ld_addr = 0; ld_op = 0; ld_rob = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 64; i++) begin   // initialise
      @(negedge clk); st_valid = 1; st_addr = 32'(i * 4); st_size = 2; st_data = $urandom;
      {mem[i*4+3], mem[i*4+2], mem[i*4+1], mem[i*4]} = st_data;
    end
    @(negedge clk); st_valid = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      cyc++;
      if (q.size() > 0 && q[0].due == cyc) begin
        check(out_valid && out_rob == q[0].rob && out_value == q[0].val,
              $sformatf("load rob %0d got %0b/%h exp %h", q[0].rob, out_valid, out_value, q[0].val));
        void'(q.pop_front());
      end else check(!out_valid, "no unexpected load result");
      st_valid = $urandom_range(0, 3) == 0; ld_valid = $urandom_range(0, 1);
      st_size = 2'($urandom_range(0, 2)); st_data = $urandom;
      st_addr = {24'b0, 8'($urandom)} & ~(st_size == 2 ? 32'd3 : st_size == 1 ? 32'd1 : 32'd0);
      ld_op = 3'($urandom_range(0, 5)); if (ld_op == 3) ld_op = 2;
      ld_addr = {24'b0, 8'($urandom)} & ~((ld_op[1:0] == 2) ? 32'd3 : (ld_op[1:0] == 1) ? 32'd1 : 32'd0);
      if (n % 5 == 0) ld_addr = st_addr & ~32'd3 | (ld_addr & 32'd3);
      ld_rob = tag_t'(n);
      flush = (n % 500 == 250) && q.size() > 0;
      #1;
      if (st_valid && ld_valid) begin check(!ld_ready, "store has priority"); n_prio++; end
      if (st_valid) begin
        if (st_size == 0) mem[st_addr[7:0]] = st_data[7:0];
        else if (st_size == 1) {mem[st_addr[7:0] + 1], mem[st_addr[7:0]]} = st_data[15:0];
        else {mem[st_addr[7:0] + 3], mem[st_addr[7:0] + 2], mem[st_addr[7:0] + 1], mem[st_addr[7:0]]} = st_data;
      end
      if (flush) q.delete();
      else if (ld_valid && ld_ready) begin
        q.push_back('{rob: ld_rob, val: ref_ld(ld_addr, ld_op), due: cyc + 2});
        n_loads++;
      end
    end
    check(n_prio > 0 && n_loads > 500, "coverage");
    finish();
  end
  initial begin repeat (100000) @(posedge clk); failures++; finish(); end
endmodule
