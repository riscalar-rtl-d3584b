// bram: single-port, write-first block RAM with a two-cycle access.
//
// Used for both the instruction memory and the data memory of the core. The
// request (address, byte write enables, write data) is registered on the first
// clock edge; on the second edge the RAM row is written and the read data
// register is loaded. Write-first: a write returns the merged new row, so a load
// issued after a store to the same word reads the stored value.
//
// Timing: request presented in cycle t, dout valid from cycle t+2 and held
// until the next access completes. The two-cycle latency, single port and
// write-first behaviour follow the source design; byte write enables are this
// design's addition so that byte and halfword stores work.
module bram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned NB = WIDTH / 8
) (
  input  logic             clk,
  input  logic             en,
  input  logic [NB-1:0]    we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];

  logic             en_q;
  logic [NB-1:0]    we_q;
  logic [AW-1:0]    addr_q;
  logic [WIDTH-1:0] din_q;
  logic [WIDTH-1:0] merged;

  always_ff @(posedge clk) begin
    en_q   <= en;
    we_q   <= we;
    addr_q <= addr;
    din_q  <= din;
  end

  always_comb begin
    merged = mem[addr_q];
    for (int b = 0; b < NB; b++)
      if (we_q[b]) merged[8*b +: 8] = din_q[8*b +: 8];
  end

  always_ff @(posedge clk) begin
    if (en_q) begin
      if (|we_q) mem[addr_q] <= merged;
      dout <= merged;
    end
  end

endmodule
