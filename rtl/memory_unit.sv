// memory_unit: the data-memory functional unit.
//
// Wraps the two-cycle, write-first data BRAM. It takes loads from the load
// buffer and committed stores from the reorder buffer; when both arrive in the
// same cycle the store goes first (ld_ready is low), as in the source design,
// because a store finishes in one cycle and lets the ROB keep committing.
// Stores write bytes, halfwords or words with byte enables; loads return the
// addressed byte or halfword sign- or zero-extended per funct3.
//
// Timing: a load accepted in cycle t presents its result (out_valid, out_rob,
// out_value) in cycle t+2 for exactly one cycle, so the common data bus must
// always grant it (it has the highest priority in the core). A store accepted
// in cycle t is written at the second clock edge; a later load reads it.
// flush drops loads in flight.
module memory_unit
  import riscalar_pkg::*;
#(
  parameter int unsigned DEPTH = 2048
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        st_valid,
  input  logic [31:0] st_addr,
  input  logic [31:0] st_data,
  input  logic [1:0]  st_size,   // 00 byte, 01 half, 10 word
  input  logic        ld_valid,
  output logic        ld_ready,
  input  logic [31:0] ld_addr,
  input  logic [2:0]  ld_op,
  input  tag_t        ld_rob,
  output logic        out_valid,
  output tag_t        out_rob,
  output logic [31:0] out_value
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic          en;
  logic [3:0]    we;
  logic [AW-1:0] addr;
  logic [31:0]   wdata, rdata;

  typedef struct packed {
    logic       valid;
    tag_t       rob;
    logic [2:0] op;
    logic [1:0] off;
  } ld_stage_t;

  ld_stage_t s1, s2;

  assign ld_ready = !st_valid;

  always_comb begin
    en    = st_valid || ld_valid;
    we    = '0;
    wdata = st_data;
    addr  = st_valid ? st_addr[2 +: AW] : ld_addr[2 +: AW];
    if (st_valid) begin
      unique case (st_size)
        2'b00:   begin we = 4'b0001 << st_addr[1:0];          wdata = {4{st_data[7:0]}};  end
        2'b01:   begin we = 4'b0011 << {st_addr[1], 1'b0};    wdata = {2{st_data[15:0]}}; end
        default: begin we = 4'b1111; end
      endcase
    end
  end

  bram #(.DEPTH(DEPTH), .WIDTH(32)) u_dmem (
    .clk, .en, .we, .addr, .din(wdata), .dout(rdata)
  );

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= '{valid: ld_valid && ld_ready, rob: ld_rob, op: ld_op, off: ld_addr[1:0]};
      s2 <= s1;
    end
  end

  logic [7:0]  byte_v;
  logic [15:0] half_v;
  always_comb begin
    byte_v = rdata[8*s2.off +: 8];
    half_v = s2.off[1] ? rdata[31:16] : rdata[15:0];
    unique case (s2.op)
      3'b000:  out_value = {{24{byte_v[7]}}, byte_v};
      3'b001:  out_value = {{16{half_v[15]}}, half_v};
      3'b100:  out_value = {24'b0, byte_v};
      3'b101:  out_value = {16'b0, half_v};
      default: out_value = rdata;
    endcase
  end

  assign out_valid = s2.valid;
  assign out_rob   = s2.rob;

endmodule
