// register_file: 32 x 32 architectural registers with a rename tag per register.
//
// Besides its value, each register records whether an instruction still in the
// reorder buffer will write it (busy) and which ROB entry that is (tag). Reads
// are combinational and return value, busy and tag; dispatch uses them to decide
// whether an operand is known or must be awaited on the common data bus.
// Dispatch sets a register's tag (rename_*); commit writes the value and clears
// busy only if the tag still names the committing entry, so a younger writer
// keeps the register. flush clears every busy flag (all speculative work is
// discarded). x0 is never written and never busy.
//
// Timing: writes and tag updates take effect at the next clock edge. Registers
// reset to zero. Combinational reads and single-cycle writes follow the source
// design; the tag bookkeeping details are this design's.
module register_file
  import riscalar_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic [4:0]  rs1,
  input  logic [4:0]  rs2,
  output logic [31:0] rd1,
  output logic [31:0] rd2,
  output logic        busy1,
  output logic        busy2,
  output tag_t        tag1,
  output tag_t        tag2,
  input  logic        rename_en,
  input  logic [4:0]  rename_rd,
  input  tag_t        rename_tag,
  input  logic        commit_en,
  input  logic [4:0]  commit_rd,
  input  tag_t        commit_tag,
  input  logic [31:0] commit_data,
  input  logic [4:0]  dbg_addr,
  output logic [31:0] dbg_data
);

  logic [31:0] regs [32];
  logic        busy [32];
  tag_t        tags [32];

  assign rd1      = regs[rs1];
  assign rd2      = regs[rs2];
  assign busy1    = busy[rs1];
  assign busy2    = busy[rs2];
  assign tag1     = tags[rs1];
  assign tag2     = tags[rs2];
  assign dbg_data = regs[dbg_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) begin
        regs[i] <= '0;
        busy[i] <= 1'b0;
        tags[i] <= '0;
      end
    end else begin
      if (commit_en && commit_rd != 5'd0) begin
        regs[commit_rd] <= commit_data;
        if (tags[commit_rd] == commit_tag) busy[commit_rd] <= 1'b0;
      end
      if (rename_en && rename_rd != 5'd0) begin
        busy[rename_rd] <= 1'b1;
        tags[rename_rd] <= rename_tag;
      end
      if (flush)
        for (int i = 0; i < 32; i++) busy[i] <= 1'b0;
    end
  end

endmodule
