// cdb_arbiter: fixed-priority selector for the common data bus.
//
// Each result source raises req[k] with its candidate bus word src[k]; the
// lowest-numbered requester gets grant[k] and its word is driven on the bus
// with valid set. All other requesters keep their result and try again next
// cycle. The core orders the sources memory unit, multiply/divide, ALU, branch
// unit, store station; the ALU-before-branch-unit rule is the source design's,
// the rest of the order is this design's choice. Combinational.
module cdb_arbiter
  import riscalar_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] req,
  input  cdb_t         src [N],
  output logic [N-1:0] grant,
  output cdb_t         cdb
);

  always_comb begin
    grant = '0;
    cdb   = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[k]) begin
        grant      = N'(1) << k;
        cdb        = src[k];
        cdb.valid  = 1'b1;
      end
    end
  end

endmodule
