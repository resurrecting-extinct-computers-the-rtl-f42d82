// cm_identifier -- first half of the router's ejector.
//
// At the start of the delivery phase it picks which buffered messages are
// handed to the cells of this chip. A message is a candidate when its relative
// router address has become zero. Two delivery modes exist:
//   mode_or = 1: every candidate is selected; messages for the same cell are
//                ORed together bit by bit by the distributor.
//   mode_or = 0: for each destination cell only the highest-priority candidate
//                is selected; the others wait for a later petit cycle.
// The selection goes to the distributor and, as the set of messages to delete,
// to the priority calculator. Purely combinational (a comparator per pair of
// buffers). The two modes follow the router description; which input selects
// them is this design's choice.
module cm_identifier
  import cm_pkg::*;
#(
  parameter int unsigned NBUF = BUFSIZE
) (
  input  logic                        mode_or,
  input  logic [NBUF-1:0]             valid,
  input  logic [NBUF-1:0]             at_dest,   // router address is zero
  input  logic [NBUF-1:0][CELL_W-1:0] dst_cell,      // destination cell
  input  logic [NBUF-1:0][PRIO_W-1:0] prio,
  output logic [NBUF-1:0]             sel
);
  logic [NBUF-1:0] cand;
  always_comb begin
    cand = valid & at_dest;
    for (int i = 0; i < NBUF; i++) begin
      sel[i] = cand[i];
      if (!mode_or)
        for (int j = 0; j < NBUF; j++)
          if (j != i && cand[j] && dst_cell[j] == dst_cell[i] &&
              (prio[j] > prio[i] || (prio[j] == prio[i] && j < i)))
            sel[i] = 1'b0;
    end
  end
endmodule
