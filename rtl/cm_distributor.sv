// cm_distributor -- second half of the router's ejector.
//
// Each clock of the delivery phase it places one bit of every selected message
// on the delivery line of that message's destination cell: the bit is ANDed
// with the buffer's selection bit, a barrel shifter moves it to line number
// `cell`, and the shifted vectors of all buffers are ORed into the 16 lines.
// Two selected messages for the same cell therefore OR together. This is the
// structure given in the router description. Purely combinational.
module cm_distributor
  import cm_pkg::*;
#(
  parameter int unsigned NBUF  = BUFSIZE,
  parameter int unsigned LINES = NCELLS
) (
  input  logic [NBUF-1:0]             sel,
  input  logic [NBUF-1:0]             bits,
  input  logic [NBUF-1:0][CELL_W-1:0] dst_cell,
  output logic [LINES-1:0]            lines
);
  always_comb begin
    lines = '0;
    for (int i = 0; i < NBUF; i++)
      lines |= LINES'(sel[i] & bits[i]) << dst_cell[i];
  end
endmodule
