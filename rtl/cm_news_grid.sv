// cm_news_grid -- the on-chip North/East/South/West neighbour grid.
//
// The 16 cells of a chip form a 4 x 4 grid, cell number = 4*row + column, row 0
// at the north edge and column 0 at the west edge. When an instruction writes
// the NEWS flag, each cell's flag result is sent to its neighbour in the
// instruction's 2-bit direction (0 north, 1 east, 2 south, 3 west); the grid
// gives every cell the value sent by its neighbour on the opposite side.
// The grid wraps around at the chip edges (a torus), which is this design's
// choice: the CM-1 description only says that cells on a chip can reach their
// four neighbours. Purely combinational.
module cm_news_grid #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4
) (
  input  logic [1:0]         dir,        // direction the values travel
  input  logic [ROWS*COLS-1:0] send_val, // cell sends this cycle
  input  logic [ROWS*COLS-1:0] send_bit,
  output logic [ROWS*COLS-1:0] recv_val, // a neighbour sent to this cell
  output logic [ROWS*COLS-1:0] recv_bit
);
  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        int sr, sc, src;
        // the source lies opposite to the travel direction
        sr = r;
        sc = c;
        unique case (dir)
          2'd0: sr = (r + 1) % ROWS;          // travelling north: from the south
          2'd1: sc = (c + COLS - 1) % COLS;   // travelling east: from the west
          2'd2: sr = (r + ROWS - 1) % ROWS;   // travelling south: from the north
          default: sc = (c + 1) % COLS;       // travelling west: from the east
        endcase
        src = sr * COLS + sc;
        recv_val[r*COLS+c] = send_val[src];
        recv_bit[r*COLS+c] = send_bit[src];
      end
    end
  end
endmodule
