// cm_pkg -- types and constants shared by the Connection Machine (CM-1) chip.
//
// The CM-1 chip holds 16 one-bit processing cells and one router. Every cell
// executes the same 55-bit instruction each clock: two 12-bit memory addresses
// A and B, three 4-bit flag numbers R (read), W (write) and C (condition), a
// 1-bit condition sense, two 8-bit truth tables (memory and flag) and a 2-bit
// NEWS direction. These widths, the 4096-bit cell memory, the 16 flags, the 16
// cells per chip, the 12 hypercube dimensions and the 7 router buffers follow
// the CM-1 description. The numbering of the special flags, the bit layout of a
// router message and the length of each petit-cycle phase are this design's
// choices, made so that the published instruction sequences (inject a request
// bit, 16 address bits, a format bit, 32 data bits and a parity bit; read the
// acknowledge flag; wait on the global pin; read 32 delivered bits) work
// unchanged.
//
// Truth-table convention: the operand bits form the index {a, b, f} and the
// result is table[7 - index], so 8'b0000_1111 returns a, 8'b0011_0011 returns b
// and 8'b0101_0101 returns f.
package cm_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NCELLS     = 16;    // cells per chip
  localparam int unsigned CELL_W     = 4;     // bits of a cell number
  localparam int unsigned MEM_BITS   = 4096;  // bits of memory per cell
  localparam int unsigned MEM_AW     = 12;    // memory address width
  localparam int unsigned NFLAGS     = 16;    // flags per cell
  localparam int unsigned DIMS       = 12;    // hypercube dimensions
  localparam int unsigned BUFSIZE    = 7;     // router message buffers
  localparam int unsigned PRIO_W     = 3;     // 8 priority values
  localparam int unsigned MAX_INJ    = 4;     // messages accepted per petit cycle

  // ------------------------------------------------------ message layout
  // Bit-serial order on every link, first bit first (index 0):
  //   [0..11]  relative router address, bit 11 first ... bit 0 last
  //   [12..15] destination cell number, bit 3 first
  //   [16]     format bit (always 1)
  //   [17..48] 32 data bits, delivered to the cell in this order
  //   [49]     parity bit (carried, not checked)
  // On a link a message is preceded by a start bit of 1.
  localparam int unsigned ADDR_W     = DIMS + CELL_W;   // 16
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned MSG_W      = ADDR_W + 1 + DATA_W + 1;  // 50
  localparam int unsigned DATA_POS   = ADDR_W + 1;     // first data bit: 17
  localparam int unsigned CNT_W      = 6;              // counts 0..MSG_W

  // Position in a message of router-address bit d.
  function automatic int unsigned rtr_bit_pos(int unsigned d);
    return DIMS - 1 - d;
  endfunction

  // ------------------------------------------------------ flag numbers
  localparam logic [3:0] F_ZERO   = 4'd0;   // reads 0, writes ignored
  localparam logic [3:0] F_GLOBAL = 4'd1;   // ORed onto the global pin
  localparam logic [3:0] F_NEWS   = 4'd2;   // written by a grid neighbour
  localparam logic [3:0] F_ACK    = 4'd4;   // router acknowledge (read only)
  localparam logic [3:0] F_RDATA  = 4'd5;   // router data (read: delivery, write: injection)

  // ------------------------------------------------------ instruction
  typedef struct packed {
    logic [MEM_AW-1:0] addr_a;
    logic [MEM_AW-1:0] addr_b;
    logic [3:0]        flag_r;
    logic [3:0]        flag_w;
    logic [3:0]        flag_c;
    logic              sense;
    logic [7:0]        mem_tt;
    logic [7:0]        flag_tt;
    logic [1:0]        news_dir;
  } cm_instr_t;                              // 55 bits

  // Handy truth tables.
  localparam logic [7:0] TT_IDM  = 8'b0000_1111;  // a
  localparam logic [7:0] TT_CPM  = 8'b0011_0011;  // b
  localparam logic [7:0] TT_IDF  = 8'b0101_0101;  // f
  localparam logic [7:0] TT_XOR  = 8'b0110_1001;  // a ^ b ^ f
  localparam logic [7:0] TT_MAJ  = 8'b0001_0111;  // majority(a, b, f)
  localparam logic [7:0] TT_SETO = 8'b1111_1111;
  localparam logic [7:0] TT_SETZ = 8'b0000_0000;

  // NEWS directions.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} news_dir_e;

  // ------------------------------------------------------ petit cycle
  // INJECT: 1 request cycle + MSG_W bit cycles.
  // DIM d (d = 0..11): 1 start-bit cycle + MSG_W bit cycles on cube link d.
  // DELIVER: 1 start-bit cycle + DATA_W data cycles.
  typedef enum logic [1:0] {PH_INJECT = 2'd0, PH_DIM = 2'd1, PH_DELIVER = 2'd2} phase_e;

  localparam int unsigned PETIT_LEN = (MSG_W + 1) * (DIMS + 1) + DATA_W + 1;  // 696

  // Message buffer index and count types.
  localparam int unsigned SLOT_W = $clog2(BUFSIZE);   // 3

endpackage
