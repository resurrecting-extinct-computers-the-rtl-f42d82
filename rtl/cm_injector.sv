// cm_injector -- takes new messages from the cells into the router buffer.
//
// A petit cycle opens with the injection phase. In its first clock (req_cycle)
// every cell that wants to send drives a 1 on its injection line. The injector
// accepts at most MAX_INJ (4) of them, lowest cell number first, and never more
// than there are free buffers; each accepted cell is bound to a free buffer,
// lowest buffer number first. In the following MSG_W clocks (bit_cycle) the
// message bits arriving on an accepted cell's line are written into its buffer
// at the current bit position. When the last bit is in (last_cycle) the new
// buffers become valid and the acknowledge flag of each accepted cell is set;
// it stays set until the next injection phase, so a cell can read flag 4 right
// after sending its parity bit to learn whether it must try again.
// new_valid/new_slot are given combinationally in req_cycle (for the priority
// calculator) and held in registers afterwards. The limit of four messages per
// petit cycle follows the router description; cell and buffer order are this
// design's choice.
module cm_injector
  import cm_pkg::*;
#(
  parameter int unsigned NBUF   = BUFSIZE,
  parameter int unsigned NC     = NCELLS,
  parameter int unsigned NINJ   = MAX_INJ,
  parameter int unsigned SW     = $clog2(NBUF),
  parameter int unsigned CW     = $clog2(NC)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_cycle,
  input  logic                  bit_cycle,
  input  logic                  last_cycle,
  input  logic [NC-1:0]         lines,       // injection lines from the cells
  input  logic [NBUF-1:0]       slot_valid,  // buffers in use
  output logic [NBUF-1:0]       wr_en,       // write this buffer's current bit
  output logic [NBUF-1:0]       wr_bit,
  output logic [NINJ-1:0]       new_valid,   // accepted messages, in order
  output logic [NINJ-1:0][SW-1:0] new_slot,
  output logic [NBUF-1:0]       commit_mask, // buffers that become valid (last_cycle)
  output logic [NC-1:0]         ack          // acknowledge flags
);
  logic [NINJ-1:0]          nv_c, nv_q;
  logic [NINJ-1:0][SW-1:0]  ns_c, ns_q;
  logic [NINJ-1:0][CW-1:0]  nc_c, nc_q;
  logic [NC-1:0]            acc_c, acc_q, ack_q;

  // request selection: k-th requester goes to k-th free buffer
  always_comb begin
    automatic logic [NBUF-1:0] free = ~slot_valid;
    automatic logic [NC-1:0]   req  = lines;
    nv_c  = '0;
    ns_c  = '0;
    nc_c  = '0;
    acc_c = '0;
    for (int k = 0; k < NINJ; k++) begin
      automatic logic fr = 1'b0, rq = 1'b0;
      automatic logic [SW-1:0] s = '0;
      automatic logic [CW-1:0] c = '0;
      for (int i = NBUF-1; i >= 0; i--) if (free[i]) begin fr = 1'b1; s = SW'(i); end
      for (int i = NC-1; i >= 0; i--)   if (req[i])  begin rq = 1'b1; c = CW'(i); end
      if (fr && rq) begin
        nv_c[k]  = 1'b1;
        ns_c[k]  = s;
        nc_c[k]  = c;
        acc_c[c] = 1'b1;
        free[s]  = 1'b0;
        req[c]   = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nv_q  <= '0;
      ns_q  <= '0;
      nc_q  <= '0;
      acc_q <= '0;
      ack_q <= '0;
    end else if (req_cycle) begin
      nv_q  <= nv_c;
      ns_q  <= ns_c;
      nc_q  <= nc_c;
      acc_q <= acc_c;
      ack_q <= '0;
    end else if (last_cycle) begin
      ack_q <= acc_q;
    end
  end

  always_comb begin
    wr_en       = '0;
    wr_bit      = '0;
    commit_mask = '0;
    for (int k = 0; k < NINJ; k++) begin
      if (nv_q[k]) begin
        wr_en[ns_q[k]]  = bit_cycle;
        wr_bit[ns_q[k]] = lines[nc_q[k]];
        commit_mask[ns_q[k]] = last_cycle;
      end
    end
    new_valid = req_cycle ? nv_c : nv_q;
    new_slot  = req_cycle ? ns_c : ns_q;
    ack       = ack_q;
  end
endmodule
