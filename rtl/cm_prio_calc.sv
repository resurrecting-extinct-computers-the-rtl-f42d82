// cm_prio_calc -- the router's priority calculator.
//
// Every buffered message carries a 3-bit priority; larger means older and more
// urgent, and the messages in a router always hold the values 7, 6, 5, ...
// without gaps. Messages that leave (sent, referred or delivered) open gaps,
// and newly arrived messages must be ranked below all others. A message's
// priority may not change while it is being sent or received, so this unit
// works in the background over several clocks and its result is applied by the
// router only when the transfer ends.
//
// Operation, after a one-cycle start pulse that captures the survivors (keep),
// their current priorities and up to NEW new buffer slots in arrival order:
//   steps x = 0..7 (one per clock): if no survivor holds priority x, every
//     survivor below x is incremented. One ascending pass closes all gaps, so
//     the survivors end up at 7, 6, ..., 8-s.
//   step 8: the k-th new message gets priority 7 - s - k.
// `done` rises after 9 clocks and stays high, with `prio_out` valid, until the
// next start. The ascending sweep over the eight values follows the router
// description; the ranking of new arrivals is this design's choice.
module cm_prio_calc
  import cm_pkg::*;
#(
  parameter int unsigned NBUF = BUFSIZE,
  parameter int unsigned NEW  = MAX_INJ,
  parameter int unsigned SW   = $clog2(NBUF)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [NBUF-1:0]             keep,
  input  logic [NBUF-1:0][PRIO_W-1:0] prio_in,
  input  logic [NEW-1:0]              new_valid,
  input  logic [NEW-1:0][SW-1:0]      new_slot,
  output logic [NBUF-1:0][PRIO_W-1:0] prio_out,
  output logic                        done
);
  logic [NBUF-1:0][PRIO_W-1:0] pr_q;
  logic [NBUF-1:0]             keep_q;
  logic [NEW-1:0]              nv_q;
  logic [NEW-1:0][SW-1:0]      ns_q;
  logic [3:0]                  step_q;   // 0..7 sweep, 8 assign, 9 done
  logic                        busy_q;

  logic [PRIO_W-1:0] x;
  logic              present;
  logic [PRIO_W:0]   survivors;

  always_comb begin
    x       = step_q[PRIO_W-1:0];
    present = 1'b0;
    for (int i = 0; i < NBUF; i++)
      if (keep_q[i] && pr_q[i] == x) present = 1'b1;
    survivors = '0;
    for (int i = 0; i < NBUF; i++) survivors += {{PRIO_W{1'b0}}, keep_q[i]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr_q   <= '0;
      keep_q <= '0;
      nv_q   <= '0;
      ns_q   <= '0;
      step_q <= '0;
      busy_q <= 1'b0;
    end else if (start) begin
      pr_q   <= prio_in;
      keep_q <= keep;
      nv_q   <= new_valid;
      ns_q   <= new_slot;
      step_q <= '0;
      busy_q <= 1'b1;
    end else if (busy_q) begin
      if (step_q < 4'd8) begin
        if (!present)
          for (int i = 0; i < NBUF; i++)
            if (keep_q[i] && pr_q[i] < x) pr_q[i] <= pr_q[i] + 1'b1;
        step_q <= step_q + 1'b1;
      end else begin
        // rank new arrivals below the survivors, in arrival order
        automatic logic [PRIO_W:0] next = (PRIO_W+1)'(7) - survivors;
        for (int k = 0; k < NEW; k++) begin
          if (nv_q[k]) begin
            pr_q[ns_q[k]] <= next[PRIO_W-1:0];
            next = next - 1'b1;
          end
        end
        busy_q <= 1'b0;
        step_q <= 4'd9;
      end
    end
  end

  assign prio_out = pr_q;
  assign done     = !busy_q && (step_q == 4'd9);
endmodule
