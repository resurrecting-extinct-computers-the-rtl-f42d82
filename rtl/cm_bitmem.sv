// cm_bitmem -- one cell's bit-addressed memory (4096 x 1 bit on the CM-1).
//
// Every instruction reads the bits at addresses A and B and writes its memory
// result back to A, all in one clock, so the memory has two combinational read
// ports and one synchronous write port. A third read/write port lets the host
// load and inspect cell memory directly (the reference programs place their
// input data straight into cell memory); this port is this design's choice.
// If the host and the instruction write the same address in one cycle, the
// host wins. Reads return the contents before the clock edge.
// Contents are not reset: programs clear the bits they use.
module cm_bitmem #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  // instruction ports
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic          rd_a,
  output logic          rd_b,
  input  logic          we_a,
  input  logic          wd_a,
  // host port
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  logic          host_wd,
  output logic          host_rd
);
  logic mem [WORDS];

  assign rd_a    = mem[addr_a];
  assign rd_b    = mem[addr_b];
  assign host_rd = mem[host_addr];

  always_ff @(posedge clk) begin
    if (we_a)    mem[addr_a]    <= wd_a;
    if (host_we) mem[host_addr] <= host_wd;
  end
endmodule
