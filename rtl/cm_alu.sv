// cm_alu -- the cell's truth-table ALU.
//
// A CM-1 cell has no adder or logic unit as such: each result bit is looked up
// in an 8-bit truth table supplied with the instruction, indexed by the three
// operand bits (memory bit A, memory bit B, flag R). In hardware this is an
// 8-to-1 multiplexer, which is what this module is. Each cell holds two: one
// for the memory result and one for the flag result.
//
// Index convention (this design's choice, matching the published truth-table
// constants): idx = {a, b, f}, result = tt[7 - idx].
// Purely combinational, no clock.
module cm_alu (
  input  logic [7:0] tt,   // truth table from the instruction
  input  logic       a,    // memory bit at address A
  input  logic       b,    // memory bit at address B
  input  logic       f,    // flag R
  output logic       y     // looked-up result
);
  logic [2:0] idx;
  always_comb begin
    idx = {a, b, f};
    y   = tt[3'd7 - idx];
  end
endmodule
