// State shift register (aSHR): the DEPTH 2-bit internal states of Edon80.
//
// Each step moves every symbol one place towards position 0 and writes a new
// symbol at the top, position DEPTH-1: the serial load input ashr_in while
// init is high, otherwise a79_in, the result the e-transformer has just
// computed for the state leaving position 0. Over DEPTH steps each state
// therefore passes the e-transformer once and is replaced by its updated
// value. a0 is the state being updated (a_this), a79 the state updated one
// step earlier (a_prev), and a40 (position TAP) feeds the key shift register
// while loading. A step happens on a rising edge with enable high.
// Taps and input multiplexer as published.
module ashr
  import edon80_pkg::*;
#(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned TAP   = 40
) (
  input  logic clk,
  input  logic enable,
  input  logic init,
  input  sym_t ashr_in,
  input  sym_t a79_in,
  output sym_t a0,
  output sym_t a40,
  output sym_t a79
);

  sym_t sr [DEPTH];

  always_ff @(posedge clk) begin
    if (enable) begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= sr[i+1];
      sr[DEPTH-1] <= init ? ashr_in : a79_in;
    end
  end

  assign a0  = sr[0];
  assign a40 = sr[TAP];
  assign a79 = sr[DEPTH-1];

endmodule
