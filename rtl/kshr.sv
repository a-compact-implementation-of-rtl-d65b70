// Key shift register (kSHR): DEPTH 2-bit key symbols K_0 .. K_(DEPTH-1).
//
// While init is high it is a plain serial shift register: kshr_in enters at
// the top position DEPTH-1 and every symbol moves one place towards position
// 0, whose content is dropped. With init low it rotates, k0 re-entering at the
// top, so k0 presents K_0, K_1, ... on consecutive steps. A step happens on
// a rising clock edge with enable high; otherwise the contents are held.
// k0 is the register output at position 0 (no combinational path).
// Load/rotate structure as published; the numbering of positions (input at
// the top, output at 0) is this design's convention.
module kshr
  import edon80_pkg::*;
#(
  parameter int unsigned DEPTH = 40
) (
  input  logic clk,
  input  logic enable,
  input  logic init,
  input  sym_t kshr_in,
  output sym_t k0
);

  sym_t sr [DEPTH];

  always_ff @(posedge clk) begin
    if (enable) begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= sr[i+1];
      sr[DEPTH-1] <= init ? kshr_in : sr[0];
    end
  end

  assign k0 = sr[0];

endmodule
