// Init shift register (initSHR): DEPTH 2-bit symbols that supply the
// external p input of the e-transformer during IVSetup.
//
// While init is high the register shifts initshr_in in at position DEPTH-1
// (symbols move towards position 0, which feeds the state shift register).
// With init low the symbol at position TAP is fed back to the top, so after
// the first TAP steps the upper DEPTH-TAP symbols keep repeating at init0.
// Loaded with v_39..v_0, K_39..K_0 this yields the IVSetup sequence
// v_39..v_0, K_39..K_0 at init0 over 80 steps. A step happens on a rising
// edge with enable high; outside the load phase it is one step per round.
// Structure as published; stepping on the last clock of a round is this
// design's choice (the control unit decides it).
module initshr
  import edon80_pkg::*;
#(
  parameter int unsigned DEPTH = 80,
  parameter int unsigned TAP   = 40
) (
  input  logic clk,
  input  logic enable,
  input  logic init,
  input  sym_t initshr_in,
  output sym_t init0,
  output sym_t init40
);

  sym_t sr [DEPTH];

  always_ff @(posedge clk) begin
    if (enable) begin
      for (int i = 0; i < DEPTH - 1; i++) sr[i] <= sr[i+1];
      sr[DEPTH-1] <= init ? initshr_in : sr[TAP];
    end
  end

  assign init0  = sr[0];
  assign init40 = sr[TAP];

endmodule
