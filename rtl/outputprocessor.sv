// Output processor: filters the keystream symbols out of the e-transformer
// results.
//
// A 2-bit register with clock enable captures a79_in, the freshly computed
// state, on a rising edge while writeout is high, and drives it as data_out
// until the next keystream pair arrives. The control unit raises writeout
// only for the last state of every second round. Not reset: data_out is
// meaningful from the first ready pulse on. As published; the missing reset
// is a choice of this design.
module outputprocessor
  import edon80_pkg::*;
(
  input  logic clk,
  input  logic writeout,
  input  sym_t a79_in,
  output sym_t data_out
);

  always_ff @(posedge clk) begin
    if (writeout) data_out <= a79_in;
  end

endmodule
