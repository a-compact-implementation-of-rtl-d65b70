// End-to-end testbench of edon80 at its default size (80 states, 40 key
// symbols): three complete runs, each a 160-clock load, the 6400-clock
// IVSetup and 40 keystream pairs checked against an algorithmic reference
// model, with the first pair due 6560 clocks after init falls and the
// following ones every 160 active clocks. The first run is abandoned after
// three pairs by raising init again (restart), the second pauses Keystream
// at random with t_in, and t_in toggles at random during every load and
// IVSetup, where it must be ignored.
module tb_edon80;
  import edon80_pkg::*;
  import edon80_ref_pkg::*;

  localparam bit LITERAL = 1'b0;
  int checks = 0, failures = 0;
  logic clk = 1'b0, init = 1'b1, t_in = 1'b1;
  sym_t data_in = '0, data_out;
  logic ready;

  edon80 dut (
    .clk      (clk),
    .init     (init),
    .t_in     (t_in),
    .data_in  (data_in),
    .data_out (data_out),
    .ready    (ready)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "tb_edon80_run.svh"

  initial begin
    full_sequence(40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
