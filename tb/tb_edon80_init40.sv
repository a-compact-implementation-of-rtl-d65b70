// End-to-end testbench of edon80 with KINIT_FROM_INIT40 = 1, the variant
// whose IVSetup key is read from init shift register position 40 (key order
// K_39..K_0 twice). Same sequence as the default-size end-to-end test (load,
// IVSetup, restart, pauses, t_in ignored outside Keystream) with 10 pairs
// per run, checked against the reference model in its matching mode.
module tb_edon80_init40;
  import edon80_pkg::*;
  import edon80_ref_pkg::*;

  localparam bit LITERAL = 1'b1;
  int checks = 0, failures = 0;
  logic clk = 1'b0, init = 1'b1, t_in = 1'b1;
  sym_t data_in = '0, data_out;
  logic ready;

  edon80 #(.KINIT_FROM_INIT40(1'b1)) dut (
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
    full_sequence(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
