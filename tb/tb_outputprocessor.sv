// Testbench for outputprocessor: random a79_in every cycle and a sparse
// random writeout; data_out must always equal the value present at the last
// edge that had writeout high.
module tb_outputprocessor;
  import edon80_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0, writeout;
  sym_t a79_in, data_out, want;
  bit   valid = 1'b0;

  outputprocessor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int writes = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      writeout = ($urandom % 5) == 0;
      a79_in   = sym_t'($urandom);
      @(posedge clk);
      if (writeout) begin want = a79_in; valid = 1'b1; writes++; end
      #1;
      if (valid) begin
        checks++;
        if (data_out !== want) begin failures++; $display("cycle %0d: data_out=%0d want %0d", n, data_out, want); end
      end
    end
    checks++;
    if (writes < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
