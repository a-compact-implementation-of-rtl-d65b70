// Testbench for kshr: serial load of 40 random symbols, then rotation with
// enable toggling at random. The expected k0 is the load sequence read
// cyclically from its first symbol, advancing only on enabled edges.
module tb_kshr;
  import edon80_pkg::*;

  localparam int DEPTH = 40;
  int checks = 0, failures = 0;
  logic clk = 1'b0, enable, init;
  sym_t kshr_in, k0;
  sym_t seq [DEPTH];

  kshr #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, holds;
    holds = 0;
    enable = 1'b1; init = 1'b1;
    // Load with a few disabled cycles in between.
    for (int i = 0; i < DEPTH; ) begin
      @(negedge clk);
      seq[i]  = sym_t'($urandom);
      kshr_in = seq[i];
      enable  = ($urandom % 4) != 0;
      if (enable) i++;
    end
    @(negedge clk);
    init = 1'b0; enable = 1'b0; kshr_in = '0;
    #1;
    checks++;
    if (k0 !== seq[0]) begin failures++; $display("after load k0=%0d want %0d", k0, seq[0]); end
    pos = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      enable  = ($urandom % 3) != 0;
      kshr_in = sym_t'($urandom);
      if (enable) pos = (pos + 1) % DEPTH; else holds++;
      @(posedge clk); #1;
      checks++;
      if (k0 !== seq[pos]) begin failures++; $display("step %0d: k0=%0d want %0d", n, k0, seq[pos]); end
    end
    checks++;
    if (holds == 0) begin failures++; $display("hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
