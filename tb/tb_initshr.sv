// Testbench for initshr: serial load of 80 symbols s_0..s_79, then 400
// clocks with init low and enable random. Expected after r enabled steps:
// init0 = s_r for r < 80 and s_(40 + (r-80) mod 40) after that,
// init40 = s_(40 + r mod 40).
module tb_initshr;
  import edon80_pkg::*;

  localparam int DEPTH = 80, TAP = 40;
  int checks = 0, failures = 0;
  int r = 0;
  logic clk = 1'b0, enable, init;
  sym_t initshr_in, init0, init40;
  sym_t s [DEPTH];
  sym_t w0, w40;

  initshr #(.DEPTH(DEPTH), .TAP(TAP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init = 1'b1; enable = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      s[i] = sym_t'($urandom);
      initshr_in = s[i];
    end
    @(negedge clk);
    init = 1'b0; enable = 1'b0; initshr_in = '0;
    for (int n = 0; n < 400; n++) begin
      w0  = (r < DEPTH) ? s[r] : s[TAP + (r - DEPTH) % (DEPTH - TAP)];
      w40 = s[TAP + r % (DEPTH - TAP)];
      #1;
      checks += 2;
      if (init0 !== w0)   begin failures++; $display("r=%0d init0=%0d want %0d", r, init0, w0); end
      if (init40 !== w40) begin failures++; $display("r=%0d init40=%0d want %0d", r, init40, w40); end
      enable = ($urandom % 2) != 0;
      initshr_in = sym_t'($urandom);
      @(posedge clk);
      if (enable) r++;
      @(negedge clk);
    end
    checks++;
    if (r < 2 * DEPTH) begin failures++; $display("only %0d steps taken", r); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
