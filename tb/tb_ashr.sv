// Testbench for ashr: serial load of 80 symbols through ashr_in, checking
// a0, a40 and a79 after the load, then 400 random steps fed through a79_in
// (enable random). Expected outputs come from the history of accepted
// inputs: the symbol at position i is the one accepted DEPTH-1-i enabled
// steps ago.
module tb_ashr;
  import edon80_pkg::*;

  localparam int DEPTH = 80, TAP = 40;
  int checks = 0, failures = 0;
  logic clk = 1'b0, enable, init;
  sym_t ashr_in, a79_in, a0, a40, a79;
  sym_t hist [$];

  ashr #(.DEPTH(DEPTH), .TAP(TAP)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(string what);
    int n = hist.size();
    checks += 3;
    if (a79 !== hist[n-1])       begin failures++; $display("%s: a79=%0d want %0d", what, a79, hist[n-1]); end
    if (a40 !== hist[n-DEPTH+TAP]) begin failures++; $display("%s: a40=%0d want %0d", what, a40, hist[n-DEPTH+TAP]); end
    if (a0  !== hist[n-DEPTH])   begin failures++; $display("%s: a0=%0d want %0d", what, a0, hist[n-DEPTH]); end
  endtask

  initial begin
    init = 1'b1; enable = 1'b1;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      ashr_in = sym_t'($urandom);
      a79_in  = sym_t'($urandom);
      hist.push_back(ashr_in);
    end
    @(negedge clk);
    enable = 1'b0; init = 1'b0;
    #1;
    check_outputs("after load");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      enable  = ($urandom % 4) != 0;
      init    = 1'b0;
      ashr_in = sym_t'($urandom);
      a79_in  = sym_t'($urandom);
      if (enable) hist.push_back(a79_in);
      @(posedge clk); #1;
      check_outputs($sformatf("step %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
