// Testbench for control: two full runs (load, IVSetup, part of Keystream)
// with t_in random throughout. Every cycle the flags are compared with values
// derived from a step count s (enabled clocks since init fell): use_ext at
// s mod 80 = 0, p_count = (s/80) mod 4, IVSetup for s < 6400 with enable
// forced high, in Keystream enable = t_in and writeout at s mod 80 = 79 of odd
// rounds, ready one clock after writeout, init shift register stepping at
// the end of each round, key shift register once per round in IVSetup and on
// every enabled clock otherwise. The cycle of the first keystream pair
// (s = 6559) is checked too.
module tb_control;
  import edon80_pkg::*;

  localparam int N = 80;
  int checks = 0, failures = 0;
  int pauses = 0;
  logic clk = 1'b0, init, t_in;
  logic enable, key_step, init_step, iv_setup, use_ext, writeout, ready;
  sym_t p_count;

  control #(.NSTATE(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [1:0] got, logic [1:0] want, int s);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("s=%0d %s=%0d want %0d", s, what, got, want);
    end
  endtask

  initial begin
    int  s, first_wo;
    logic prev_wo;
    for (int run = 0; run < 2; run++) begin
      // Load phase: flags must keep everything shifting, nothing written.
      for (int i = 0; i < 160; i++) begin
        @(negedge clk);
        init = 1'b1; t_in = 1'(($urandom % 3) != 0);
        #1;
        expect_eq("enable(init)", 2'(enable), 2'd1, -1);
        expect_eq("init_step(init)", 2'(init_step), 2'd1, -1);
        expect_eq("key_step(init)", 2'(key_step), 2'd1, -1);
        expect_eq("iv_setup(init)", 2'(iv_setup), 2'd0, -1);
        expect_eq("writeout(init)", 2'(writeout), 2'd0, -1);
      end
      s = 0; first_wo = -1; prev_wo = 1'b0;
      while (s < 6400 + 160 * 5) begin
        logic ivs, en_w, wo_w, re;
        @(negedge clk);
        init = 1'b0;
        t_in = 1'(($urandom % 4) != 0);
        #1;
        ivs  = (s < 6400);
        en_w = ivs | t_in;
        re   = (s % N) == N - 1;
        wo_w = !ivs && en_w && re && ((s / N) % 2 == 1);
        expect_eq("iv_setup", 2'(iv_setup), 2'(ivs), s);
        expect_eq("enable", 2'(enable), 2'(en_w), s);
        expect_eq("use_ext", 2'(use_ext), 2'((s % N) == 0), s);
        expect_eq("p_count", p_count, 2'((s / N) % 4), s);
        expect_eq("init_step", 2'(init_step), 2'(en_w && re), s);
        expect_eq("key_step", 2'(key_step), 2'(ivs ? re : en_w), s);
        expect_eq("writeout", 2'(writeout), 2'(wo_w), s);
        expect_eq("ready", 2'(ready), 2'(prev_wo), s);
        if (wo_w && first_wo < 0) first_wo = s;
        if (!ivs && !t_in) pauses++;
        prev_wo = writeout;
        if (en_w) s++;
      end
      checks++;
      if (first_wo != 6400 + 2 * N - 1) begin
        failures++; $display("first writeout at s=%0d want %0d", first_wo, 6400 + 2 * N - 1);
      end
    end
    checks++;
    if (pauses == 0) begin failures++; $display("no pause exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
