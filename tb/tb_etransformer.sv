// Testbench for etransformer: 2000 random input vectors, plus every
// combination of the two mode flags, checked against the operand selection
// (p = a_prev unless use_ext; external p = p_in in IVSetup, p_count
// otherwise; key = k_init in IVSetup, k otherwise) applied to the reference
// quasigroup tables.
module tb_etransformer;
  import edon80_pkg::*;
  import edon80_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  sym_t a_this, a_prev, p_in, p_count, k, k_init, a_out;
  logic iv_setup, use_ext;

  etransformer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic sym_t expected();
    sym_t p_e, k_e;
    p_e = !use_ext ? a_prev : (iv_setup ? p_in : p_count);
    k_e = iv_setup ? k_init : k;
    return qg(k_e, a_this, p_e);
  endfunction

  initial begin
    int mode_seen [4];
    mode_seen = '{default: 0};
    for (int n = 0; n < 2000; n++) begin
      {a_this, a_prev, p_in, p_count, k, k_init} = 12'($urandom);
      {iv_setup, use_ext} = 2'(n);
      #1;
      checks++;
      mode_seen[{iv_setup, use_ext}]++;
      if (a_out !== expected()) begin
        failures++;
        $display("mismatch iv_setup=%0b use_ext=%0b: got %0d want %0d", iv_setup, use_ext, a_out, expected());
      end
      @(posedge clk);
    end
    foreach (mode_seen[m]) begin
      checks++;
      if (mode_seen[m] == 0) begin failures++; $display("mode %0d never exercised", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
