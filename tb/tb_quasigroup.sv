// Testbench for quasigroup: all 64 combinations of key, a and p against the
// reference tables, and the Latin-square property of each of the four
// operations measured on the RTL outputs (every row and every column a
// permutation of 0..3).
module tb_quasigroup;
  import edon80_pkg::*;
  import edon80_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  sym_t k, a, p, a_out;

  quasigroup dut (.k(k), .a(a), .p(p), .a_out(a_out));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t got [4][4][4];
    for (int ki = 0; ki < 4; ki++)
      for (int ai = 0; ai < 4; ai++)
        for (int pi = 0; pi < 4; pi++) begin
          k = sym_t'(ki); a = sym_t'(ai); p = sym_t'(pi);
          #1;
          got[ki][ai][pi] = a_out;
          checks++;
          if (a_out !== qg(k, a, p)) begin
            failures++;
            $display("mismatch k=%0d a=%0d p=%0d: got %0d want %0d", ki, ai, pi, a_out, qg(k, a, p));
          end
        end
    for (int ki = 0; ki < 4; ki++)
      for (int x = 0; x < 4; x++) begin
        logic [3:0] row_seen, col_seen;
        row_seen = '0; col_seen = '0;
        for (int y = 0; y < 4; y++) begin
          row_seen[got[ki][x][y]] = 1'b1;
          col_seen[got[ki][y][x]] = 1'b1;
        end
        checks += 2;
        if (row_seen != 4'hf) begin failures++; $display("k=%0d row a=%0d not a permutation", ki, x); end
        if (col_seen != 4'hf) begin failures++; $display("k=%0d column p=%0d not a permutation", ki, x); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
