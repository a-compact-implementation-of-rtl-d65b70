// Quasigroup lookup: the four order-4 quasigroup operations of Edon80 as
// hand-optimised two-level logic, no ROM.
//
// For operands a = {a1,a0} and p = {p1,p0} a small set of shared terms
// f0..f8 is formed, from which each of the four operations (Q, .K) yields a
// high bit hK and a low bit lK; a 4:1 multiplexer on the key symbol k picks
// the pair, a_out = {hK, lK}. Purely combinational.
//
// The term structure follows the published logic functions. Two of them,
// hK1 and lK2, are used with the negation over a single literal
// (hK1 = f4.a0 + ~f1.f2, lK2 = f5.f7 + a1.~f0): read with the bar over the
// whole product they would not form Latin squares, and with this reading
// all four operations are quasigroups. As a table (row a, column p):
//   K=0: 0123 1230 2301 3012     K=1: 2301 0213 1032 3120
//   K=2: 1203 2130 3012 0321     K=3: 3120 2031 0312 1203
module quasigroup
  import edon80_pkg::*;
(
  input  sym_t k,
  input  sym_t a,
  input  sym_t p,
  output sym_t a_out
);

  logic f0, f1, f2, f3, f4, f5, f6, f7, f8;
  logic h0, l0, h1, l1, h2, l2, h3, l3;

  always_comb begin
    f0 = a[0] ^ p[0];
    f1 = a[1] ^ p[1];
    f2 = ~a[0];
    f3 = f1 & f2;
    f4 = a[1] ^ p[0];
    f5 = ~a[1];
    f6 = f0 ^ p[1];
    f7 = ~f6;
    f8 = ~(a[0] ^ p[1]);

    h0 = f3 | (a[0] & (f1 ^ p[0]));
    l0 = f0;
    h1 = (f4 & a[0]) | (~f1 & f2);
    l1 = (f2 & f4) | (a[0] & f1);
    h2 = (a[1] & f7) | (f0 & f5);
    l2 = (f5 & f7) | (a[1] & ~f0);
    h3 = ~f4;
    l3 = (a[1] & f6) | (f5 & f8);

    unique case (k)
      2'd0:    a_out = {h0, l0};
      2'd1:    a_out = {h1, l1};
      2'd2:    a_out = {h2, l2};
      default: a_out = {h3, l3};
    endcase
  end

endmodule
