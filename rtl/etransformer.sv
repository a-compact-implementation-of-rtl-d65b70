// e-transformer: the single quasigroup stage of the compact Edon80, with the
// multiplexers that choose its operands.
//
// The stage always combines the state being updated (a_this) with a "previous"
// symbol p. Normally p is the neighbour that was updated one cycle earlier
// (a_prev). For the first state a_0 (use_ext high) p comes from outside: from
// the init shift register (p_in) during IVSetup, from the 2-bit counter
// (p_count) in Keystream mode. The key symbol is k_init during IVSetup and k
// otherwise. Purely combinational; the result a_out is written back into the
// state shift register by the caller. Multiplexer structure as published.
module etransformer
  import edon80_pkg::*;
(
  input  sym_t a_this,
  input  sym_t a_prev,
  input  sym_t p_in,
  input  sym_t p_count,
  input  sym_t k,
  input  sym_t k_init,
  input  logic iv_setup,
  input  logic use_ext,
  output sym_t a_out
);

  sym_t p_ext, p_sel, k_sel;

  always_comb begin
    p_ext = iv_setup ? p_in : p_count;
    p_sel = use_ext ? p_ext : a_prev;
    k_sel = iv_setup ? k_init : k;
  end

  quasigroup u_qg (
    .k     (k_sel),
    .a     (a_this),
    .p     (p_sel),
    .a_out (a_out)
  );

endmodule
