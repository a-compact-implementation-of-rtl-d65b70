// Compact Edon80 keystream generator with a single e-transformer.
//
// Edon80 keeps 80 two-bit states a_0..a_79 and transforms them with
// quasigroup operations chosen by the 40 key symbols. The pipelined reference
// architecture uses 80 e-transformers; this one uses a single e-transformer
// and moves the states past it: the states sit in a shift register (aSHR)
// whose output a0 is the state being updated and whose top a79 is its
// neighbour updated one step earlier. Each result is written back at the top,
// so one round of 80 clocks updates all 80 states in order. The key symbols
// rotate in a 40-entry shift register (kSHR), so that state i is always
// processed with K_(i mod 40).
//
// Operation (one 2-bit symbol per clock on data_in):
//   Initialization  hold init high for 160 clocks and send K_0..K_39,
//                   v_0..v_39, then v_39..v_0, K_39..K_0 (v_32..v_39 being
//                   the padding 3,2,1,0,0,1,2,3). All three shift registers
//                   form one serial chain (data_in -> initSHR -> aSHR, with
//                   aSHR position 40 feeding kSHR); afterwards a = K_0..K_39,
//                   v_0..v_39, k = K_0..K_39 and initSHR = v_39..K_0.
//   IVSetup         starts when init falls: 80 rounds of 80 clocks. In round r
//                   the first state takes its p from initSHR position 0
//                   (v_39, v_38, .., v_0, K_39, .., K_0 over the rounds) and all
//                   states use the key symbol K_(r mod 40). t_in is ignored.
//   Keystream       rounds continue with p = round number mod 4 for the first
//                   state and key K_(i mod 40) for state i. At the end of every
//                   odd round the new a_79 is the next keystream pair: it
//                   appears on data_out with a one-clock ready pulse, i.e.
//                   2 bits every 160 clocks. t_in low pauses everything.
// The first pair comes 160 clocks after IVSetup ends (6400 + 160 clocks after
// init falls), ready one clock later. Raising init again starts over.
//
// The IVSetup key source is selectable. With KINIT_FROM_INIT40 = 0 (default)
// the key for round r is taken from kSHR, which steps only once per round
// during IVSetup; this realises the key order K_0..K_39, K_0..K_39 of the
// cipher. KINIT_FROM_INIT40 = 1 takes it from initSHR position 40 instead,
// as in the published block diagram; with the load order above that tap
// delivers K_39..K_0 twice, so the resulting keystream differs from the
// default. All structure apart from this choice and the per-round key step
// follows the published design.
module edon80
  import edon80_pkg::*;
#(
  parameter int unsigned NSTATE            = EDON_NSTATE,
  parameter int unsigned NKEY              = EDON_NKEY,
  parameter bit          KINIT_FROM_INIT40 = 1'b0
) (
  input  logic clk,
  input  logic init,
  input  logic t_in,
  input  sym_t data_in,
  output sym_t data_out,
  output logic ready
);

  logic enable, key_step, init_step, iv_setup, use_ext, writeout;
  sym_t p_count;
  sym_t a0, a40, a79, k0, init0, init40, a_out, k_init;

  control #(
    .NSTATE            (NSTATE),
    .KINIT_FROM_INIT40 (KINIT_FROM_INIT40)
  ) u_control (
    .clk       (clk),
    .init      (init),
    .t_in      (t_in),
    .enable    (enable),
    .key_step  (key_step),
    .init_step (init_step),
    .iv_setup  (iv_setup),
    .use_ext   (use_ext),
    .writeout  (writeout),
    .ready     (ready),
    .p_count   (p_count)
  );

  initshr #(.DEPTH(NSTATE), .TAP(NSTATE - NKEY)) u_initshr (
    .clk        (clk),
    .enable     (init_step),
    .init       (init),
    .initshr_in (data_in),
    .init0      (init0),
    .init40     (init40)
  );

  ashr #(.DEPTH(NSTATE), .TAP(NKEY)) u_ashr (
    .clk     (clk),
    .enable  (enable),
    .init    (init),
    .ashr_in (init0),
    .a79_in  (a_out),
    .a0      (a0),
    .a40     (a40),
    .a79     (a79)
  );

  kshr #(.DEPTH(NKEY)) u_kshr (
    .clk     (clk),
    .enable  (key_step),
    .init    (init),
    .kshr_in (a40),
    .k0      (k0)
  );

  assign k_init = KINIT_FROM_INIT40 ? init40 : k0;

  etransformer u_etransformer (
    .a_this   (a0),
    .a_prev   (a79),
    .p_in     (init0),
    .p_count  (p_count),
    .k        (k0),
    .k_init   (k_init),
    .iv_setup (iv_setup),
    .use_ext  (use_ext),
    .a_out    (a_out)
  );

  outputprocessor u_outputprocessor (
    .clk      (clk),
    .writeout (writeout),
    .a79_in   (a_out),
    .data_out (data_out)
  );

  initial begin
    assert (NSTATE == 2 * NKEY) else $error("NSTATE must be twice NKEY");
    assert (NSTATE % 4 == 0) else $error("NSTATE must be a multiple of 4");
  end

endmodule
