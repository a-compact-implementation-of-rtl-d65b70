// Control unit of the compact Edon80: two nested counters and the flags
// derived from them.
//
// counter (cnt1) walks over the NSTATE state positions, 0..NSTATE-1, one per
// step; each time it wraps, counter2 (cnt2) advances, also 0..NSTATE-1. In
// IVSetup cnt2 is the round number; its wrap after NSTATE rounds sets
// initdone, which switches to Keystream mode and stays set until init. In
// Keystream mode cnt2 keeps counting rounds and its two low bits are the
// 2-bit counter fed into the e-transformer (p_count); this works because
// NSTATE is a multiple of 4. While init is high both counters and initdone
// are held at zero (synchronous reset).
//
// Flags, all combinational from the registers except ready:
//   enable    steps the state shift register: always during load and
//             IVSetup, equal to t_in in Keystream mode (pause);
//   use_ext   cnt1 = 0, the first state a_0 is being updated;
//   iv_setup  neither init nor initdone;
//   writeout  last state of an odd round in Keystream mode: a keystream pair;
//   ready     writeout delayed by one clock (data_out has just changed).
// Two step enables come on top of the published flag set: init_step steps
// the init shift register once per round (every step while loading), and
// key_step steps the key shift register. Outside IVSetup key_step equals
// enable. During IVSetup it is once per round, so that the key shift register
// presents K_(r mod 40) for the whole of round r, the key order the cipher
// prescribes; with KINIT_FROM_INIT40 set the key register instead rotates
// every step, as in the literal wiring where the IVSetup key comes from the
// init shift register.
module control
  import edon80_pkg::*;
#(
  parameter int unsigned NSTATE            = 80,
  parameter bit          KINIT_FROM_INIT40 = 1'b0
) (
  input  logic clk,
  input  logic init,
  input  logic t_in,
  output logic enable,
  output logic key_step,
  output logic init_step,
  output logic iv_setup,
  output logic use_ext,
  output logic writeout,
  output logic ready,
  output sym_t p_count
);

  localparam int unsigned CW = $clog2(NSTATE);
  localparam logic [CW-1:0] LAST = CW'(NSTATE - 1);

  logic [CW-1:0] cnt1, cnt2;
  logic          initdone;
  logic          round_end;

  always_comb begin
    round_end = (cnt1 == LAST);
    enable    = init | ~initdone | t_in;
    iv_setup  = ~init & ~initdone;
    use_ext   = (cnt1 == '0);
    p_count   = cnt2[1:0];
    writeout  = enable & ~init & initdone & round_end & cnt2[0];
    init_step = init | (enable & round_end);
    key_step  = init | (enable & (KINIT_FROM_INIT40 | ~iv_setup | round_end));
  end

  always_ff @(posedge clk) begin
    if (init) begin
      cnt1     <= '0;
      cnt2     <= '0;
      initdone <= 1'b0;
    end else if (enable) begin
      if (round_end) begin
        cnt1 <= '0;
        if (cnt2 == LAST) begin
          cnt2     <= '0;
          initdone <= 1'b1;
        end else begin
          cnt2 <= cnt2 + 1'b1;
        end
      end else begin
        cnt1 <= cnt1 + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) ready <= writeout;

  // A keystream pair is never flagged during the load or IVSetup phases.
  a_writeout_keystream_only : assert property (@(posedge clk) writeout |-> !iv_setup && !init);
  // Keystream pairs are a whole round apart, so ready is a single-cycle pulse.
  a_ready_pulse : assert property (@(posedge clk) ready |=> !ready);

endmodule
