// Reference model of Edon80 for the testbenches.
//
// QG holds the four quasigroup operations as tables, QG[k][a][p], written
// out by hand from the logic functions (see the quasigroup module header);
// the RTL computes them with gates, so a mismatch in either shows up.
// edon80_keystream() runs the cipher algorithmically, without any shift
// register: the 80 states are an array; IVSetup is 80 rounds in which round
// r feeds the leader sequence v_39..v_0, K_39..K_0 into state 0 and updates
// every state with key K_(r mod 40) (or K_(39 - r mod 40) for the literal
// wiring variant); Keystream round n feeds n mod 4 and updates state i with
// key K_(i mod 40), and every odd round yields the new a_79 as a keystream
// pair.
package edon80_ref_pkg;

  typedef logic [1:0] rsym_t;

  // The 16-bit IV padding 1110010000011011b: the symbols v_32..v_39 =
  // 3,2,1,0,0,1,2,3, sent after the 32 symbols of the 64-bit IV.
  localparam logic [15:0] IV_PAD = 16'b1110_0100_0001_1011;

  localparam rsym_t QG [4][4][4] = '{
    '{'{2'd0, 2'd1, 2'd2, 2'd3}, '{2'd1, 2'd2, 2'd3, 2'd0}, '{2'd2, 2'd3, 2'd0, 2'd1}, '{2'd3, 2'd0, 2'd1, 2'd2}},
    '{'{2'd2, 2'd3, 2'd0, 2'd1}, '{2'd0, 2'd2, 2'd1, 2'd3}, '{2'd1, 2'd0, 2'd3, 2'd2}, '{2'd3, 2'd1, 2'd2, 2'd0}},
    '{'{2'd1, 2'd2, 2'd0, 2'd3}, '{2'd2, 2'd1, 2'd3, 2'd0}, '{2'd3, 2'd0, 2'd1, 2'd2}, '{2'd0, 2'd3, 2'd2, 2'd1}},
    '{'{2'd3, 2'd1, 2'd2, 2'd0}, '{2'd2, 2'd0, 2'd3, 2'd1}, '{2'd0, 2'd3, 2'd1, 2'd2}, '{2'd1, 2'd2, 2'd0, 2'd3}}
  };

  function automatic rsym_t qg(rsym_t k, rsym_t a, rsym_t p);
    return QG[k][a][p];
  endfunction

  // Keystream pairs for key k and padded IV v. literal = 1 models the
  // variant whose IVSetup key is taken from init shift register position 40.
  function automatic void edon80_keystream(input rsym_t k [40], input rsym_t v [40],
                                           input int npairs, input bit literal,
                                           output rsym_t ks [$]);
    rsym_t a [80];
    rsym_t p, key;
    ks = {};
    for (int i = 0; i < 40; i++) begin
      a[i]      = k[i];
      a[40 + i] = v[i];
    end
    for (int r = 0; r < 80; r++) begin
      p   = (r < 40) ? v[39 - r] : k[79 - r];
      key = literal ? k[39 - (r % 40)] : k[r % 40];
      for (int j = 0; j < 80; j++) begin
        a[j] = qg(key, a[j], p);
        p    = a[j];
      end
    end
    for (int n = 0; ks.size() < npairs; n++) begin
      p = rsym_t'(n % 4);
      for (int j = 0; j < 80; j++) begin
        a[j] = qg(k[j % 40], a[j], p);
        p    = a[j];
      end
      if (n % 2 == 1) ks.push_back(a[79]);
    end
  endfunction

endpackage
