// Shared body of the end-to-end testbenches: drives key/IV loads through
// data_in, checks every keystream pair against the reference model and the
// timing of ready, and exercises pausing (t_in low during Keystream),
// t_in low during load and IVSetup (must be ignored), and a restart in the
// middle of a run. Expects clk, init, t_in, data_in, data_out, ready, checks,
// failures and LITERAL in the enclosing module.

  int n_loads = 0, n_ivsetups = 0, n_pairs = 0, n_pauses = 0, n_ignored_tin = 0, n_restarts = 0;

  task automatic make_key_iv(output rsym_t k [40], output rsym_t v [40]);
    for (int i = 0; i < 40; i++) k[i] = rsym_t'($urandom);
    for (int i = 0; i < 32; i++) v[i] = rsym_t'($urandom);
    for (int i = 0; i < 8; i++)  v[32 + i] = IV_PAD[15 - 2 * i -: 2];
  endtask

  // 160-cycle load: K_0..K_39, v_0..v_39, v_39..v_0, K_39..K_0. t_in is
  // random here and must have no effect.
  task automatic load(input rsym_t k [40], input rsym_t v [40]);
    rsym_t seq [160];
    for (int i = 0; i < 40; i++) begin
      seq[i]       = k[i];
      seq[40 + i]  = v[i];
      seq[80 + i]  = v[39 - i];
      seq[120 + i] = k[39 - i];
    end
    for (int i = 0; i < 160; i++) begin
      @(negedge clk);
      init    = 1'b1;
      data_in = seq[i];
      t_in    = 1'($urandom % 2);
      if (!t_in) n_ignored_tin++;
    end
    n_loads++;
  endtask

  // After a load: runs IVSetup (t_in random) and collects npairs keystream
  // pairs, with random pauses when do_pause is set. Checks values and the
  // number of clocks to each ready pulse. If abort_after >= 0 the run is left
  // after that many pairs (restart test).
  task automatic run_and_check(input rsym_t k [40], input rsym_t v [40], input int npairs,
                               input bit do_pause, input int abort_after);
    rsym_t ks [$];
    int cyc, active, last_ready_active, got;
    edon80_keystream(k, v, npairs, LITERAL, ks);
    cyc = 0; active = 0; got = 0; last_ready_active = -1;
    while (got < npairs && !(abort_after >= 0 && got >= abort_after)) begin
      @(negedge clk);
      init    = 1'b0;
      data_in = rsym_t'($urandom);
      if (active < 6400) begin
        t_in = 1'($urandom % 2);
        if (!t_in) n_ignored_tin++;
      end else if (do_pause && ($urandom % 64) == 0) begin
        t_in = 1'b0;
        n_pauses++;
      end else begin
        t_in = 1'b1;
      end
      // This clock advances the design if in IVSetup or t_in is high.
      if (active < 6400 || t_in) active++;
      @(posedge clk); #1;
      cyc++;
      if (active == 6400 && got == 0 && last_ready_active < 0) n_ivsetups++;
      if (ready) begin
        int want_active;
        want_active = (got == 0) ? 6400 + 160 : last_ready_active + 160;
        checks += 2;
        if (data_out !== ks[got]) begin
          failures++;
          $display("pair %0d: data_out=%0d want %0d", got, data_out, ks[got]);
        end
        if (active != want_active) begin
          failures++;
          $display("pair %0d: ready after %0d active clocks, want %0d", got, active, want_active);
        end
        last_ready_active = active;
        got++;
        n_pairs++;
      end
      if (cyc > 6400 + 400 * (npairs + 2)) begin
        failures++;
        $display("keystream stalled after %0d pairs", got);
        break;
      end
    end
  endtask

  task automatic report_mechanisms();
    checks += 6;
    if (n_loads == 0)       begin failures++; $display("no load"); end
    if (n_ivsetups == 0)    begin failures++; $display("no IVSetup completed"); end
    if (n_pairs == 0)       begin failures++; $display("no keystream pair"); end
    if (n_pauses == 0)      begin failures++; $display("no keystream pause"); end
    if (n_ignored_tin == 0) begin failures++; $display("t_in never low during load/IVSetup"); end
    if (n_restarts == 0)    begin failures++; $display("no restart"); end
    $display("loads=%0d ivsetups=%0d pairs=%0d pauses=%0d t_in_ignored_clocks=%0d restarts=%0d",
             n_loads, n_ivsetups, n_pairs, n_pauses, n_ignored_tin, n_restarts);
  endtask

  task automatic full_sequence(input int npairs);
    rsym_t k [40], v [40];
    // Run 1: abort in the middle of Keystream to test the restart.
    make_key_iv(k, v);
    load(k, v);
    run_and_check(k, v, npairs, 1'b0, 3);
    n_restarts++;
    // Run 2: new key/IV, keystream with pauses.
    make_key_iv(k, v);
    load(k, v);
    run_and_check(k, v, npairs, 1'b1, -1);
    // Run 3: all-zero key and IV body, no pauses.
    for (int i = 0; i < 40; i++) k[i] = '0;
    for (int i = 0; i < 32; i++) v[i] = '0;
    load(k, v);
    run_and_check(k, v, npairs, 1'b0, -1);
    report_mechanisms();
  endtask
