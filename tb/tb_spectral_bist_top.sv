// tb_spectral_bist_top: end-to-end test of the spectral BIST generator at its
// default configuration (three inputs, order-4 Hadamard generator, D = 4,
// H_L = 2, 49-tap observability chain), over a 64,000-vector session.
//
// A cycle-level reference model written here from the architecture (divider
// counter, holder enable, Walsh counter, a separately coded 16-cell CA, the
// AND/OR weighting rule, mux chain and XOR) predicts every test vector; the
// outputs are compared in every cycle. Mechanisms counted, each of which
// must occur: full-rate vectors, held vectors, each of the three synthesizer
// inputs being chosen, randomizer flips, the random input taking both values,
// wrap-around of the Walsh counter. The BIST-clock rate per 2*D period must be
// D + D/H_L, a vector may change only after a BIST clock, and each held
// vector must stay on cut_pi for H_L cycles.
// Finally the Hadamard spectrum of each input's vector sequence, averaged
// over aligned 16-vector windows, must show the configured components:
// rows 1, 3 (+) and 6 (-) for input 0 near 4, 4 and -8, row 5 near +8 for
// input 1 and no component above 1.5 for the random input 2.
module tb_spectral_bist_top;
  localparam int D = 4, HL = 2, NVEC = 64000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [2:0]  cut_pi;
  logic        bist_adv, hold_phase;
  logic [48:0] obs_taps = '0;
  logic        obs_po;
  int checks = 0, failures = 0;

  spectral_bist_top dut (
    .clk(clk), .rst_n(rst_n), .cut_pi(cut_pi), .bist_adv(bist_adv),
    .hold_phase(hold_phase), .obs_taps(obs_taps), .obs_po(obs_po));

  always #5 clk = ~clk;

  // ---- reference model -------------------------------------------------
  int unsigned m_cnt, m_t;
  logic        m_prev_hl;
  logic [15:0] m_ca;

  function automatic logic par(int unsigned x);
    logic p = 1'b0;
    while (x != 0) begin p ^= x[0]; x >>= 1; end
    return p;
  endfunction

  function automatic logic [15:0] ca_step(logic [15:0] s);
    logic [15:0] rule150 = 16'b1010_0001_0001_1101;
    logic [15:0] n;
    n = {1'b0, s[15:1]} ^ {s[14:0], 1'b0} ^ (s & rule150);
    return n;
  endfunction

  // Stream s of weight num/16 from CA cells (3s+k) mod 16.
  function automatic logic wstream(int s, int num, logic [15:0] ca);
    logic [3:0] b;
    logic [3:0] nb;
    for (int k = 0; k < 4; k++) b[k] = ca[(3 * s + k) % 16];
    nb = ~b;
    return int'(nb) < num;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_full = 0, n_held = 0, n_sc [3] = '{0, 0, 0}, n_flip = 0;
    int n_rand1 = 0, n_rand0 = 0, n_wrap = 0, nvec = 0, per_period = 0;
    int n_hold_cycles = 0;
    logic prev_adv = 1'b0;
    logic [2:0] prev_vec = '0;
    real csum [3][16];
    int nwin = 0;
    int x [3][16];
    int cyc = 0;

    foreach (csum[j, r]) csum[j][r] = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    m_cnt = 0; m_t = 0; m_prev_hl = 1'b0; m_ca = 16'h0001;

    while (nvec < NVEC) begin
      automatic int unsigned ph = m_cnt % (2 * D);
      automatic logic hl = (ph % HL) >= HL / 2;
      automatic logic d2 = ph >= D;
      automatic logic adv = d2 ? (hl & ~m_prev_hl) : 1'b1;
      automatic logic s0 = wstream(0, 8, m_ca), s1 = wstream(1, 8, m_ca);
      automatic logic s7 = wstream(7, 4, m_ca), s11 = wstream(11, 8, m_ca);
      automatic logic c1 = ~par(1 & m_t), c3 = ~par(3 & m_t), c6 = par(6 & m_t);
      automatic logic c5 = ~par(5 & m_t);
      automatic logic [2:0] e;
      e[0] = s1 ? c6 : (s0 ? c3 : c1);
      e[1] = c5 ^ s7;
      e[2] = s11;

      obs_taps = {$urandom, $urandom};
      #1;
      check(cut_pi == e, $sformatf("vector at cycle %0d: got %b expected %b", cyc, cut_pi, e));
      check(bist_adv == adv, $sformatf("BIST clock at cycle %0d", cyc));
      check(hold_phase == d2, $sformatf("hold phase at cycle %0d", cyc));
      check(obs_po == ^obs_taps, "observability chain output");
      if (cyc > 0 && !prev_adv) begin
        check(cut_pi == prev_vec, "vector changes only after a BIST clock");
        if (d2) n_hold_cycles++;
      end
      prev_adv = adv;
      prev_vec = cut_pi;

      if (adv) begin
        // Account for the vector applied in this BIST clock period.
        nvec++;
        per_period++;
        if (d2) begin
          n_held++;
        end else n_full++;
        if (s1) n_sc[2]++; else if (s0) n_sc[1]++; else n_sc[0]++;
        if (s7) n_flip++;
        if (cut_pi[2]) n_rand1++; else n_rand0++;
        for (int j = 0; j < 3; j++) x[j][m_t % 16] = cut_pi[j] ? 1 : -1;
        if (m_t % 16 == 15) begin
          n_wrap++;
          nwin++;
          for (int j = 0; j < 3; j++)
            for (int r = 0; r < 16; r++) begin
              automatic int c = 0;
              for (int t = 0; t < 16; t++) c += par(r & t) ? -x[j][t] : x[j][t];
              csum[j][r] += real'(c);
            end
        end
      end
      if (ph == 2 * D - 1) begin
        check(per_period == D + D / HL, $sformatf("BIST clocks per period %0d", per_period));
        per_period = 0;
      end

      @(negedge clk);
      cyc++;
      m_prev_hl = hl;
      m_cnt++;
      if (adv) begin
        m_t++;
        m_ca = ca_step(m_ca);
      end
    end

    // Session length: NVEC vectors need NVEC/(D + D/HL) periods of 2*D cycles.
    check(cyc <= (NVEC * 2 * D) / (D + D / HL) + 2 * D, $sformatf("session took %0d cycles", cyc));
    check(n_full > 0, "full-rate vectors applied");
    check(n_held > 0, "held vectors applied");
    check(n_hold_cycles == n_held * (HL - 1) || n_hold_cycles == (n_held + 1) * (HL - 1),
          $sformatf("held vectors stay H_L cycles: %0d extra cycles for %0d vectors", n_hold_cycles, n_held));
    check(n_full == 2 * n_held || n_full == 2 * n_held + D || n_full + D / HL == 2 * (n_held + D / HL),
          $sformatf("full/held ratio %0d/%0d", n_full, n_held));
    for (int k = 0; k < 3; k++) check(n_sc[k] > 0, $sformatf("synthesizer chose SC%0d %0d times", k + 1, n_sc[k]));
    check(n_flip > 0, "randomizer flipped bits");
    check(n_rand1 > 0 && n_rand0 > 0, "random input took both values");
    check(n_wrap > 0, "Walsh counter wrapped");

    begin
      real a [3][16];
      for (int j = 0; j < 3; j++)
        for (int r = 0; r < 16; r++) a[j][r] = csum[j][r] / real'(nwin);
      check(a[0][1] > 3.0 && a[0][1] < 5.0, $sformatf("input 0 row 1 = %f", a[0][1]));
      check(a[0][3] > 3.0 && a[0][3] < 5.0, $sformatf("input 0 row 3 = %f", a[0][3]));
      check(a[0][6] < -7.0 && a[0][6] > -9.0, $sformatf("input 0 row 6 = %f", a[0][6]));
      check(a[1][5] > 7.0 && a[1][5] < 9.0, $sformatf("input 1 row 5 = %f", a[1][5]));
      for (int r = 0; r < 16; r++) begin
        if (r != 1 && r != 3 && r != 6) check(a[0][r] < 1.5 && a[0][r] > -1.5, $sformatf("input 0 row %0d = %f", r, a[0][r]));
        if (r != 5) check(a[1][r] < 1.5 && a[1][r] > -1.5, $sformatf("input 1 row %0d = %f", r, a[1][r]));
        check(a[2][r] < 1.5 && a[2][r] > -1.5, $sformatf("input 2 row %0d = %f", r, a[2][r]));
      end
    end

    $display("mechanisms: full-rate=%0d held=%0d sc1=%0d sc2=%0d sc3=%0d flips=%0d rand1=%0d rand0=%0d wraps=%0d cycles=%0d",
             n_full, n_held, n_sc[0], n_sc[1], n_sc[2], n_flip, n_rand1, n_rand0, n_wrap, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
