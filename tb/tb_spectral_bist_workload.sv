// tb_spectral_bist_workload: the generator at the size of a large benchmark
// circuit: 28 primary inputs, Hadamard order 8 (the upper bound of the
// intended range), D = 1024 (a 55,110-vector ATPG set divided by 50 and
// rounded to a power of two), H_L = 8, run for a 64,000-vector session.
//
// The configuration is generated by a formula: input j has j mod 5
// components (0..4) on rows spread over all 256, mixed with weights 1/16 ..
// 15/16, and, for two inputs in three, a randomizer whose weight cycles
// through 2^-6, 2^-8 and i/16. A generic reference model written here
// predicts every vector from the configuration; every cycle is compared.
// The test counts how often each component count, each weight kind, full-
// rate and held vectors occur and fails on any that never does. For every
// component it then measures the averaged coefficient of that Hadamard row
// over aligned 256-vector windows and compares it with
// 256 * sign * share * (1 - 2 * noise), where the share follows from the mux
// weights; the tolerance is 12.
module tb_spectral_bist_workload;
  import sbist_pkg::*;

  localparam int NPI = 28, N = 8, D = 1024, HL = 8, NVEC = 64000;
  localparam int ROWS = 1 << N;

  function automatic pi_cfg_t [NPI-1:0] make_cfg();
    pi_cfg_t [NPI-1:0] c;
    for (int j = 0; j < NPI; j++) begin
      c[j] = '0;
      c[j].ms = 3'(j % 5);
      for (int k = 0; k < 4; k++) begin
        c[j].row[k] = 8'((j * 37 + k * 71 + 1) % ROWS);
        c[j].neg[k] = ((j + k) % 3 == 0);
      end
      for (int k = 0; k < 3; k++) c[j].mix[k] = '{kind: W_FRAC, num: 4'(((j * 5 + k * 3) % 15) + 1)};
      if (j % 5 == 0) begin
        c[j].noise = '{kind: W_FRAC, num: 4'(j % 16)};
      end else begin
        c[j].noise_en = (j % 3 != 0);
        case (j % 4)
          0: c[j].noise = '{kind: W_2M6, num: 4'd0};
          1: c[j].noise = '{kind: W_2M8, num: 4'd0};
          default: c[j].noise = '{kind: W_FRAC, num: 4'((j % 7) + 1)};
        endcase
      end
    end
    return c;
  endfunction

  localparam pi_cfg_t [NPI-1:0] CFG = make_cfg();

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NPI-1:0] cut_pi;
  logic bist_adv, hold_phase;
  logic [48:0] obs_taps = '0;
  logic obs_po;
  int checks = 0, failures = 0;

  spectral_bist_top #(.N(N), .NUM_PI(NPI), .CFG(CFG), .D(D), .H_L(HL)) dut (
    .clk(clk), .rst_n(rst_n), .cut_pi(cut_pi), .bist_adv(bist_adv),
    .hold_phase(hold_phase), .obs_taps(obs_taps), .obs_po(obs_po));

  always #5 clk = ~clk;

  function automatic logic par(int unsigned x);
    logic p = 1'b0;
    while (x != 0) begin p ^= x[0]; x >>= 1; end
    return p;
  endfunction

  function automatic logic [15:0] ca_step(logic [15:0] s);
    logic [15:0] rule150 = 16'b1010_0001_0001_1101;
    return {1'b0, s[15:1]} ^ {s[14:0], 1'b0} ^ (s & rule150);
  endfunction

  function automatic logic wbit(int s, weight_t w, logic [15:0] ca);
    logic [7:0] b;
    logic [3:0] nb;
    for (int k = 0; k < 8; k++) b[k] = ca[(3 * s + k) % 16];
    nb = ~b[3:0];
    case (w.kind)
      W_2M6:   return &b[5:0];
      W_2M8:   return &b[7:0];
      default: return nb < w.num;
    endcase
  endfunction

  // Probability of a weight, for the expected spectrum.
  function automatic real wprob(weight_t w);
    case (w.kind)
      W_2M6:   return 1.0 / 64.0;
      W_2M8:   return 1.0 / 256.0;
      default: return real'(w.num) / 16.0;
    endcase
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int unsigned m_cnt = 0, m_t = 0;
    static logic m_prev_hl = 1'b0;
    static logic [15:0] m_ca = 16'h0001;
    static int n_full = 0, n_held = 0, nvec = 0, cyc = 0, nwin = 0;
    static int n_ms [5] = '{0, 0, 0, 0, 0};
    static int n_kind [3] = '{0, 0, 0};
    real acc [NPI][4];
    real win [NPI][4];

    foreach (acc[j, k]) begin acc[j][k] = 0.0; win[j][k] = 0.0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    while (nvec < NVEC) begin
      automatic int unsigned ph = m_cnt % (2 * D);
      automatic logic hl = (ph % HL) >= HL / 2;
      automatic logic d2 = ph >= D;
      automatic logic adv = d2 ? (hl & ~m_prev_hl) : 1'b1;
      automatic logic [NPI-1:0] e;

      for (int j = 0; j < NPI; j++) begin
        automatic int ms = int'(CFG[j].ms);
        automatic logic nz = wbit(4 * j + 3, CFG[j].noise, m_ca);
        if (ms == 0) e[j] = nz;
        else begin
          automatic logic v = par(CFG[j].row[0] & m_t) ^ ~CFG[j].neg[0];
          for (int k = 0; k < ms - 1; k++)
            if (wbit(4 * j + k, CFG[j].mix[k], m_ca))
              v = par(CFG[j].row[k+1] & m_t) ^ ~CFG[j].neg[k+1];
          e[j] = CFG[j].noise_en ? (v ^ nz) : v;
        end
      end

      obs_taps = {$urandom, $urandom};
      #1;
      check(cut_pi == e, $sformatf("vector at cycle %0d: got %h expected %h", cyc, cut_pi, e));
      check(bist_adv == adv, $sformatf("BIST clock at cycle %0d", cyc));
      check(obs_po == ^obs_taps, "observability chain output");

      if (adv) begin
        nvec++;
        if (d2) n_held++; else n_full++;
        for (int j = 0; j < NPI; j++) begin
          automatic int x = cut_pi[j] ? 1 : -1;
          n_ms[CFG[j].ms]++;
          if (CFG[j].noise_en || CFG[j].ms == 0) n_kind[CFG[j].noise.kind]++;
          for (int k = 0; k < int'(CFG[j].ms); k++)
            win[j][k] += par(CFG[j].row[k] & m_t) ? -x : x;
        end
        if (m_t % ROWS == ROWS - 1) begin
          nwin++;
          foreach (acc[j, k]) begin acc[j][k] += win[j][k]; win[j][k] = 0.0; end
        end
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

    check(n_full > 0 && n_held > 0, $sformatf("full-rate %0d and held %0d vectors", n_full, n_held));
    check(cyc <= (NVEC * 2 * D) / (D + D / HL) + 2 * D, $sformatf("session took %0d cycles", cyc));
    for (int m = 0; m < 5; m++) check(n_ms[m] > 0, $sformatf("inputs with %0d components exercised", m));
    for (int k = 0; k < 3; k++) check(n_kind[k] > 0, $sformatf("noise weight kind %0d exercised", k));

    // Expected coefficient of each configured component.
    for (int j = 0; j < NPI; j++) begin
      automatic int ms = int'(CFG[j].ms);
      automatic real share [4];
      automatic real keep = 1.0;
      automatic real gain = CFG[j].noise_en ? (1.0 - 2.0 * wprob(CFG[j].noise)) : 1.0;
      for (int k = ms - 1; k >= 1; k--) begin
        share[k] = keep * wprob(CFG[j].mix[k-1]);
        keep = keep * (1.0 - wprob(CFG[j].mix[k-1]));
      end
      if (ms > 0) share[0] = keep;
      for (int k = 0; k < ms; k++) begin
        automatic real expv = real'(ROWS) * share[k] * gain * (CFG[j].neg[k] ? -1.0 : 1.0);
        automatic real got = acc[j][k] / real'(nwin);
        check(got > expv - 12.0 && got < expv + 12.0,
              $sformatf("input %0d row %0d coefficient %f, expected %f", j, CFG[j].row[k], got, expv));
      end
    end

    $display("mechanisms: full-rate=%0d held=%0d windows=%0d ms0..4=%0d/%0d/%0d/%0d/%0d kinds=%0d/%0d/%0d cycles=%0d",
             n_full, n_held, nwin, n_ms[0], n_ms[1], n_ms[2], n_ms[3], n_ms[4],
             n_kind[0], n_kind[1], n_kind[2], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
