// tb_vplc_core: end-to-end testbench of the VPLC core at its default
// sizes (4096-point MOD, full 288*(n+1)-bit LDPC code).
//
// MOD: a transmitter symbol of 16-QAM points on every subcarrier is
// turned into time samples by the core's IFFT, scaled up by 32 (the
// gain stage that sits between the cores in a modem), and turned back
// into subcarriers by the core's FFT; every subcarrier must decide to the
// point that was sent. Done for a 4096-point data symbol and a 512-point
// control symbol. The transmitter's IFFT output also goes through the
// cyclic-prefix inserter (448 samples for data, 128 for control symbols),
// whose line symbol is checked sample by sample.
// FEC: random information words are encoded by the core's encoder, sent
// as LLRs of +/-20 with some bits received wrong at low confidence, and
// decoded by the core's decoder; every information bit must come back,
// with parity_ok set. Rates 7/8 (fixed iterations, latency checked) and
// 1/2 (early stop).
// Each mechanism must occur at least once: inverse transform, 512-point
// mode (stage bypass and radix-2 step), a stage emptying after a burst,
// full-iteration decoding, early-stopped decoding and prefix insertion.
module tb_vplc_core;
  import vplc_pkg::*;

  localparam int G = LDPC_G, MB = LDPC_MB, K = LDPC_KMAX, M = LDPC_M;

  logic clk = 0, rst_n = 0;
  nsel_e mod_nsel;
  logic mod_inverse, mod_in_valid, mod_in_ready, mod_out_valid, mod_busy;
  cplx_t mod_in_data, mod_out_data;
  cpfmt_e cp_fmt;
  logic cp_in_valid, cp_in_ready, cp_out_valid, cp_out_first;
  cplx_t cp_in_data, cp_out_data;
  logic enc_slot_start, enc_in_valid, enc_out_valid, enc_p1_out;
  logic [2:0] enc_rate_n;
  logic [K-1:0][MB-1:0] enc_u_in;
  logic [MB-2:0] enc_p2_out;
  logic dec_in_ready, dec_in_valid, dec_early_stop, dec_out_valid;
  logic [2:0] dec_rate_n;
  logic [3:0] dec_max_iter, dec_iter_used;
  logic signed [5:0] dec_llr_in [K+1];
  logic [K-1:0] dec_cn_out;
  logic [1:0] dec_checksum;

  vplc_core dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;
  int n_inverse = 0, n_512 = 0, n_drain = 0, n_full = 0, n_early = 0, n_cp = 0;

  always @(posedge clk) if (rst_n && !mod_in_ready) n_drain++;

  // ---------------- MOD ----------------
  int   sym_i [4096], sym_q [4096];
  cplx_t buf_t [4096];
  cplx_t buf_f [4096];

  task automatic mod_pass(nsel_e s, bit inv, int N, bit from_t);
    int got = 0;
    @(negedge clk);
    mod_nsel = s; mod_inverse = inv;
    while (!mod_in_ready || mod_busy) @(negedge clk);
    fork
      for (int i = 0; i < N; i++) begin
        mod_in_valid = 1;
        if (from_t) begin
          // gain of 32 between transmitter and receiver, saturating
          int r = 32 * int'(buf_t[i].re), q = 32 * int'(buf_t[i].im);
          mod_in_data.re = 16'((r > 32767) ? 32767 : (r < -32768) ? -32768 : r);
          mod_in_data.im = 16'((q > 32767) ? 32767 : (q < -32768) ? -32768 : q);
        end else begin
          mod_in_data.re = 16'(sym_i[i] * 4000);
          mod_in_data.im = 16'(sym_q[i] * 4000);
        end
        @(negedge clk);
        mod_in_valid = 0;
      end
      while (got < N) begin
        @(posedge clk);
        if (mod_out_valid) begin
          if (from_t) buf_f[got] = mod_out_data; else buf_t[got] = mod_out_data;
          got++;
        end
      end
    join
    if (inv) n_inverse++;
    if (s == NSEL_512) n_512++;
  endtask

  function automatic int decide(int v, int N);
    // received level = sent * 4000 * 32 / N
    real u = real'(v) * real'(N) / (4000.0 * 32.0);
    return (u > 2.0) ? 3 : (u > 0.0) ? 1 : (u > -2.0) ? -1 : -3;
  endfunction

  task automatic mod_test(nsel_e s);
    int N = (s == NSEL_4096) ? 4096 : 512, bad = 0;
    for (int i = 0; i < N; i++) begin
      sym_i[i] = 2 * $urandom_range(0, 3) - 3;
      sym_q[i] = 2 * $urandom_range(0, 3) - 3;
    end
    mod_pass(s, 1, N, 0);    // transmitter: IFFT
    if (s == NSEL_4096) cp_test(CP_DATA, 4096, 448);
    else                cp_test(CP_CONTROL, 512, 128);
    mod_pass(s, 0, N, 1);    // receiver: FFT
    for (int k = 0; k < N; k++) begin
      checks++;
      if (decide(buf_f[k].re, N) != sym_i[k] || decide(buf_f[k].im, N) != sym_q[k]) begin
        failures++; bad++;
        if (bad < 4) $display("N=%0d carrier %0d: got %0d,%0d sent %0d,%0d", N, k,
                              buf_f[k].re, buf_f[k].im, sym_i[k], sym_q[k]);
      end
    end
    $display("MOD N=%0d: %0d of %0d subcarriers wrong", N, bad, N);
  endtask

  // ---------------- cyclic prefix ----------------
  // The IFFT output of the last transmitter symbol (buf_t) goes through
  // the prefix inserter: the line symbol must be its last P samples, then
  // all N.
  task automatic cp_test(cpfmt_e f, int N, int P);
    int got = 0, bad = 0;
    @(negedge clk);
    cp_fmt = f;
    fork
      for (int i = 0; i < N; i++) begin
        cp_in_valid = 1; cp_in_data = buf_t[i];
        @(posedge clk);
        while (!cp_in_ready) @(posedge clk);
        @(negedge clk);
        cp_in_valid = 0;
      end
      while (got < N + P) begin
        @(posedge clk);
        if (cp_out_valid) begin
          cplx_t e;
          e = (got < P) ? buf_t[N - P + got] : buf_t[got - P];
          checks++;
          if (cp_out_data != e || cp_out_first != (got == 0)) begin
            failures++; bad++;
            if (bad < 4) $display("CP sample %0d wrong", got);
          end
          got++;
        end
      end
    join
    n_cp++;
    $display("CP N=%0d P=%0d: %0d of %0d line samples wrong", N, P, bad, N + P);
  endtask

  // ---------------- FEC ----------------
  bit info [K * M];
  bit par [M];

  task automatic fec_test(int n, int iters, bit es, int nerr);
    int llr [(K + 1) * M];
    int ob = 0, errs = 0, j = 0;
    longint t0, t1;
    for (int b = 0; b < K * M; b++) info[b] = (b < n * M) ? 1'($urandom_range(0, 1)) : 1'b0;
    // encode
    do @(negedge clk); while (!enc_slot_start);
    fork
      for (int t = 0; t < G; t++) begin
        enc_in_valid = 1; enc_rate_n = 3'(n);
        for (int k = 0; k < K; k++)
          for (int jj = 0; jj < MB; jj++) enc_u_in[k][jj] = info[k * M + jj * G + t];
        @(negedge clk);
        enc_in_valid = 0;
      end
      while (ob < G) begin
        @(posedge clk);
        if (enc_out_valid) begin
          par[ob] = enc_p1_out;
          for (int r = 0; r < MB - 1; r++) par[G + r * G + ob] = enc_p2_out[r];
          ob++;
        end
      end
    join
    // channel
    for (int b = 0; b < K * M; b++) llr[b] = info[b] ? -20 : 20;
    for (int b = 0; b < M; b++) llr[K * M + b] = par[b] ? -20 : 20;
    for (int e = 0; e < nerr; e++) begin
      int grp = $urandom_range(0, n), pos = $urandom_range(0, M - 1);
      int b = (grp == n) ? K * M + pos : grp * M + pos;
      llr[b] = (llr[b] < 0) ? 3 : -3;
    end
    // decode
    while (!dec_in_ready) @(negedge clk);
    for (int jj = 0; jj < M; jj++) begin
      dec_in_valid = 1; dec_rate_n = 3'(n); dec_max_iter = 4'(iters); dec_early_stop = es;
      for (int k = 0; k <= K; k++) dec_llr_in[k] = 6'(llr[k * M + jj]);
      if (jj == 0) t0 = cyc;
      @(negedge clk);
    end
    dec_in_valid = 0;
    while (j < M) begin
      @(posedge clk);
      if (dec_out_valid) begin
        for (int k = 0; k < K; k++) if (dec_cn_out[k] != info[k * M + j]) errs++;
        if (j == M - 1) begin
          t1 = cyc;
          checks++;
          if (!dec_checksum[0]) begin failures++; $display("FEC rate %0d: parity check failed", n); end
          if (dec_checksum[1]) n_early++; else n_full++;
        end
        j++;
      end
    end
    checks++;
    if (errs) begin failures++; $display("FEC rate %0d/%0d: %0d bits wrong", n, n + 1, errs); end
    if (!es) begin
      checks++;
      if (t1 - t0 + 1 != 288 * (2 * iters + 4)) begin failures++; $display("decoder latency %0d", t1 - t0 + 1); end
    end
    $display("FEC rate %0d/%0d, %0d weak errors: %0d bits wrong, %0d iterations, checksum %b",
             n, n + 1, nerr, errs, dec_iter_used, dec_checksum);
  endtask

  initial begin
    mod_nsel = NSEL_4096; mod_inverse = 0; mod_in_valid = 0; mod_in_data = '0;
    cp_fmt = CP_DATA; cp_in_valid = 0; cp_in_data = '0;
    enc_in_valid = 0; enc_rate_n = 1; enc_u_in = '0;
    dec_in_valid = 0; dec_rate_n = 1; dec_max_iter = 1; dec_early_stop = 0;
    for (int k = 0; k <= K; k++) dec_llr_in[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mod_test(NSEL_4096);
    mod_test(NSEL_512);
    fec_test(7, 3, 0, 12);
    fec_test(1, 8, 1, 10);
    checks += 6;
    if (n_cp == 0)      begin failures++; $display("prefix inserter never used"); end
    if (n_inverse == 0) begin failures++; $display("inverse transform never used"); end
    if (n_512 == 0)     begin failures++; $display("512-point mode never used"); end
    if (n_drain == 0)   begin failures++; $display("no stage ever emptied"); end
    if (n_full == 0)    begin failures++; $display("no full-iteration decode"); end
    if (n_early == 0)   begin failures++; $display("no early stop"); end
    $display("mechanisms: inverse %0d, 512-point %0d, drain clocks %0d, full decodes %0d, early stops %0d, prefixed symbols %0d",
             n_inverse, n_512, n_drain, n_full, n_early, n_cp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
