// tb_ldpc_dec: self-checking testbench of the min-sum LDPC decoder.
//
// The testbench encodes random information words itself (p1 = C*u +
// sum of A*u, p2 = running XOR of A*u + B*p1, the same code as the
// encoder) and checks that every parity row holds. It then sends strong
// LLRs (+/-20) with a number of bits received wrong at low confidence,
// and checks: every decided information bit equals the sent one, the
// parity_ok flag, whether the decoder stopped early, and, without early
// stop, the latency of 288*(2*max_iter + 4) clocks from the first input
// to the last output. Cases: rate 7/8 with 3 iterations, rate 1/2 and
// 4/5 with early stop, a clean word that stops after one MIN stage, every
// rate 1/2..7/8 with early stop, and a word with many confidently wrong
// bits and one iteration, for which the parity flag must stay low.
module tb_ldpc_dec;
  import vplc_pkg::*;

  localparam int G = LDPC_G, MB = LDPC_MB, K = LDPC_KMAX, M = LDPC_M;

  logic clk = 0, rst_n = 0;
  logic in_ready, in_valid, early_stop, out_valid;
  logic [2:0] rate_n;
  logic [3:0] max_iter, iter_used;
  logic signed [5:0] llr_in [K+1];
  logic [K-1:0] cn_out;
  logic [1:0] checksum;

  int checks = 0, failures = 0;
  int n_early = 0, n_full = 0;

  ldpc_dec dut (.*);

  always #5 clk = ~clk;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  bit cw [LDPC_NB * G];      // codeword by physical block column
  bit dec [K * M];

  function automatic void encode(int n);
    bit au [MB][G];
    bit p1 [G];
    bit x;
    for (int b = 0; b < LDPC_NB * G; b++) if (b >= n * M && b < LDPC_PCOL * G) cw[b] = 0;
    for (int r = 0; r < MB; r++)
      for (int i = 0; i < G; i++) begin
        x = 0;
        for (int c = 0; c < LDPC_PCOL; c++)
          if (hb_shift(r, c) >= 0) x ^= cw[c * G + (i + hb_shift(r, c)) % G];
        au[r][i] = x;
      end
    for (int i = 0; i < G; i++) begin
      x = 0;
      for (int r = 0; r < MB; r++) x ^= au[r][i];
      p1[i] = x;
      cw[LDPC_PCOL * G + i] = x;
    end
    for (int i = 0; i < G; i++) begin
      x = 0;
      for (int r = 0; r < MB - 1; r++) begin
        x ^= au[r][i];
        if (hb_shift(r, LDPC_PCOL) >= 0) x ^= p1[(i + hb_shift(r, LDPC_PCOL)) % G];
        cw[(LDPC_PCOL + 1 + r) * G + i] = x;
      end
    end
  endfunction

  function automatic int syndrome_weight();
    int wgt = 0;
    for (int r = 0; r < MB; r++)
      for (int i = 0; i < G; i++) begin
        bit s = 0;
        for (int c = 0; c < LDPC_NB; c++)
          if (hb_shift(r, c) >= 0) s ^= cw[c * G + (i + hb_shift(r, c)) % G];
        wgt += s;
      end
    return wgt;
  endfunction

  task automatic run(int n, int iters, bit es, int nerr, bit expect_early,
                     int nstrong = 0, bit expect_ok = 1'b1);
    int llr [LDPC_NB * G];
    longint t0, t1;
    int j, errs;
    for (int b = 0; b < n * M; b++) cw[b] = $urandom_range(0, 1);
    encode(n);
    checks++;
    if (syndrome_weight() != 0) begin failures++; $display("reference encoder broken"); end
    for (int b = 0; b < LDPC_NB * G; b++) llr[b] = cw[b] ? -20 : 20;
    // low-confidence wrong bits, spread over info and parity
    for (int e = 0; e < nerr; e++) begin
      int grp = $urandom_range(0, n);          // n = parity group
      int pos = $urandom_range(0, M - 1);
      int b = (grp == n) ? LDPC_PCOL * G + pos : grp * M + pos;
      llr[b] = cw[b] ? 3 : -3;
    end
    // confidently wrong bits: too many for one iteration to repair
    for (int e = 0; e < nstrong; e++) begin
      int b = $urandom_range(0, n * M - 1);
      llr[b] = cw[b] ? 20 : -20;
    end
    while (!in_ready) @(negedge clk);
    for (int jj = 0; jj < M; jj++) begin
      in_valid = 1; rate_n = 3'(n); max_iter = 4'(iters); early_stop = es;
      for (int k = 0; k < K; k++) llr_in[k] = 6'(llr[k * M + jj]);
      llr_in[K] = 6'(llr[LDPC_PCOL * G + jj]);
      if (jj == 0) t0 = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    j = 0;
    while (j < M) begin
      @(posedge clk);
      if (out_valid) begin
        for (int k = 0; k < K; k++) dec[k * M + j] = cn_out[k];
        if (j == M - 1) begin
          t1 = cyc;
          checks++;
          if (checksum[0] != expect_ok) begin
            failures++; $display("parity_ok %0b expected %0b, n=%0d", checksum[0], expect_ok, n);
          end
          if (!checksum[1]) begin
            checks++;
            if (iter_used != 4'(iters)) begin
              failures++; $display("iter_used %0d expected %0d", iter_used, iters);
            end
          end
          checks++;
          if (checksum[1] != expect_early) begin
            failures++; $display("stopped_early=%0b expected %0b", checksum[1], expect_early);
          end
          if (checksum[1]) n_early++; else n_full++;
        end
        j++;
      end
    end
    errs = 0;
    for (int b = 0; b < K * M; b++) begin
      bit ref_b = (b < n * M) ? cw[b] : 1'b0;
      if (dec[b] != ref_b) errs++;
    end
    if (expect_ok) begin
      checks++;
      if (errs != 0) begin failures++; $display("rate %0d: %0d info bits wrong", n, errs); end
    end
    if (!es) begin
      checks++;
      if (t1 - t0 + 1 != 288 * (2 * iters + 4)) begin
        failures++; $display("latency %0d expected %0d", t1 - t0 + 1, 288 * (2 * iters + 4));
      end
    end
    $display("case rate %0d/%0d iters %0d early_stop %0b errors %0d: used %0d, checksum %b",
             n, n + 1, iters, es, nerr, iter_used, checksum);
  endtask

  initial begin
    in_valid = 0; rate_n = 1; max_iter = 1; early_stop = 0;
    for (int k = 0; k <= K; k++) llr_in[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(7, 3, 0, 12, 0);
    run(1, 8, 1, 8, 1);
    run(4, 6, 1, 10, 1);
    run(3, 4, 1, 0, 1);
    for (int n = 1; n <= K; n++) run(n, 8, 1, 6, 1);
    run(2, 1, 0, 0, 0, 60, 1'b0);
    checks++;
    if (n_early == 0 || n_full == 0) begin failures++; $display("stop option not exercised both ways"); end
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
