// tb_ldpc_enc: self-checking testbench of the LDPC encoder.
//
// Random information words of every rate (1/2 .. 7/8) are offered in
// consecutive 24-clock slots. For every codeword the testbench rebuilds
// the whole codeword [u | p1 | p2] and checks each of the 288 rows of the
// parity-check matrix H (built here from the circulant shift values) for
// even parity; the parity part of H is invertible, so this pins down the
// parity bits uniquely. It also checks the pipeline timing: the first
// parity bit leaves 72 clocks and the last 95 clocks after the first
// information bit, i.e. 96 clocks latency, and a new codeword is accepted
// every slot.
module tb_ldpc_enc;
  import vplc_pkg::*;

  localparam int G = LDPC_G, MB = LDPC_MB, K = LDPC_KMAX, NCW = 12;

  logic clk = 0, rst_n = 0;
  logic slot_start, in_valid, out_valid, p1_out;
  logic [2:0] rate_n;
  logic [K-1:0][MB-1:0] u_in;
  logic [MB-2:0] p2_out;

  int checks = 0, failures = 0;

  ldpc_enc dut (.*);

  always #5 clk = ~clk;

  // stimulus memory
  logic [K*LDPC_M-1:0] info [NCW];
  int                  rates [NCW];
  logic [LDPC_M-1:0]   par [NCW];     // p1 (24) then p2_0..p2_10
  longint              t_in [NCW], t_first [NCW], t_last [NCW];
  longint              cyc = 0;
  int                  ocw = 0, obit = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // drive
  initial begin
    in_valid = 0; rate_n = 1; u_in = '0;
    for (int w = 0; w < NCW; w++) begin
      rates[w] = (w % 7) + 1;
      for (int b = 0; b < K * LDPC_M; b++) info[w][b] = $urandom_range(0, 1);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NCW; w++) begin
      do @(negedge clk); while (!slot_start);
      t_in[w] = cyc;
      for (int t = 0; t < G; t++) begin
        in_valid = 1;
        rate_n   = 3'(rates[w]);
        for (int k = 0; k < K; k++)
          for (int j = 0; j < MB; j++)
            u_in[k][j] = info[w][k*LDPC_M + j*G + t];
        if (t < G - 1) @(negedge clk);
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // collect
  always @(posedge clk) if (rst_n && out_valid && ocw < NCW) begin
    if (obit == 0) t_first[ocw] = cyc;
    par[ocw][obit] = p1_out;
    for (int r = 0; r < MB - 1; r++) par[ocw][G + r*G + obit] = p2_out[r];
    if (obit == G - 1) begin
      t_last[ocw] = cyc;
      obit = 0; ocw++;
    end else obit++;
  end

  function automatic bit cw_bit(int w, int c, int e);
    // bit e of block column c of codeword w
    if (c < LDPC_PCOL) begin
      if (c / MB >= rates[w]) return 0;
      return info[w][(c / MB) * LDPC_M + (c % MB) * G + e];
    end
    return par[w][(c - LDPC_PCOL) * G + e];
  endfunction

  initial begin
    wait (ocw == NCW);
    for (int w = 0; w < NCW; w++) begin
      int bad;
      bad = 0;
      for (int r = 0; r < MB; r++)
        for (int i = 0; i < G; i++) begin
          bit s;
          s = 0;
          for (int c = 0; c < LDPC_NB; c++)
            if (hb_shift(r, c) >= 0) s ^= cw_bit(w, c, (i + hb_shift(r, c)) % G);
          checks++;
          if (s) begin failures++; bad++; end
        end
      if (bad) $display("codeword %0d rate %0d/%0d: %0d parity rows violated", w, rates[w], rates[w]+1, bad);
      checks++;
      if (t_first[w] - t_in[w] != 72 || t_last[w] - t_in[w] != 95) begin
        failures++;
        $display("codeword %0d: latency first %0d last %0d", w, t_first[w]-t_in[w], t_last[w]-t_in[w]);
      end
      if (w > 0) begin
        checks++;
        if (t_in[w] - t_in[w-1] != G) begin failures++; $display("slot spacing wrong"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
