// fft_mod: the modulation/demodulation (MOD) core, a pipelined FFT/IFFT of
// 4096 or 512 points for the DMT symbols of the power-line modem.
//
// Structure: an N-FFT selector, six radix-4 stages (fft_r4_stage, frame
// lengths 4096, 1024, 256, 64, 16, 4) and the output sample reorder
// (fft_reorder). For N = 4096 all six stages run radix-4. For N = 512
// stage 1 is bypassed and stage 2 runs in radix-2 mode on 512-sample
// frames, so that 512 = 2 * 4^4. Each step scales by 1/radix, so the
// result is X[k]/N with X the DFT of eq. X[k] = sum x[n] W_N^(nk).
// The inverse transform reuses the same hardware by swapping the real and
// imaginary parts of the input and of the output, which yields
// (1/N) sum X[k] W_N^(-nk), the usual inverse DFT.
//
// Interface: one complex sample per clock (in_valid); a symbol is N
// consecutive samples and symbols may follow back to back; a new burst
// may start only while in_ready is high (it drops for a while after a
// burst ends, while the first stage empties). nsel and
// inverse must be held constant while a burst is in the core (idle
// checked by busy = 0). Output: N samples in natural order, one per
// clock, out_valid high.
// Latency, first input to first output: 8198 clocks for 4096 points and
// 1030 for 512: 3/4 of every enabled stage frame, one symbol in the
// reorder buffer and a few register clocks.
//
// The radix-4 DIF pipeline, the selector of N, the reorder and the
// IFFT by port swapping follow the source design; the radix-2 step for
// 512 points and the fixed per-stage scaling are this design's choices.
// The source's input magnitude analysis (a table-driven choice of
// fixed-point scaling) is not built: its table is not given.
module fft_mod
  import vplc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  nsel_e nsel,
  input  logic  inverse,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  busy
);
  localparam int NST = 6;

  logic  sv [NST+1];
  cplx_t sd [NST+1];
  logic  st_en [NST];
  logic  st_r2 [NST];
  logic  st_rdy [NST];
  cplx_t ro_d;
  logic  ro_v;
  logic [15:0] inflight;

  function automatic cplx_t swap_ri(cplx_t a);
    cplx_t b;
    b.re = a.im;
    b.im = a.re;
    return b;
  endfunction

  // N-FFT selector: stage enables and radix modes
  always_comb begin
    for (int s = 0; s < NST; s++) begin
      st_en[s] = !(nsel == NSEL_512 && s == 0);
      st_r2[s] = (nsel == NSEL_512 && s == 1);
    end
    sv[0] = in_valid;
    sd[0] = inverse ? swap_ri(in_data) : in_data;
  end

  for (genvar s = 0; s < NST; s++) begin : g_stage
    fft_r4_stage #(.NS(FFT_NMAX >> (2 * s))) u_st (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (st_en[s]),
      .r2       (st_r2[s]),
      .in_valid (sv[s]),
      .in_data  (sd[s]),
      .out_valid(sv[s+1]),
      .out_data (sd[s+1]),
      .in_ready (st_rdy[s])
    );
  end

  fft_reorder u_ro (
    .clk(clk), .rst_n(rst_n), .nsel(nsel),
    .in_valid(sv[NST]), .in_data(sd[NST]),
    .out_valid(ro_v), .out_data(ro_d)
  );

  // the first enabled stage may be emptying itself after a burst
  assign in_ready  = (nsel == NSEL_512) ? st_rdy[1] : st_rdy[0];
  assign out_valid = ro_v;
  assign out_data  = inverse ? swap_ri(ro_d) : ro_d;

  // samples accepted but not yet delivered
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 16'(in_valid) - 16'(ro_v);
  end
  assign busy = (inflight != '0);
endmodule
