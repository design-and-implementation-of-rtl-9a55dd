// fft_cmult: complex multiplier of an FFT stage (variable complex
// multiplier).
//
// y = round(x * w / 2^14) for a 16-bit complex sample x and a Q1.14
// twiddle w, with four real products and two additions:
//   re = xr*wr - xi*wi,  im = xr*wi + xi*wr.
// The result is rounded half-up and saturated to 16 bits. One register
// stage at the output: y is valid one clock after x and w. The source
// design names the multiplier; the rounding, saturation and single
// pipeline register are this design's choices.
module fft_cmult
  import vplc_pkg::*;
(
  input  logic  clk,
  input  cplx_t x,
  input  twid_t w,
  output cplx_t y
);
  localparam int PW = FFT_W + TW_W + 1;

  function automatic logic signed [FFT_W-1:0] rnd_sat(logic signed [PW-1:0] v);
    logic signed [PW-1:0] r;
    r = (v + (PW'(1) <<< (TW_FRAC - 1))) >>> TW_FRAC;
    if (r > PW'(32767))       return 16'sh7fff;
    else if (r < -PW'(32768)) return 16'sh8000;
    else                       return r[FFT_W-1:0];
  endfunction

  logic signed [PW-1:0] pr, pi;

  always_comb begin
    pr = PW'(x.re) * PW'(w.re) - PW'(x.im) * PW'(w.im);
    pi = PW'(x.re) * PW'(w.im) + PW'(x.im) * PW'(w.re);
  end

  always_ff @(posedge clk) begin
    y.re <= rnd_sat(pr);
    y.im <= rnd_sat(pi);
  end
endmodule
