// fft_bf4: radix-4 butterfly (four-point DFT) of a decimation-in-frequency
// FFT stage, with a radix-2 mode.
//
// Radix-4 (r2 = 0), for inputs x0..x3 = x[n], x[n+N/4], x[n+N/2], x[n+3N/4]:
//   g1 = x0 +   x1 + x2 +   x3
//   g2 = x0 - j*x1 - x2 + j*x3
//   g3 = x0 -   x1 + x2 -   x3
//   g4 = x0 + j*x1 - x2 - j*x3
// Radix-2 (r2 = 1), inputs x0 = x[n], x1 = x[n+N/2] (x2, x3 ignored):
//   g1 = x0 + x1,  g2 = x0 - x1,  g3 = g4 = 0.
// The sums are formed in two levels of complex adders, as in the source
// design (four adders on the inputs, then a second level), and are
// scaled by 1/4 (radix-4) or 1/2 (radix-2) with an arithmetic shift so
// that no stage overflows; the scaling is this design's choice.
// Purely combinational.
module fft_bf4
  import vplc_pkg::*;
(
  input  logic  r2,
  input  cplx_t x [4],
  output cplx_t g [4]
);
  localparam int SW = FFT_W + 2;
  typedef logic signed [SW-1:0] s_t;

  s_t ar, ai, br, bi, cr, ci, dr, di;   // first-level sums
  s_t yr [4], yi [4];

  always_comb begin
    // first level: x0 +/- x2, x1 +/- x3
    ar = SW'(x[0].re) + SW'(x[2].re);  ai = SW'(x[0].im) + SW'(x[2].im);
    br = SW'(x[0].re) - SW'(x[2].re);  bi = SW'(x[0].im) - SW'(x[2].im);
    cr = SW'(x[1].re) + SW'(x[3].re);  ci = SW'(x[1].im) + SW'(x[3].im);
    dr = SW'(x[1].re) - SW'(x[3].re);  di = SW'(x[1].im) - SW'(x[3].im);
    if (!r2) begin
      // second level
      yr[0] = ar + cr;  yi[0] = ai + ci;     // g1
      yr[1] = br + di;  yi[1] = bi - dr;     // g2 = b - j*d
      yr[2] = ar - cr;  yi[2] = ai - ci;     // g3
      yr[3] = br - di;  yi[3] = bi + dr;     // g4 = b + j*d
      for (int k = 0; k < 4; k++) begin
        g[k].re = FFT_W'(yr[k] >>> 2);
        g[k].im = FFT_W'(yi[k] >>> 2);
      end
    end else begin
      yr[0] = SW'(x[0].re) + SW'(x[1].re);  yi[0] = SW'(x[0].im) + SW'(x[1].im);
      yr[1] = SW'(x[0].re) - SW'(x[1].re);  yi[1] = SW'(x[0].im) - SW'(x[1].im);
      yr[2] = '0; yi[2] = '0; yr[3] = '0; yi[3] = '0;
      for (int k = 0; k < 4; k++) begin
        g[k].re = FFT_W'(yr[k] >>> 1);
        g[k].im = FFT_W'(yi[k] >>> 1);
      end
    end
  end
endmodule
