// fft_twiddle: variable twiddle-factor generator of the FFT stages.
//
// Returns W = exp(-j*2*pi*e/4096) = cos(t) - j*sin(t), t = 2*pi*e/4096, in
// Q1.14 for an exponent e of 0..4095. Only a quarter-wave cosine table
// (1025 entries, cos(2*pi*f/4096) for f = 0..1024) is stored; the other
// three quadrants come from symmetry:
//   q=0: cos =  C[f]       sin =  C[1024-f]
//   q=1: cos = -C[1024-f]  sin =  C[f]
//   q=2: cos = -C[f]       sin = -C[1024-f]
//   q=3: cos =  C[1024-f]  sin = -C[f]
// with q = e[11:10], f = e[9:0]. The table is computed at elaboration.
// Purely combinational (a ROM). A stage of length NS asks for W_NS^x by
// passing e = x * 4096/NS. The generator is named in the source design;
// the quarter-wave table and the Q1.14 format are this design's choices.
module fft_twiddle
  import vplc_pkg::*;
(
  input  logic [FFT_LOG2-1:0] e,
  output twid_t               w
);
  localparam int QW = FFT_NMAX / 4;     // 1024

  typedef logic signed [TW_W-1:0] tw_t;

  function automatic tw_t cos_q(int f);
    real v;
    v = $cos(2.0 * 3.14159265358979323846 * f / FFT_NMAX) * real'(1 << TW_FRAC);
    return tw_t'($rtoi(v < 0.0 ? v - 0.5 : v + 0.5));
  endfunction

  tw_t ctab [QW+1];
  for (genvar f = 0; f <= QW; f++) begin : g_tab
    localparam tw_t C = cos_q(f);
    assign ctab[f] = C;
  end

  logic [1:0]    q;
  logic [10:0]   f, fc;
  tw_t           ca, cb, cs, sn;

  always_comb begin
    q  = e[FFT_LOG2-1 -: 2];
    f  = {1'b0, e[FFT_LOG2-3:0]};
    fc = 11'(QW) - f;
    ca = ctab[f];
    cb = ctab[fc];
    unique case (q)
      2'd0: begin cs =  ca; sn =  cb; end
      2'd1: begin cs = -cb; sn =  ca; end
      2'd2: begin cs = -ca; sn = -cb; end
      default: begin cs =  cb; sn = -ca; end
    endcase
    w.re = cs;
    w.im = -sn;
  end
endmodule
