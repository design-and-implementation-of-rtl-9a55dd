// vplc_pkg: types, sizes and the shared LDPC base matrix of the VPLC
// modulation (MOD) and error-correction (FEC) cores.
//
// FFT side: complex samples are 16-bit two's-complement pairs; twiddle
// factors are Q1.14 (16384 = 1.0). The largest transform is 4096 points
// (six radix-4 stages); the 512-point mode uses a radix-2 step.
//
// FEC side: the parity-check matrix H is quasi-cyclic. It is built from
// G x G circulant blocks I^s (G = 24), where row i of I^s has its single 1
// in column (i + s) mod G. H has MB = 12 block rows (M = 288 rows) and
// 12*(n+1) block columns for rate n/(n+1), n = 1..7:
//   [ A_1 .. A_n | B | T ]   (block rows 0..10)
//   [ C_1 .. C_n | D | E ]   (block row 11)
// B/D is the single p1 column, T is an 11x11 block dual-diagonal matrix
// of identities and E = [0 .. 0 I]. The sizes and this layout follow the
// source design; the circulant shift values are this design's own choice
// (the source does not list them). B, D are chosen so that
// Phi = E*T^-1*B + D = I, which makes the encoder's p1 a plain XOR sum.
package vplc_pkg;

  // ---------------- FFT ----------------
  localparam int FFT_W    = 16;     // sample width per real/imag part
  localparam int TW_W     = 16;     // twiddle width (Q1.14)
  localparam int TW_FRAC  = 14;
  localparam int FFT_NMAX = 4096;
  localparam int FFT_LOG2 = 12;

  typedef struct packed {
    logic signed [FFT_W-1:0] re;
    logic signed [FFT_W-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [TW_W-1:0] re;
    logic signed [TW_W-1:0] im;
  } twid_t;

  // N-FFT selection
  typedef enum logic {NSEL_4096 = 1'b0, NSEL_512 = 1'b1} nsel_e;

  // symbol formats of the cyclic-prefix inserter (prefix 448, 128, 0)
  typedef enum logic [1:0] {CP_DATA, CP_CONTROL, CP_PREAMBLE} cpfmt_e;

  // ---------------- LDPC ----------------
  localparam int LDPC_G    = 24;            // circulant size
  localparam int LDPC_MB   = 12;            // block rows
  localparam int LDPC_M    = LDPC_G * LDPC_MB;   // 288 parity bits
  localparam int LDPC_KMAX = 7;             // max info groups (rate 7/8)
  localparam int LDPC_NB   = LDPC_MB * (LDPC_KMAX + 1); // 96 block columns
  localparam int LDPC_PCOL = LDPC_MB * LDPC_KMAX;        // 84: first parity column

  // Shift value of block (r, c) of the shared base matrix, -1 for a zero
  // block. Block columns 0..83 are info: group k = c/12, column j = c%12.
  // Column 84 is B/D (p1), columns 85..95 are T/E (p2_0..p2_10).
  function automatic int hb_shift(int r, int c);
    int k, j, d;
    if (c < LDPC_PCOL) begin
      k = c / LDPC_MB;
      j = c % LDPC_MB;
      d = (r - j - k + 2 * LDPC_MB) % LDPC_MB;
      if (d == 0 || d == 3 || d == 7)
        return (7 * r + 11 * j + 5 * k + 3 * d + 1) % LDPC_G;
      return -1;
    end else if (c == LDPC_PCOL) begin
      if (r == 0 || r == LDPC_MB - 1) return 1;
      if (r == 5) return 0;
      return -1;
    end else begin
      j = c - LDPC_PCOL - 1;                // p2 index 0..10
      if (r == j || r == j + 1) return 0;
      return -1;
    end
  endfunction

endpackage
