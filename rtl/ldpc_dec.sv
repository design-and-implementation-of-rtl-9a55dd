// ldpc_dec: min-sum decoder for the quasi-cyclic LDPC code of the FEC core
// (rates n/(n+1), n = 1..7, 288 check rows, see vplc_pkg).
//
// The decoder works row-serially: every stage takes 288 clocks, one check
// row m (block row m/24, row m%24 inside the circulants) per clock. For
// each of the 96 block columns the row touches at most one variable,
// element (m%24 + s) mod 24 of that column, so each column's posterior
// LLRs sit in a 24-word array with one read and one write port.
//
// Stages (2*iterations + 4 of them without early stop):
//   LOAD  (PreDecoder 1) 288 clocks: channel LLRs in, 8 per clock;
//   INIT  (PreDecoder 2) clears the 288 check-message records;
//   MIN   (iteration, 1st half) per row: Z = Q - L_old, then min, second
//         minimum, position of the min and the sign of every message
//         (compressed check message, replaces L_old); the row's parity
//         over the hard decisions sign(Q) is checked at the same time
//         (parity checker);
//   ADD   (iteration, 2nd half) per row: Q_new[n] += L_new[m,n], with
//         Q_new preset to the channel LLR; Q is kept in two banks (odd /
//         even) that swap after each ADD;
//   TCHK  (terminator 1) final parity check of the hard decisions;
//   OUT   (terminator 2) 288 clocks, 7 decided information bits per clock.
// If early_stop is set and a MIN stage finds every check satisfied, the
// decoder skips the remaining iterations and goes to TCHK.
// L[m,n] = sign * (n == min position ? min2 : min1), plain min-sum.
//
// Interface: in_ready high when idle. A codeword is 288 clocks of
// in_valid (gaps allowed); on the first, rate_n (1..7), max_iter (>= 1)
// and early_stop are taken. llr_in[k], k < 7, is the LLR of info bit
// k*288 + j, llr_in[7] that of parity bit j (codeword bit rate_n*288 + j)
// for the j-th accepted clock; positive means bit 0. Output: 288 clocks
// of out_valid with cn_out[k] = decided info bit k*288 + j (0 for groups
// >= rate_n), checksum = {stopped_early, parity_ok} and iterations used.
// Latency without early stop, gap-free input: the last output is
// 288*(2*max_iter + 4) clocks after the first input clock, first clock
// included.
//
// Row-serial stages of 288 clocks, the PreDecoder / IterationDecoder /
// ParityChecker / Terminator split, odd/even memories, min / sub-min and
// the stop option follow the source design. Word widths, plain (not
// scaled) min-sum, the compressed message records and the code's shift
// values are this design's choices. One codeword is decoded at a time.
module ldpc_dec
  import vplc_pkg::*;
#(
  parameter int WL = 6,      // channel LLR width
  parameter int WQ = 8,      // posterior LLR width
  parameter int WM = 6       // check/variable message width
) (
  input  logic clk,
  input  logic rst_n,
  output logic in_ready,
  input  logic in_valid,
  input  logic [2:0] rate_n,
  input  logic [3:0] max_iter,
  input  logic early_stop,
  input  logic signed [WL-1:0] llr_in [LDPC_KMAX+1],
  output logic out_valid,
  output logic [LDPC_KMAX-1:0] cn_out,
  output logic [1:0] checksum,
  output logic [3:0] iter_used
);
  localparam int G  = LDPC_G;
  localparam int MB = LDPC_MB;
  localparam int NB = LDPC_NB;
  localparam int M  = LDPC_M;
  localparam int MAGW = WM - 1;
  localparam logic signed [WM-1:0] MMAX = WM'((1 << (WM - 1)) - 1);
  localparam logic signed [WQ-1:0] QMAX = WQ'((1 << (WQ - 1)) - 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_INIT, S_MIN, S_ADD, S_TCHK, S_OUT} state_e;

  typedef struct packed {
    logic [MAGW-1:0] min1;
    logic [MAGW-1:0] min2;
    logic [6:0]      idx;
    logic [NB-1:0]   sgn;     // sign of L[m, column c]
  } cmsg_t;

  // shift table of the base matrix, -1 = zero block
  logic signed [5:0] stab [NB][MB];
  for (genvar c = 0; c < NB; c++) begin : g_col
    for (genvar r = 0; r < MB; r++) begin : g_row
      localparam int S = hb_shift(r, c);
      assign stab[c][r] = 6'(S);
    end
  end

  state_e state;
  logic [3:0] rb;           // block row 0..11
  logic [4:0] ri;           // row inside circulant 0..23
  logic       row_last;
  logic [2:0] rate;
  logic [3:0] iters, iter;
  logic       estop, fail, cur, stopped;

  logic signed [WL-1:0] llr_mem [NB][G];
  logic signed [WQ-1:0] q_mem [2][NB][G];
  cmsg_t                cmem [M];
  logic [8:0]           m;

  // per-column view of the current row
  logic                 act   [NB];
  logic [4:0]           eidx  [NB];
  logic signed [WQ-1:0] qv    [NB];
  logic signed [WQ-1:0] qn    [NB];    // accumulating bank
  logic signed [WM-1:0] lold  [NB];
  logic [MAGW-1:0]      zmag  [NB];
  logic                 zsgn  [NB];
  cmsg_t                crow, cnew;
  logic                 syn;

  function automatic logic signed [WM-1:0] sat_m(logic signed [WQ+1:0] v);
    if (v > (WQ+2)'(MMAX))       return MMAX;
    else if (v < -(WQ+2)'(MMAX)) return -MMAX;
    else                          return v[WM-1:0];
  endfunction

  function automatic logic signed [WQ-1:0] sat_q(logic signed [WQ+1:0] v);
    if (v > (WQ+2)'(QMAX))       return QMAX;
    else if (v < -(WQ+2)'(QMAX)) return -QMAX;
    else                          return v[WQ-1:0];
  endfunction

  function automatic logic signed [WM-1:0] msg(cmsg_t cm, logic [6:0] c);
    logic [MAGW-1:0] mag;
    mag = (c == cm.idx) ? cm.min2 : cm.min1;
    return cm.sgn[c] ? -WM'({1'b0, mag}) : WM'({1'b0, mag});
  endfunction

  assign m        = 9'(rb) * 9'(G) + 9'(ri);
  assign row_last = (rb == 4'(MB - 1)) && (ri == 5'(G - 1));

  always_comb begin
    logic [5:0] sum;
    logic [MAGW-1:0] mn1, mn2;
    logic [6:0] mi;
    logic tot;
    crow = cmem[m];
    syn  = 1'b0;
    mn1  = '1; mn2 = '1; mi = '0; tot = 1'b0;
    for (int c = 0; c < NB; c++) begin
      act[c]  = (stab[c][rb] >= 0) && (c >= LDPC_PCOL || (c / MB) < int'(rate));
      sum     = 6'(ri) + 6'(stab[c][rb]);
      eidx[c] = (sum >= 6'(G)) ? 5'(sum - 6'(G)) : 5'(sum);
      qv[c]   = q_mem[cur][c][eidx[c]];
      qn[c]   = q_mem[!cur][c][eidx[c]];
      lold[c] = msg(crow, 7'(c));
      begin
        logic signed [WM-1:0] z;
        z = sat_m((WQ+2)'(qv[c]) - (WQ+2)'(lold[c]));
        zsgn[c] = z[WM-1];
        zmag[c] = z[WM-1] ? MAGW'(-z) : MAGW'(z);
      end
      if (act[c]) begin
        syn = syn ^ qv[c][WQ-1];
        tot = tot ^ zsgn[c];
        if (zmag[c] < mn1) begin
          mn2 = mn1; mn1 = zmag[c]; mi = 7'(c);
        end else if (zmag[c] < mn2) begin
          mn2 = zmag[c];
        end
      end
    end
    cnew.min1 = mn1;
    cnew.min2 = mn2;
    cnew.idx  = mi;
    for (int c = 0; c < NB; c++)
      cnew.sgn[c] = act[c] & (tot ^ zsgn[c]);
  end

  // ---- memories ----
  always_ff @(posedge clk) begin
    unique case (state)
      S_IDLE, S_LOAD:
        if (in_valid) begin
          for (int k = 0; k <= LDPC_KMAX; k++) begin
            llr_mem[MB * k + int'(rb)][ri] <= llr_in[k];
            q_mem[0][MB * k + int'(rb)][ri] <= WQ'(llr_in[k]);
          end
        end
      S_INIT: cmem[m] <= '0;
      S_MIN: begin
        cmem[m] <= cnew;
        if (row_last)
          for (int c = 0; c < NB; c++)
            for (int i = 0; i < G; i++)
              q_mem[!cur][c][i] <= WQ'(llr_mem[c][i]);
      end
      S_ADD:
        for (int c = 0; c < NB; c++)
          if (act[c])
            q_mem[!cur][c][eidx[c]] <= sat_q((WQ+2)'(qn[c]) + (WQ+2)'(msg(crow, 7'(c))));
      default: ;
    endcase
  end

  // ---- controller ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rb <= '0; ri <= '0;
      rate <= 3'd1; iters <= 4'd1; iter <= '0; estop <= 1'b0;
      fail <= 1'b0; cur <= 1'b0; stopped <= 1'b0;
    end else begin
      // row counter: advances every clock outside IDLE/LOAD, on in_valid there
      if ((state == S_IDLE || state == S_LOAD) ? in_valid : (state != S_IDLE)) begin
        if (ri == 5'(G - 1)) begin
          ri <= '0;
          rb <= (rb == 4'(MB - 1)) ? '0 : rb + 4'd1;
        end else begin
          ri <= ri + 5'd1;
        end
      end
      unique case (state)
        S_IDLE:
          if (in_valid) begin
            state   <= S_LOAD;
            rate    <= rate_n;
            iters   <= max_iter;
            estop   <= early_stop;
            cur     <= 1'b0;
            iter    <= '0;
            stopped <= 1'b0;
          end
        S_LOAD: if (in_valid && row_last) state <= S_INIT;
        S_INIT: if (row_last) begin state <= S_MIN; fail <= 1'b0; end
        S_MIN: begin
          if (row_last) begin
            if (estop && !(fail | syn)) begin
              state   <= S_TCHK;
              stopped <= 1'b1;
            end else begin
              state <= S_ADD;
            end
            fail <= 1'b0;
          end else begin
            fail <= fail | syn;
          end
        end
        S_ADD:
          if (row_last) begin
            cur  <= !cur;
            iter <= iter + 4'd1;
            state <= (iter + 4'd1 >= iters) ? S_TCHK : S_MIN;
          end
        S_TCHK: begin
          fail <= fail | syn;
          if (row_last) state <= S_OUT;
        end
        S_OUT: if (row_last) begin state <= S_IDLE; fail <= 1'b0; end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- outputs ----
  always_comb begin
    in_ready  = (state == S_IDLE);
    out_valid = (state == S_OUT);
    for (int k = 0; k < LDPC_KMAX; k++)
      cn_out[k] = out_valid && (k < int'(rate)) && q_mem[cur][MB * k + int'(rb)][ri][WQ-1];
    checksum  = {stopped, !fail};
    iter_used = iter;
  end

  a_rate: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && in_valid) |-> (rate_n != 3'd0 && max_iter != 4'd0));
endmodule
