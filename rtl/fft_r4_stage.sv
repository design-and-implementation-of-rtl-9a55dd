// fft_r4_stage: one stage of the pipelined radix-4 decimation-in-frequency
// FFT, with a RAM-based single-path delay buffer.
//
// The stage takes one complex sample per clock and works on frames of NS
// samples (radix-4) or NS/2 samples (radix-2 mode, r2 = 1, used for the
// 512-point transform). A frame is seen as quarters (halves) of L4 = NS/4
// samples. While quarters 0..2 of a frame arrive they are written into a
// three-bank buffer of L4 words each; at the same time the buffer's old
// contents, the butterfly results g2..g4 of the previous frame, are read
// out, multiplied by their twiddle W_NS^((q+1)*n) and sent on. During
// quarter 3 the butterfly (fft_bf4) combines the three buffered samples
// with the arriving one: g1 leaves at once, g2..g4 go back into the
// buffer. The output stream is thus g1, g2*W^n, g3*W^2n, g4*W^3n, each a
// frame of the next stage; one complex multiplier is busy 3 clocks out of
// 4. In radix-2 mode one bank is used: x[n]+x[n+NS/4] leaves at once and
// (x[n]-x[n+NS/4])*W_(NS/2)^n is sent during the next frame's first half.
//
// After the last frame of a burst the stage empties itself: when no
// sample arrives at a frame boundary and results are still buffered, it
// steps through quarters 0..2 alone (in_valid must stay low meanwhile).
// in_ready is low while it does so. With en = 0 the stage is bypassed (output selector) and the sample is
// only registered.
//
// Timing: out is valid one clock after the sample that produced it was
// accepted; a frame's g1 leaves 3*L4 (radix-2: L4) clocks after the frame
// started. Frame alignment: the first sample after reset or after the
// stage emptied is sample 0 of a frame.
//
// The radix-4 DIF decomposition, the RAM-type delay buffer, the shared
// butterfly and the 75 % multiplier use follow the source design. The
// exact buffer arrangement (delay feedback into one RAM), the radix-2
// mode for 512 points, the draining rule and the per-stage 1/4 scaling
// are this design's choices.
module fft_r4_stage
  import vplc_pkg::*;
#(
  parameter int unsigned NS = 4096      // stage length (radix-4 frame)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,          // 0: bypass this stage
  input  logic  r2,          // 1: radix-2 mode on NS/2-sample frames
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data,
  output logic  in_ready     // 0 while the stage empties itself
);
  localparam int CW  = $clog2(NS);
  localparam int L4  = NS / 4;
  localparam int NW  = (CW > 2) ? CW - 2 : 1;
  localparam int TSH = FFT_LOG2 - CW;    // scale exponent to the 4096 table

  cplx_t mem0 [L4];
  cplx_t mem1 [L4];
  cplx_t mem2 [L4];

  logic [CW-1:0] cnt;
  logic          have_prev, draining;
  logic [1:0]    q, qlast;
  logic [NW-1:0] n;
  logic          drain_now, adv, last_of_frame, last_of_drain, ov;
  cplx_t         rd, bfx [4], bfg [4];
  logic [CW-1:0] ex;
  logic [FFT_LOG2-1:0] e;
  twid_t         w;
  cplx_t         g1_q, my;
  logic          sel_g1_q, valid_q;

  always_comb begin
    q     = (CW > 2) ? cnt[CW-1 -: 2] : cnt[1:0];
    n     = (CW > 2) ? cnt[NW-1:0] : '0;
    qlast = r2 ? 2'd1 : 2'd3;
    drain_now = draining || (!in_valid && cnt == '0 && have_prev);
    adv       = in_valid || drain_now;
    last_of_frame = (q == qlast) && (n == NW'(L4 - 1));
    last_of_drain = (q == qlast - 2'd1) && (n == NW'(L4 - 1));
    ov = adv && ((q < qlast) ? have_prev : in_valid);

    unique case (q)
      2'd0:    rd = mem0[n];
      2'd1:    rd = mem1[n];
      default: rd = mem2[n];
    endcase

    bfx[0] = mem0[n];
    bfx[1] = r2 ? in_data : mem1[n];
    bfx[2] = mem2[n];
    bfx[3] = in_data;

    // twiddle exponent in units of W_NS
    if (r2) ex = CW'({n, 1'b0});
    else    ex = CW'((CW'(q) + CW'(1)) * CW'(n));
    e = FFT_LOG2'(ex) << TSH;
  end

  fft_bf4 u_bf (.r2(r2), .x(bfx), .g(bfg));
  fft_twiddle u_tw (.e(e), .w(w));
  fft_cmult u_mul (.clk(clk), .x(rd), .w(w), .y(my));

  // delay buffer
  always_ff @(posedge clk) begin
    if (en && adv) begin
      if (q < qlast) begin
        unique case (q)
          2'd0:    mem0[n] <= in_data;
          2'd1:    mem1[n] <= in_data;
          default: mem2[n] <= in_data;
        endcase
      end else begin
        mem0[n] <= bfg[1];
        if (!r2) begin
          mem1[n] <= bfg[2];
          mem2[n] <= bfg[3];
        end
      end
    end
  end

  // controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      have_prev <= 1'b0;
      draining  <= 1'b0;
    end else if (en && adv) begin
      if (drain_now && last_of_drain) begin
        cnt       <= '0;
        have_prev <= 1'b0;
        draining  <= 1'b0;
      end else if (!drain_now && last_of_frame) begin
        cnt       <= '0;
        have_prev <= 1'b1;
      end else begin
        cnt      <= cnt + CW'(1);
        draining <= drain_now;
      end
    end
  end

  // output selector: g1 / twiddled buffer word / bypassed sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= 1'b0;
      sel_g1_q <= 1'b1;
      g1_q     <= '0;
    end else begin
      valid_q  <= en ? ov : in_valid;
      sel_g1_q <= !en || (q == qlast);
      g1_q     <= en ? bfg[0] : in_data;
    end
  end

  assign out_valid = valid_q;
  assign in_ready  = !(en && draining);
  assign out_data  = sel_g1_q ? g1_q : my;

  // a draining stage must not be fed
  a_no_input_while_draining: assert property (@(posedge clk) disable iff (!rst_n)
    (en && draining) |-> !in_valid);
endmodule
