// fft_reorder: output sample reorder of the pipelined FFT.
//
// The last FFT stage delivers X[k] in digit-reversed order. This block
// writes sample number p of a symbol to address k(p) of one bank of a
// two-bank buffer and, once the symbol is complete, reads that bank out in
// natural order (X[0], X[1], ...) while the other bank fills.
//   4096 points (six radix-4 steps): p = d0 d1 d2 d3 d4 d5 in base 4 (d0
//     most significant) gives k = d0 + 4*d1 + 16*d2 + ... + 1024*d5.
//   512 points (one radix-2 step, then four radix-4 steps): p = b0 d1 d2
//     d3 d4 (b0 one bit, d1..d4 base-4 digits) gives
//     k = b0 + 2*d1 + 8*d2 + 32*d3 + 128*d4.
// Timing: the first output of a symbol is valid one clock after its last
// input; outputs then follow one per clock for N clocks. Symbols may
// follow back to back. The block is named in the source design; the
// two-bank buffer is this design's choice.
module fft_reorder
  import vplc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  nsel_e nsel,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  localparam int AW = FFT_LOG2;

  cplx_t mem [2 * FFT_NMAX];

  logic [AW-1:0] wp, rp, nlast;
  logic          wbank, rbank, reading;
  logic [AW-1:0] k;

  function automatic logic [AW-1:0] digit_rev(logic [AW-1:0] p, nsel_e s);
    logic [AW-1:0] r;
    r = '0;
    if (s == NSEL_4096) begin
      for (int i = 0; i < 6; i++)
        r[2*i +: 2] = p[AW-2-2*i +: 2];
    end else begin
      r[0] = p[8];
      for (int i = 0; i < 4; i++)
        r[1+2*i +: 2] = p[6-2*i +: 2];
    end
    return r;
  endfunction

  always_comb begin
    nlast = (nsel == NSEL_4096) ? AW'(FFT_NMAX - 1) : AW'(511);
    k     = digit_rev(wp, nsel);
  end

  always_ff @(posedge clk) begin
    if (in_valid) mem[{wbank, k}] <= in_data;
    out_data <= mem[{rbank, rp}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; wbank <= 1'b0;
      rp <= '0; rbank <= 1'b0; reading <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= reading;
      if (reading) begin
        if (rp == nlast) begin
          rp <= '0;
          reading <= 1'b0;
        end else begin
          rp <= rp + AW'(1);
        end
      end
      if (in_valid) begin
        if (wp == nlast) begin
          wp      <= '0;
          wbank   <= ~wbank;
          rbank   <= wbank;
          rp      <= '0;
          reading <= 1'b1;
        end else begin
          wp <= wp + AW'(1);
        end
      end
    end
  end
endmodule
