// tb_fft_bf4: self-checking testbench of the radix-4 / radix-2 butterfly.
// Random inputs; the expected g1..g4 are the four-point DFT of the inputs
// (twiddles 1, -j, -1, +j written out as real arithmetic here), divided by
// 4, or the two-point DFT divided by 2 in radix-2 mode, rounded toward
// minus infinity like an arithmetic shift.
module tb_fft_bf4;
  import vplc_pkg::*;
  logic r2;
  cplx_t x [4], g [4];
  int checks = 0, failures = 0;

  fft_bf4 dut (.*);

  function automatic int fdiv(int a, int d);
    return (a >= 0) ? a / d : -((-a + d - 1) / d);
  endfunction

  initial begin
    int xr [4], xi [4], er [4], ei [4];
    for (int it = 0; it < 2000; it++) begin
      r2 = it[0];
      for (int i = 0; i < 4; i++) begin
        xr[i] = $urandom_range(0, 65535) - 32768;
        xi[i] = $urandom_range(0, 65535) - 32768;
        x[i].re = 16'(xr[i]); x[i].im = 16'(xi[i]);
      end
      // DFT_4: X[k] = sum x[n] (-j)^(nk)
      for (int k = 0; k < 4; k++) begin
        int sr, si;
        sr = 0; si = 0;
        for (int nn = 0; nn < 4; nn++) begin
          case ((nn * k) % 4)
            0: begin sr += xr[nn]; si += xi[nn]; end
            1: begin sr += xi[nn]; si -= xr[nn]; end   // * -j
            2: begin sr -= xr[nn]; si -= xi[nn]; end
            3: begin sr -= xi[nn]; si += xr[nn]; end   // * +j
          endcase
        end
        er[k] = fdiv(sr, 4); ei[k] = fdiv(si, 4);
      end
      if (r2) begin
        er[0] = fdiv(xr[0] + xr[1], 2); ei[0] = fdiv(xi[0] + xi[1], 2);
        er[1] = fdiv(xr[0] - xr[1], 2); ei[1] = fdiv(xi[0] - xi[1], 2);
      end
      #1;
      for (int k = 0; k < (r2 ? 2 : 4); k++) begin
        checks++;
        if (int'(g[k].re) != er[k] || int'(g[k].im) != ei[k]) begin
          failures++;
          if (failures < 5) $display("x0=%0d,%0d x1=%0d,%0d r2=%0b g%0d got %0d,%0d exp %0d,%0d", xr[0],xi[0],xr[1],xi[1], r2, k+1, g[k].re, g[k].im, er[k], ei[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
