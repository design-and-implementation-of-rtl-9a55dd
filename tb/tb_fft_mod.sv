// tb_fft_mod: self-checking testbench of the MOD core (FFT/IFFT).
//
// Feeds random complex symbols and compares every output bin with a
// direct DFT computed here in floating point, divided by N to match the
// core's fixed 1/radix scaling per step. Cases: two back-to-back 512-point
// symbols (radix-2 step, first stage bypassed), a 512-point inverse
// transform and one 4096-point forward symbol.
// Counts: the bypass, the radix-2 mode, the inverse swap and the stage
// emptying after each burst (in_ready low) each must happen. Tolerance:
// +/- TOL LSB per part.
module tb_fft_mod;
  import vplc_pkg::*;

  localparam int TOL = 6;
  localparam int AMP = 12000;

  logic clk = 0, rst_n = 0;
  nsel_e nsel;
  logic inverse, in_valid, in_ready, out_valid, busy;
  cplx_t in_data, out_data;

  int checks = 0, failures = 0;
  int n_drain = 0;

  fft_mod dut (.*);

  always #5 clk = ~clk;

  real xr [2][4096], xi [2][4096];
  int  ocnt;

  always @(posedge clk) if (rst_n && !in_ready) n_drain++;

  task automatic run(nsel_e s, bit inv, int nsym);
    int N = (s == NSEL_4096) ? 4096 : 512;
    int bad = 0;
    real maxerr = 0.0;
    nsel = s; inverse = inv;
    for (int y = 0; y < nsym; y++)
      for (int i = 0; i < N; i++) begin
        xr[y][i] = real'($urandom_range(0, 2 * AMP)) - AMP;
        xi[y][i] = real'($urandom_range(0, 2 * AMP)) - AMP;
      end
    while (!in_ready || busy) @(negedge clk);
    fork
      begin
        for (int y = 0; y < nsym; y++)
          for (int i = 0; i < N; i++) begin
            in_valid = 1;
            in_data.re = 16'($rtoi(xr[y][i]));
            in_data.im = 16'($rtoi(xi[y][i]));
            @(negedge clk);
          end
        in_valid = 0;
      end
      begin
        for (int y = 0; y < nsym; y++)
          for (int k = 0; k < N; k++) begin
            real er, ei, ang, dr, di;
            do @(posedge clk); while (!out_valid);
            er = 0.0; ei = 0.0;
            for (int i = 0; i < N; i++) begin
              ang = 2.0 * 3.14159265358979 * real'((i * k) % N) / N;
              if (!inv) ang = -ang;
              er += xr[y][i] * $cos(ang) - xi[y][i] * $sin(ang);
              ei += xr[y][i] * $sin(ang) + xi[y][i] * $cos(ang);
            end
            er /= N; ei /= N;
            dr = real'(out_data.re) - er; di = real'(out_data.im) - ei;
            if (dr < 0) dr = -dr;
            if (di < 0) di = -di;
            if (dr > maxerr) maxerr = dr;
            if (di > maxerr) maxerr = di;
            checks++;
            if (dr > TOL || di > TOL) begin
              failures++; bad++;
              if (bad < 5) $display("N=%0d inv=%0b sym %0d bin %0d: got %0d,%0d expected %f,%f",
                                    N, inv, y, k, out_data.re, out_data.im, er, ei);
            end
          end
      end
    join
    $display("N=%0d inverse=%0b symbols=%0d: max error %f LSB", N, inv, nsym, maxerr);
  endtask

  initial begin
    in_valid = 0; nsel = NSEL_512; inverse = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(NSEL_512, 0, 2);
    run(NSEL_512, 1, 1);
    run(NSEL_4096, 0, 1);
    checks++;
    if (n_drain == 0) begin failures++; $display("stage never emptied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
