// tb_fft_r4_stage: self-checking testbench of one FFT stage, run at a
// small stage length (NS = 16) in all three modes: radix-4 (frames of 16),
// radix-2 (frames of 8) and bypass. Three frames are sent back to back,
// then the input stops so that the stage empties itself. The expected
// output stream is computed here in floating point from the DIF
// equations: block k of a frame is
//   (1/4) * sum_q x[n + q*NS/4] * (-j)^(q*k) * W_NS^(k*n),
// (radix-2: (1/2)(x[n] +/- x[n+NS/4]) * W_(NS/2)^(k*n)); tolerance 2 LSB.
// It also checks that the first output of a frame appears 3*NS/4 + 1
// clocks (radix-2: NS/4 + 1) after its first input.
module tb_fft_r4_stage;
  import vplc_pkg::*;
  localparam int NS = 16, L4 = NS / 4, NF = 3;

  logic clk = 0, rst_n = 0;
  logic en, r2, in_valid, out_valid, in_ready;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;
  int n_drain = 0;

  fft_r4_stage #(.NS(NS)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && !in_ready) n_drain++;

  real xr [NF*NS], xi [NF*NS], er [NF*NS], ei [NF*NS];

  task automatic run(bit men, bit mr2);
    int FL = !men ? 1 : (mr2 ? NS / 2 : NS);
    int total = NF * FL, got = 0, t_in0 = -1, cyc = 0, t_out0 = -1;
    en = men; r2 = mr2;
    for (int i = 0; i < total; i++) begin
      xr[i] = real'($urandom_range(0, 16000)) - 8000.0;
      xi[i] = real'($urandom_range(0, 16000)) - 8000.0;
    end
    // expected stream
    for (int f = 0; f < total / FL; f++)
      for (int p = 0; p < FL; p++) begin
        int b = f * FL, k, n;
        real sr, si, ang;
        if (!men) begin er[b+p] = xr[b+p]; ei[b+p] = xi[b+p]; continue; end
        if (mr2) begin
          k = p / L4; n = p % L4;
          sr = (xr[b+n] + (k ? -1.0 : 1.0) * xr[b+n+L4]) / 2.0;
          si = (xi[b+n] + (k ? -1.0 : 1.0) * xi[b+n+L4]) / 2.0;
          ang = -2.0 * 3.14159265358979 * k * n / (NS / 2);
        end else begin
          k = p / L4; n = p % L4;
          sr = 0; si = 0;
          for (int q = 0; q < 4; q++) begin
            real ar = xr[b+n+q*L4], ai = xi[b+n+q*L4];
            case ((q * k) % 4)
              0: begin sr += ar; si += ai; end
              1: begin sr += ai; si -= ar; end
              2: begin sr -= ar; si -= ai; end
              default: begin sr -= ai; si += ar; end
            endcase
          end
          sr /= 4.0; si /= 4.0;
          ang = -2.0 * 3.14159265358979 * k * n / NS;
        end
        er[b+p] = sr * $cos(ang) - si * $sin(ang);
        ei[b+p] = sr * $sin(ang) + si * $cos(ang);
      end
    fork
      begin
        while (!in_ready) @(negedge clk);
        for (int i = 0; i < total; i++) begin
          in_valid = 1;
          in_data.re = 16'($rtoi(xr[i])); in_data.im = 16'($rtoi(xi[i]));
          @(negedge clk);
        end
        in_valid = 0;
      end
      begin
        while (got < total) begin
          @(posedge clk);
          cyc++;
          if (in_valid && t_in0 < 0) t_in0 = cyc;
          if (out_valid) begin
            real dr = real'(out_data.re) - er[got], di = real'(out_data.im) - ei[got];
            if (t_out0 < 0) t_out0 = cyc;
            checks++;
            if (dr > 2.0 || dr < -2.0 || di > 2.0 || di < -2.0) begin
              failures++;
              if (failures < 6) $display("en=%0b r2=%0b out %0d: got %0d,%0d exp %f,%f",
                                         men, mr2, got, out_data.re, out_data.im, er[got], ei[got]);
            end
            got++;
          end
        end
      end
    join
    checks++;
    if (t_out0 - t_in0 != (!men ? 1 : (mr2 ? L4 + 1 : 3 * L4 + 1))) begin
      failures++; $display("en=%0b r2=%0b first output after %0d clocks", men, mr2, t_out0 - t_in0);
    end
    repeat (NS) @(negedge clk);
  endtask

  initial begin
    en = 1; r2 = 0; in_valid = 0; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(1, 0);
    run(1, 1);
    run(0, 0);
    checks++;
    if (n_drain == 0) begin failures++; $display("stage never emptied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
