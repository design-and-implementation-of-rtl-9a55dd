// tb_fft_twiddle: self-checking testbench of the twiddle generator.
// Every exponent 0..4095 is applied; the output must equal
// round(16384*cos(2*pi*e/4096)) - j*round(16384*sin(2*pi*e/4096)),
// computed here in floating point, within 1 LSB.
module tb_fft_twiddle;
  import vplc_pkg::*;
  logic [11:0] e;
  twid_t w;
  int checks = 0, failures = 0;

  fft_twiddle dut (.*);

  initial begin
    for (int i = 0; i < 4096; i++) begin
      real c, s, dr, di;
      e = 12'(i);
      #1;
      c = 16384.0 * $cos(2.0 * 3.14159265358979 * i / 4096.0);
      s = -16384.0 * $sin(2.0 * 3.14159265358979 * i / 4096.0);
      dr = real'(w.re) - c; di = real'(w.im) - s;
      checks++;
      if (dr > 1.0 || dr < -1.0 || di > 1.0 || di < -1.0) begin
        failures++;
        if (failures < 5) $display("e=%0d got %0d,%0d exp %f,%f", i, w.re, w.im, c, s);
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
