// tb_fft_cmult: self-checking testbench of the complex multiplier.
// Random samples times random Q1.14 factors (including the extremes); the
// expected value is the exact complex product in 64-bit integers,
// rounded half-up after dividing by 2^14 and saturated to 16 bits, one
// clock after the inputs.
module tb_fft_cmult;
  import vplc_pkg::*;
  logic clk = 0;
  cplx_t x, y;
  twid_t w;
  int checks = 0, failures = 0;

  fft_cmult dut (.*);
  always #5 clk = ~clk;

  function automatic longint rs(longint v);
    longint r = v + (1 << 13);
    r = (r >= 0) ? r / 16384 : -((-r + 16383) / 16384);
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  initial begin
    longint ar, ai, br, bi, er, ei;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      ar = $urandom_range(0, 65535) - 32768; ai = $urandom_range(0, 65535) - 32768;
      br = $urandom_range(0, 32768) - 16384; bi = $urandom_range(0, 32768) - 16384;
      if (it < 4) begin ar = -32768; ai = -32768; br = (it[0]) ? 16384 : -16384; bi = (it[1]) ? 16384 : -16384; end
      x.re = 16'(ar); x.im = 16'(ai); w.re = 16'(br); w.im = 16'(bi);
      er = rs(ar * br - ai * bi);
      ei = rs(ar * bi + ai * br);
      @(negedge clk);
      checks++;
      if (longint'(y.re) != er || longint'(y.im) != ei) begin
        failures++;
        if (failures < 5) $display("got %0d,%0d exp %0d,%0d", y.re, y.im, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
