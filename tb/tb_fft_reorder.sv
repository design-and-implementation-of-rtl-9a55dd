// tb_fft_reorder: self-checking testbench of the output sample reorder.
// For each N (512 and 4096) two symbols are sent back to back in the
// order the FFT pipeline produces them: stream position p carries bin
// k(p), computed here with integer digit arithmetic (base-4 digits of p
// reversed; for 512 points the leading radix-2 digit becomes the least
// significant binary digit). The sample value encodes the bin and the
// symbol, so the output must count 0, 1, 2, ... in natural order, with
// its first sample one clock after the symbol's last input.
module tb_fft_reorder;
  import vplc_pkg::*;
  logic clk = 0, rst_n = 0;
  nsel_e nsel;
  logic in_valid, out_valid;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0;

  fft_reorder dut (.*);
  always #5 clk = ~clk;

  function automatic int bin_of(int p, int N);
    int k = 0, scale = 1, rem = p, span;
    if (N == 512) begin
      k = p / 256; rem = p % 256; scale = 2;
    end
    span = (N == 512) ? 64 : 1024;
    while (span >= 1) begin
      k += (rem / span) * scale;
      rem = rem % span;
      scale *= 4;
      span /= 4;
    end
    return k;
  endfunction

  task automatic run(nsel_e s);
    int N = (s == NSEL_4096) ? 4096 : 512;
    int got = 0, first_in = -1, cyc = 0;
    nsel = s;
    fork
      begin
        for (int y = 0; y < 2; y++)
          for (int p = 0; p < N; p++) begin
            in_valid = 1;
            in_data.re = 16'(bin_of(p, N));
            in_data.im = 16'(y);
            @(negedge clk);
          end
        in_valid = 0;
      end
      begin
        while (got < 2 * N) begin
          @(posedge clk);
          cyc++;
          if (in_valid && first_in < 0) first_in = cyc;
          if (out_valid) begin
            checks++;
            if (int'(out_data.re) != got % N || int'(out_data.im) != got / N) begin
              failures++;
              if (failures < 5) $display("N=%0d out %0d: got %0d/%0d", N, got, out_data.re, out_data.im);
            end
            if (got == 0) begin
              checks++;
              if (cyc - first_in != N + 1) begin failures++; $display("first output %0d clocks after first input", cyc - first_in); end
            end
            got++;
          end
        end
      end
    join
    @(negedge clk);
  endtask

  initial begin
    in_valid = 0; nsel = NSEL_512; in_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(NSEL_512);
    run(NSEL_4096);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
