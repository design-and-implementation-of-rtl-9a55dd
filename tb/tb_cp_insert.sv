// tb_cp_insert: self-checking testbench of the cyclic-prefix inserter.
// Sends a data symbol (4096 + 448), a control symbol (512 + 128), a
// preamble symbol (512 + 0) and another data symbol with in_valid held
// high, so that in_ready has to throttle the input. Every output sample
// is compared with the expected stream built here: for each symbol the
// last P input samples, then all N. It also checks that out_first marks
// each symbol start, that the output has no gap between symbols that
// were already stored (only the last data symbol, which is still being
// written when the preamble has gone out, may start late), and that
// back-pressure (in_ready low) happened.
module tb_cp_insert;
  import vplc_pkg::*;
  logic clk = 0, rst_n = 0;
  cpfmt_e fmt;
  logic in_valid, in_ready, out_valid, out_first;
  cplx_t in_data, out_data;
  int checks = 0, failures = 0, n_stall = 0, n_gap = 0;

  cp_insert dut (.*);
  always #5 clk = ~clk;

  localparam int NSYM = 4;
  cpfmt_e fmts [NSYM];
  int exp_q [$];
  int starts [$];

  function automatic int nlen(cpfmt_e f); return (f == CP_DATA) ? 4096 : 512; endfunction
  function automatic int plen(cpfmt_e f); return (f == CP_DATA) ? 448 : (f == CP_CONTROL) ? 128 : 0; endfunction

  initial begin
    int base = 0;
    fmts = '{CP_DATA, CP_CONTROL, CP_PREAMBLE, CP_DATA};
    in_valid = 0; fmt = CP_DATA; in_data = '0;
    // expected stream
    for (int s = 0; s < NSYM; s++) begin
      int N, P;
      N = nlen(fmts[s]); P = plen(fmts[s]);
      starts.push_back(exp_q.size());
      for (int i = 0; i < P; i++) exp_q.push_back(base + N - P + i);
      for (int i = 0; i < N; i++) exp_q.push_back(base + i);
      base += N;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    base = 0;
    for (int s = 0; s < NSYM; s++)
      for (int i = 0; i < nlen(fmts[s]); i++) begin
        in_valid = 1; fmt = fmts[s];
        in_data.re = 16'(base + i); in_data.im = 16'((base + i) >> 16);
        @(posedge clk);
        while (!in_ready) begin @(posedge clk); end
        @(negedge clk);
        if (i == nlen(fmts[s]) - 1) base += nlen(fmts[s]);
      end
    in_valid = 0;
  end

  always @(posedge clk) if (rst_n && in_valid && !in_ready) n_stall++;

  initial begin
    int got = 0, sidx = 0;
    bit started = 0;
    wait (rst_n);
    while (got < exp_q.size()) begin
      @(posedge clk);
      if (out_valid) begin
        int v;
        v = (int'(out_data.re) & 32'h0000ffff) | (int'(out_data.im) << 16);
        started = 1;
        checks++;
        if (v != exp_q[got]) begin
          failures++;
          if (failures < 5) $display("out %0d: got %0d expected %0d", got, v, exp_q[got]);
        end
        if (out_first != (sidx < NSYM && got == starts[sidx])) begin
          failures++; $display("out_first wrong at %0d", got);
        end
        if (sidx < NSYM && got == starts[sidx]) sidx++;
        got++;
      end else if (started && got != starts[NSYM-1]) n_gap++;
    end
    checks++;
    if (n_gap != 0) begin failures++; $display("%0d idle clocks inside the output", n_gap); end
    checks++;
    if (n_stall == 0) begin failures++; $display("input never throttled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
