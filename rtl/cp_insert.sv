// cp_insert: cyclic-prefix insertion after the IFFT of the transmitter.
//
// Each DMT symbol of N time samples (from the IFFT, in natural order) is
// stored in one bank of a two-bank buffer. Once it is complete, the bank
// is read out as the symbol's last P samples followed by all N samples,
// so the symbol on the line is N+P samples long. Symbol formats:
//   CP_DATA     N = 4096, P = 448  (long symbol, header and data frames)
//   CP_CONTROL  N = 512,  P = 128  (control frame)
//   CP_PREAMBLE N = 512,  P = 0    (preamble)
// The format is taken with the first sample of a symbol and kept with the
// stored bank.
//
// Interface: in_valid/in_ready (a sample moves when both are high);
// in_ready is low while both banks hold symbols that have not been sent.
// Output: out_valid with one sample per clock, N+P clocks per symbol,
// out_first on the first prefix sample. A stored symbol starts out two
// clocks after its last sample entered if the output is idle, or right
// after the symbol before it.
// Timing: the output needs N+P clocks per symbol against N on the input,
// so a continuous input is slowed down through in_ready.
//
// The prefix lengths and symbol sizes follow the source design. The
// 16-sample roll-off that the source lists for the preamble and control
// frames is not applied: its window shape is not given.
module cp_insert
  import vplc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cpfmt_e fmt,
  input  logic   in_valid,
  output logic   in_ready,
  input  cplx_t  in_data,
  output logic   out_valid,
  output logic   out_first,
  output cplx_t  out_data
);
  localparam int AW = FFT_LOG2;
  localparam int CW = AW + 1;

  cplx_t mem [2 * FFT_NMAX];

  logic [AW-1:0] wcnt;
  logic          wbank, rbank, reading;
  logic [1:0]    full;
  cpfmt_e        wfmt, bfmt [2];
  logic [CW-1:0] rcnt, rn, rp, rend;
  logic [AW-1:0] raddr;
  cpfmt_e        wfmt_next;

  function automatic logic [CW-1:0] sym_len(cpfmt_e f);
    return (f == CP_DATA) ? CW'(4096) : CW'(512);
  endfunction

  function automatic logic [CW-1:0] cp_len(cpfmt_e f);
    unique case (f)
      CP_DATA:    return CW'(448);
      CP_CONTROL: return CW'(128);
      default:    return CW'(0);
    endcase
  endfunction

  always_comb begin
    cpfmt_e f;
    f     = (wcnt == '0) ? fmt : wfmt;
    in_ready = !full[wbank];
    rn    = sym_len(bfmt[rbank]);
    rp    = cp_len(bfmt[rbank]);
    rend  = rn + rp - CW'(1);
    raddr = (rcnt < rp) ? AW'(rn - rp + rcnt) : AW'(rcnt - rp);
    wfmt_next = f;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[{wbank, wcnt}] <= in_data;
    out_data <= mem[{rbank, raddr}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt <= '0; wbank <= 1'b0; wfmt <= CP_DATA;
      bfmt[0] <= CP_DATA; bfmt[1] <= CP_DATA;
      full <= '0; rbank <= 1'b0; reading <= 1'b0; rcnt <= '0;
      out_valid <= 1'b0; out_first <= 1'b0;
    end else begin
      // write side
      if (in_valid && in_ready) begin
        wfmt <= wfmt_next;
        if (CW'(wcnt) == sym_len(wfmt_next) - CW'(1)) begin
          wcnt        <= '0;
          full[wbank] <= 1'b1;
          bfmt[wbank] <= wfmt_next;
          wbank       <= ~wbank;
        end else begin
          wcnt <= wcnt + AW'(1);
        end
      end
      // read side
      out_valid <= reading;
      out_first <= reading && (rcnt == '0);
      if (reading) begin
        if (rcnt == rend) begin
          reading     <= full[~rbank];     // next symbol follows at once
          rcnt        <= '0;
          full[rbank] <= 1'b0;
          rbank       <= ~rbank;
        end else begin
          rcnt <= rcnt + CW'(1);
        end
      end else if (full[rbank]) begin
        reading <= 1'b1;
      end
    end
  end
endmodule
