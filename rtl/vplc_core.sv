// vplc_core: the two signal-processing cores of the very-high-rate power
// line modem, side by side:
//   MOD  fft_mod   4096/512-point FFT, and IFFT by swapping real and
//                  imaginary parts, for the DMT symbols;
//        cp_insert cyclic prefix for the transmitted symbols (448 samples
//                  on 4096-point symbols, 128 on control symbols);
//   FEC  ldpc_enc  quasi-cyclic LDPC encoder, rates 1/2 .. 7/8;
//        ldpc_dec  min-sum LDPC decoder for the same code.
// In the modem the chain between them (scrambler, bit-to-symbol mapper,
// carrier sensing, windowing, channel estimation, LLR demapper) is
// outside these cores, so each core keeps its own ports here; only clock
// and reset are shared. The prefix inserter is not chained behind the
// IFFT either: it needs N+P clocks per symbol against the IFFT's N, so
// the symbol source has to be paced, which is left to the surrounding
// modem. See the sub-modules for the
// interfaces and timing of each port group.
module vplc_core
  import vplc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  // MOD
  input  nsel_e mod_nsel,
  input  logic  mod_inverse,
  input  logic  mod_in_valid,
  output logic  mod_in_ready,
  input  cplx_t mod_in_data,
  output logic  mod_out_valid,
  output cplx_t mod_out_data,
  output logic  mod_busy,
  // cyclic-prefix insertion (transmit side)
  input  cpfmt_e cp_fmt,
  input  logic  cp_in_valid,
  output logic  cp_in_ready,
  input  cplx_t cp_in_data,
  output logic  cp_out_valid,
  output logic  cp_out_first,
  output cplx_t cp_out_data,
  // FEC encoder
  output logic enc_slot_start,
  input  logic enc_in_valid,
  input  logic [2:0] enc_rate_n,
  input  logic [LDPC_KMAX-1:0][LDPC_MB-1:0] enc_u_in,
  output logic enc_out_valid,
  output logic enc_p1_out,
  output logic [LDPC_MB-2:0] enc_p2_out,
  // FEC decoder
  output logic dec_in_ready,
  input  logic dec_in_valid,
  input  logic [2:0] dec_rate_n,
  input  logic [3:0] dec_max_iter,
  input  logic dec_early_stop,
  input  logic signed [5:0] dec_llr_in [LDPC_KMAX+1],
  output logic dec_out_valid,
  output logic [LDPC_KMAX-1:0] dec_cn_out,
  output logic [1:0] dec_checksum,
  output logic [3:0] dec_iter_used
);
  fft_mod u_mod (
    .clk(clk), .rst_n(rst_n), .nsel(mod_nsel), .inverse(mod_inverse),
    .in_valid(mod_in_valid), .in_ready(mod_in_ready), .in_data(mod_in_data),
    .out_valid(mod_out_valid), .out_data(mod_out_data), .busy(mod_busy)
  );

  cp_insert u_cp (
    .clk(clk), .rst_n(rst_n), .fmt(cp_fmt),
    .in_valid(cp_in_valid), .in_ready(cp_in_ready), .in_data(cp_in_data),
    .out_valid(cp_out_valid), .out_first(cp_out_first), .out_data(cp_out_data)
  );

  ldpc_enc u_enc (
    .clk(clk), .rst_n(rst_n), .slot_start(enc_slot_start),
    .in_valid(enc_in_valid), .rate_n(enc_rate_n), .u_in(enc_u_in),
    .out_valid(enc_out_valid), .p1_out(enc_p1_out), .p2_out(enc_p2_out)
  );

  ldpc_dec #(.WL(6)) u_dec (
    .clk(clk), .rst_n(rst_n), .in_ready(dec_in_ready),
    .in_valid(dec_in_valid), .rate_n(dec_rate_n), .max_iter(dec_max_iter),
    .early_stop(dec_early_stop), .llr_in(dec_llr_in),
    .out_valid(dec_out_valid), .cn_out(dec_cn_out),
    .checksum(dec_checksum), .iter_used(dec_iter_used)
  );
endmodule
