// ldpc_enc: quasi-cyclic LDPC encoder of the FEC core, rates n/(n+1),
// n = 1..7, information length 288*n bits, codeword 288*(n+1) bits.
//
// Parity follows Richardson's method on H = [A B T; C D E] (see
// vplc_pkg): with Phi = E*T^-1*B + D = I,
//   p1 = C*u + sum over block rows of A*u          (24 bits)
//   p2 = T^-1 * (A*u + B*p1)                        (11 x 24 bits)
// and T^-1 of the dual-diagonal T is a running XOR over block rows.
// Multiplying by a circulant I^s is a cyclic rotation: row i of I^s*x is
// x[(i+s) mod 24].
//
// Four pipeline stages of 24 clocks each, one bit position t (0..23) of
// every 24-bit sub-block per clock:
//   1  load: bit t of each of the 7x12 information sub-blocks is shifted
//      into the input registers;
//   2  the sub-blocks sit in circular shift registers that rotate once per
//      clock, so a fixed tap at position s reads bit (t+s) mod 24; XOR
//      trees form bit t of the 12 block-row products A*u, C*u, and of p1;
//   3  bit t of M_temp = A*u + B*p1 (p1 now complete, so B's rotation can
//      reach any bit);
//   4  bit t of p2_0..p2_10 as a running XOR down the block rows, sent out
//      with bit t of p1.
// Every stage hands its registers to the next at the end of its 24-clock
// slot, so a new codeword can enter every 24 clocks.
//
// Interface: the encoder runs in fixed 24-clock slots; slot_start marks
// the first clock (t = 0). A codeword is offered by holding in_valid high
// for a whole slot starting at slot_start, with rate_n (1..7) valid at
// t = 0 and u_in[k][j] = bit t of sub-block j of group k, i.e. info bit
// k*288 + j*24 + t (groups k >= rate_n are ignored). Output: 24 clocks
// with out_valid high, p1_out = bit t of p1 (codeword bit n*288 + t) and
// p2_out[r] = bit t of p2_r (codeword bit n*288 + 24 + r*24 + t).
// Latency: the last parity bit leaves 96 clocks after the first info bit
// entered (4 stages x 24 clocks).
//
// The four-stage, 24-clock, 96-clock-latency pipeline with circular shift
// registers and XOR blocks follows the source design; the bit-serial
// order inside a slot and the circulant shift values are this design's.
module ldpc_enc
  import vplc_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output logic slot_start,
  input  logic in_valid,
  input  logic [2:0] rate_n,
  input  logic [LDPC_KMAX-1:0][LDPC_MB-1:0] u_in,
  output logic out_valid,
  output logic p1_out,
  output logic [LDPC_MB-2:0] p2_out
);
  localparam int G  = LDPC_G;
  localparam int MB = LDPC_MB;
  localparam int K  = LDPC_KMAX;
  typedef logic [G-1:0] sub_t;

  logic [$clog2(G)-1:0] t;
  logic                 last;

  // stage 1
  sub_t       s1_acc [K][MB];
  logic       s1_v;
  logic [2:0] s1_rate;
  // stage 2
  sub_t s2_u   [K][MB];
  sub_t s2_acc [MB];
  sub_t s2_p1;
  logic s2_v;
  logic [MB-1:0] prod;
  logic          p1_bit;
  // stage 3
  sub_t s3_prod [MB-1];
  sub_t s3_p1;
  sub_t s3_acc  [MB-1];
  logic s3_v;
  logic [MB-2:0] mt;
  // stage 4
  sub_t s4_mt [MB-1];
  sub_t s4_p1;
  logic s4_v;

  assign last       = (t == 5'(G - 1));
  assign slot_start = (t == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) t <= '0;
    else        t <= last ? '0 : t + 5'd1;
  end

  // ---- stage 2 combinational: tapping block and XOR blocks 1..3 ----
  always_comb begin
    for (int r = 0; r < MB; r++) begin
      prod[r] = 1'b0;
      for (int c = 0; c < LDPC_PCOL; c++)
        if (hb_shift(r, c) >= 0)
          prod[r] = prod[r] ^ s2_u[c / MB][c % MB][hb_shift(r, c)];
    end
    p1_bit = ^prod;
  end

  // ---- stage 3 combinational: XOR with B*p1 ----
  always_comb begin
    for (int r = 0; r < MB - 1; r++) begin
      mt[r] = s3_prod[r][t];
      if (hb_shift(r, LDPC_PCOL) >= 0)
        mt[r] = mt[r] ^ s3_p1[(32'(t) + hb_shift(r, LDPC_PCOL)) % G];
    end
  end

  // ---- stage 4 combinational: T^-1 as running XOR ----
  always_comb begin
    logic acc;
    acc = 1'b0;
    for (int r = 0; r < MB - 1; r++) begin
      acc       = acc ^ s4_mt[r][t];
      p2_out[r] = acc;
    end
    p1_out    = s4_p1[t];
    out_valid = s4_v;
  end

  // ---- datapath registers ----
  always_ff @(posedge clk) begin
    for (int k = 0; k < K; k++)
      for (int j = 0; j < MB; j++) begin
        s1_acc[k][j] <= {u_in[k][j], s1_acc[k][j][G-1:1]};
        if (last)
          s2_u[k][j] <= (k < int'(s1_rate)) ? {u_in[k][j], s1_acc[k][j][G-1:1]} : '0;
        else
          s2_u[k][j] <= {s2_u[k][j][0], s2_u[k][j][G-1:1]};
      end
    for (int r = 0; r < MB; r++)
      s2_acc[r] <= {prod[r], s2_acc[r][G-1:1]};
    s2_p1 <= {p1_bit, s2_p1[G-1:1]};
    for (int r = 0; r < MB - 1; r++)
      s3_acc[r] <= {mt[r], s3_acc[r][G-1:1]};
    if (last) begin
      for (int r = 0; r < MB - 1; r++) begin
        s3_prod[r] <= {prod[r], s2_acc[r][G-1:1]};
        s4_mt[r]   <= {mt[r], s3_acc[r][G-1:1]};
      end
      s3_p1 <= {p1_bit, s2_p1[G-1:1]};
      s4_p1 <= s3_p1;
    end
  end

  // ---- slot valid flags ----
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s1_rate <= 3'd1;
      s2_v <= 1'b0; s3_v <= 1'b0; s4_v <= 1'b0;
    end else begin
      if (slot_start) begin
        s1_v    <= in_valid;
        s1_rate <= rate_n;
      end
      if (last) begin
        s2_v <= s1_v;
        s3_v <= s2_v;
        s4_v <= s3_v;
      end
    end
  end

  // a codeword occupies its whole slot
  a_whole_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (!slot_start && s1_v) |-> in_valid);
  a_rate: assert property (@(posedge clk) disable iff (!rst_n)
    (slot_start && in_valid) |-> (rate_n != 3'd0));
endmodule
