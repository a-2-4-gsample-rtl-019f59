// fft_module12: Module 1 (paths 0-3, FFT core 1) or Module 2 (paths 4-7,
// FFT core 2) of the multimode multipath-delay-feedback FFT engine.
//
// Each of the four paths is an independent radix-2^4 single-path delay
// feedback pipeline of five butterfly units:
//   BU1 (FIFO 128) x {1,-j}  BU2 (64) x {1,-j,W8^1,W8^3}  BU3 (32) x W16^e
//   BU4 (16) x W256^n (full complex multiplier)  BU5 (8) x {1,-j}
// BU1..BU4 are the first radix-16 stage, the multiplier is the inter-stage
// twiddle and BU5 is the first step of the second radix-16 stage.
//
// Index bookkeeping. With the input index n = 16*n1 + n2 and n2 = 8*g1 + 4*g2
// + 2*g3 + g4:
//   * 8-path modes (split=0): path P = n mod 8 = 4*g2 + 2*g3 + g4; the time
//     index within a stream is m = n div 8 = 2*n1 + g1 (5 bits).
//   * 4-path group modes (split=1): lane L = n mod 4 = 2*g3 + g4;
//     m = n div 4 = 4*n1 + 2*g1 + g2 (6 bits).
// Each stream slot of the interleave (2**slots_lg slots) occupies consecutive
// enabled clocks, so the butterfly distance 2**b of bit b of m becomes a FIFO
// of 2**(b + slots_lg) words. That gives the mode-dependent FIFO sizes
// 16p/2^(k-1) (8-path, p slots) and 32q/2^(k-1) (groups, q streams).
// A position counter restarted by the symbol marker tells every multiplier
// which index bits the current sample carries.
//
// Interface: one sample per path per enabled clock (ce); in_sof marks the
// first sample of a symbol (slot 0, m = 0), in_vld qualifies data. Latency
// is the sum of the FIFO lengths plus 6 enabled clocks.
//
// Follows the published design: five BUs per path with FIFOs of 128, 64,
// 32, 16 and 8 words, the multipliers between them and the FIFO sizes per
// mode. This design's own choices: deriving the twiddle exponents from
// position counters, the 18-bit word and the marker signals.
module fft_module12
  import fft_pkg::*;
#(
  parameter int PBASE = 0   // global index of this module's first path (0 or 4)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  logic       split,      // 1: 3/5/6-stream group modes
  input  logic [1:0] slots_lg,   // log2 of the interleaved stream slots
  input  cplx_t      in  [4],
  input  logic       in_vld,
  input  logic       in_sof,
  output cplx_t      out [4],
  output logic       out_vld,
  output logic       out_sof
);

  localparam int MAXL [5] = '{128, 64, 32, 16, 8};

  // FIFO length of stage k (k = 0..4): 2**(4 + split + slots_lg - k)
  logic [3:0] len_lg [5];
  always_comb
    for (int k = 0; k < 5; k++)
      len_lg[k] = 4'(4 + int'(split) + int'(slots_lg) - k);

  // stage outputs / multiplier outputs per lane
  cplx_t s_out [5][4];
  logic  s_vld [5][4];
  logic  s_sof [5][4];
  cplx_t m_in  [5][4];   // input of stage k
  cplx_t tw_out [4];
  logic  tw_vld [4];
  logic  tw_sof [4];

  // position counters at the outputs of stages 0..4 (lane 0 markers)
  logic [7:0] pos_q [5];
  logic [7:0] pos   [5];
  logic [5:0] m     [5];
  always_comb
    for (int k = 0; k < 5; k++) begin
      pos[k] = s_sof[k][0] ? 8'd0 : pos_q[k] + 8'd1;
      m[k]   = 6'(pos[k] >> slots_lg);
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int k = 0; k < 5; k++) pos_q[k] <= '0;
    else if (ce) for (int k = 0; k < 5; k++) pos_q[k] <= pos[k];

  // trivial twiddle exponents (powers of W16) after stages 1..3, and the
  // W256 exponent after stage 4, from the bits carried by m
  logic [2:0] e1, e2, e3;
  logic [3:0] k1;
  logic       b1a, b2a, b3a, b4a, a2, a3, a4;
  always_comb begin
    // after stage 1: W4^(a2*b1)
    a2  = m[0][3 + int'(split)];
    b1a = m[0][4 + int'(split)];
    e1  = (a2 & b1a) ? 3'd4 : 3'd0;
    // after stage 2: W8^(a3*(b1 + 2*b2))
    a3  = m[1][2 + int'(split)];
    e2  = a3 ? 3'({m[1][3 + int'(split)], m[1][4 + int'(split)], 1'b0}) : 3'd0;
    // after stage 3: W16^(a4*(b1 + 2*b2 + 4*b3))
    a4  = m[2][1 + int'(split)];
    e3  = a4 ? {m[2][2 + int'(split)], m[2][3 + int'(split)], m[2][4 + int'(split)]} : 3'd0;
    // after stage 4: k1 = b1 + 2*b2 + 4*b3 + 8*b4
    b1a = m[3][4 + int'(split)];
    b2a = m[3][3 + int'(split)];
    b3a = m[3][2 + int'(split)];
    b4a = m[3][1 + int'(split)];
    k1  = {b4a, b3a, b2a, b1a};
  end

  // after stage 5: W4^(g2*lambda1)
  logic g2x, l1x;
  always_comb begin
    if (split) begin
      g2x = m[4][0];
      l1x = m[4][1];
    end else begin
      g2x = (PBASE >= 4);
      l1x = m[4][0];
    end
  end

  for (genvar l = 0; l < 4; l++) begin : g_lane
    logic [3:0] n2;
    logic [7:0] e256;
    always_comb begin
      if (split) n2 = {m[3][1], m[3][0], 2'(l)};
      else       n2 = {m[3][0], 3'(PBASE + l)};
      e256 = 8'(n2) * 8'(k1);
    end

    assign m_in[0][l] = in[l];
    trivial_cmult u_t1 (.a(s_out[0][l]), .e(e1), .y(m_in[1][l]));
    trivial_cmult u_t2 (.a(s_out[1][l]), .e(e2), .y(m_in[2][l]));
    trivial_cmult u_t3 (.a(s_out[2][l]), .e(e3), .y(m_in[3][l]));
    trivial_cmult u_t5 (.a(s_out[4][l]), .e((g2x & l1x) ? 3'd4 : 3'd0), .y(out[l]));

    for (genvar k = 0; k < 5; k++) begin : g_stage
      if (k == 4) begin : g_last
        sdf_stage #(.MAXLEN(MAXL[k]), .LGW(4)) u_bu (
          .clk, .rst_n, .ce, .len_lg(len_lg[k]),
          .in(tw_out[l]), .in_vld(tw_vld[l]), .in_sof(tw_sof[l]),
          .out(s_out[k][l]), .out_vld(s_vld[k][l]), .out_sof(s_sof[k][l]));
      end else begin : g_mid
        sdf_stage #(.MAXLEN(MAXL[k]), .LGW(4)) u_bu (
          .clk, .rst_n, .ce, .len_lg(len_lg[k]),
          .in(m_in[k][l]), .in_vld(k == 0 ? in_vld : s_vld[k-1][l]),
          .in_sof(k == 0 ? in_sof : s_sof[k-1][l]),
          .out(s_out[k][l]), .out_vld(s_vld[k][l]), .out_sof(s_sof[k][l]));
      end
    end

    twiddle_cmult u_w256 (
      .clk, .rst_n, .ce, .in(s_out[3][l]), .e(e256),
      .in_vld(s_vld[3][l]), .in_sof(s_sof[3][l]),
      .out(tw_out[l]), .out_vld(tw_vld[l]), .out_sof(tw_sof[l]));
  end

  assign out_vld = s_vld[4][0];
  assign out_sof = s_sof[4][0];

endmodule
