// fft_module34: Modules 3 and 4, the last three radix-2 steps of the second
// radix-16 stage (steps 2-4), including the path merge between the cores.
//
// Input: four paths from Module 1 (FFT core 1, clock enable ce1) and four from
// Module 2 (FFT core 2, ce2). Half 0 of this block is Module 3 (ce1), half 1
// is Module 4 (ce2). Notation as in fft_module12: g2,g3,g4 are the lowest bits
// of n, and lambda1..lambda4 the bits of k2 in X(k1 + 16*k2).
//
// * 8-path modes (1/2/4/7/8-stream, high-speed): g2 is the path bit 2, i.e.
//   it separates Module 1 from Module 2. The four first-step BUs of Module 4
//   merge path l of Module 1 with path l of Module 2; the sums (lambda2=0) go
//   to Module 3, the differences (lambda2=1) stay in Module 4. The first-step
//   BUs of Module 3 are bypassed. No FIFO is used.
// * 4-path group modes (3/5/6-stream): g2 is a time bit, so each module's
//   first-step BUs work as delay-feedback stages on their own paths (FIFO 2**
//   slots_lg words: at most 4 in Module 3 and 2 in Module 4) and nothing
//   crosses between the modules.
// Then, in each module: x W8^(g3*(lambda1 + 2*lambda2)), BU over g3,
// x W16^(g4*(lambda1 + 2*lambda2 + 4*lambda3)), BU over g4. Both steps are
// spatial (between the module's four paths) and registered.
//
// Output: lane 4*h + 2*lambda3 + lambda4 of half h, rounded by 2**OSH and
// saturated to OW bits. Each half also reports its valid/symbol markers, the
// stream slot of the current sample and, per lane, the output bin index k.
//
// Follows the published design: the merge through Module 4's first-step BUs,
// the bypass of Module 3's, the FIFO sizes of the group modes (Module 3 2 or
// 4 words, Module 4 1 or 2 words) and the trivial multipliers. This design's
// own choices: registered spatial last steps, the bin tagging and the
// rounding/saturation of the output.
module fft_module34
  import fft_pkg::*;
#(
  parameter int OSH = 5   // output scaling: right shift from DW to OW bits
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce1,
  input  logic       ce2,
  input  logic       split,
  input  logic [1:0] slots1_lg,
  input  logic [1:0] slots2_lg,
  input  cplx_t      in1 [4],
  input  logic       in1_vld,
  input  logic       in1_sof,
  input  cplx_t      in2 [4],
  input  logic       in2_vld,
  input  logic       in2_sof,
  output cout_t      out [8],
  output logic [7:0] out_bin [8],
  output logic       out_vld [2],
  output logic       out_sof [2],
  output logic [2:0] out_slot [2]
);

  // ---- first step: per-module delay-feedback BUs or the path merge --------
  cplx_t f3_out [4], f4_out [4];
  logic  f3_vld, f3_sof, f4_vld, f4_sof;
  logic  f3_vld_l [4], f3_sof_l [4], f4_vld_l [4], f4_sof_l [4];
  cplx_t mg_sum [4], mg_dif [4];
  logic  mg_vld, mg_sof;

  for (genvar l = 0; l < 4; l++) begin : g_first
    sdf_stage #(.MAXLEN(4), .LGW(2)) u_bu3 (
      .clk, .rst_n, .ce(ce1), .len_lg(slots1_lg), .in(in1[l]),
      .in_vld(in1_vld & split), .in_sof(in1_sof & split),
      .out(f3_out[l]), .out_vld(f3_vld_l[l]), .out_sof(f3_sof_l[l]));
    sdf_stage #(.MAXLEN(2), .LGW(1)) u_bu4 (
      .clk, .rst_n, .ce(ce2), .len_lg(slots2_lg[0]), .in(in2[l]),
      .in_vld(in2_vld & split), .in_sof(in2_sof & split),
      .out(f4_out[l]), .out_vld(f4_vld_l[l]), .out_sof(f4_sof_l[l]));

    // Module 4 first-step BUs used as the path merge (8-path modes)
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        mg_sum[l] <= '0;
        mg_dif[l] <= '0;
      end else if (ce2) begin
        mg_sum[l].re <= in1[l].re + in2[l].re;
        mg_sum[l].im <= in1[l].im + in2[l].im;
        mg_dif[l].re <= in1[l].re - in2[l].re;
        mg_dif[l].im <= in1[l].im - in2[l].im;
      end
  end

  assign f3_vld = f3_vld_l[0];
  assign f3_sof = f3_sof_l[0];
  assign f4_vld = f4_vld_l[0];
  assign f4_sof = f4_sof_l[0];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mg_vld <= 1'b0;
      mg_sof <= 1'b0;
    end else if (ce2) begin
      mg_vld <= in1_vld & ~split;
      mg_sof <= in1_sof & ~split;
    end

  // ---- per-module steps 3 and 4 --------------------------------------------
  cplx_t v    [2][4];
  logic  v_vld [2], v_sof [2];
  logic  ce_h [2];
  logic [1:0] s_lg [2];

  assign ce_h[0] = ce1;
  assign ce_h[1] = ce2;
  assign s_lg[0] = slots1_lg;
  assign s_lg[1] = split ? slots2_lg : slots1_lg;

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      v[0][l] = split ? f3_out[l] : mg_sum[l];
      v[1][l] = split ? f4_out[l] : mg_dif[l];
    end
    v_vld[0] = split ? f3_vld : mg_vld;
    v_sof[0] = split ? f3_sof : mg_sof;
    v_vld[1] = split ? f4_vld : mg_vld;
    v_sof[1] = split ? f4_sof : mg_sof;
  end

  for (genvar h = 0; h < 2; h++) begin : g_half
    // position of the sample at the step-3 input
    logic [7:0] pa_q, pa;
    logic [1:0] ma;
    logic       lam1, lam2;
    always_comb begin
      pa = v_sof[h] ? 8'd0 : pa_q + 8'd1;
      ma = 2'(pa >> s_lg[h]);
      if (split) begin
        lam1 = ma[1];
        lam2 = ma[0];
      end else begin
        lam1 = ma[0];
        lam2 = 1'(h);
      end
    end

    // step 3: x W8^(g3*(lam1 + 2*lam2)) on the g3=1 lanes, BU over g3
    cplx_t w3 [2];
    cplx_t u_d [4];   // index 2*lambda3 + g4
    logic  lam1_a, lam2_a, u_vld, u_sof;
    for (genvar g4 = 0; g4 < 2; g4++) begin : g_s3
      trivial_cmult u_tw8 (.a(v[h][2 + g4]), .e({lam2, lam1, 1'b0}), .y(w3[g4]));
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        pa_q <= '0;
        for (int i = 0; i < 4; i++) u_d[i] <= '0;
        {lam1_a, lam2_a, u_vld, u_sof} <= '0;
      end else if (ce_h[h]) begin
        pa_q <= pa;
        for (int g4 = 0; g4 < 2; g4++) begin
          u_d[g4].re     <= v[h][g4].re + w3[g4].re;
          u_d[g4].im     <= v[h][g4].im + w3[g4].im;
          u_d[2 + g4].re <= v[h][g4].re - w3[g4].re;
          u_d[2 + g4].im <= v[h][g4].im - w3[g4].im;
        end
        lam1_a <= lam1;
        lam2_a <= lam2;
        u_vld  <= v_vld[h];
        u_sof  <= v_sof[h];
      end

    // step 4: x W16^(g4*(lam1 + 2*lam2 + 4*lam3)) on the g4=1 lanes, BU over g4
    cplx_t w4 [2];
    cplx_t y_d [4];   // index 2*lambda3 + lambda4
    logic [1:0] lam12_b;
    logic  y_vld, y_sof;
    for (genvar l3 = 0; l3 < 2; l3++) begin : g_s4
      trivial_cmult u_tw16 (.a(u_d[2*l3 + 1]), .e({1'(l3), lam2_a, lam1_a}), .y(w4[l3]));
    end

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        for (int i = 0; i < 4; i++) y_d[i] <= '0;
        {lam12_b, y_vld, y_sof} <= '0;
      end else if (ce_h[h]) begin
        for (int l3 = 0; l3 < 2; l3++) begin
          y_d[2*l3].re     <= u_d[2*l3].re + w4[l3].re;
          y_d[2*l3].im     <= u_d[2*l3].im + w4[l3].im;
          y_d[2*l3 + 1].re <= u_d[2*l3].re - w4[l3].re;
          y_d[2*l3 + 1].im <= u_d[2*l3].im - w4[l3].im;
        end
        lam12_b <= {lam2_a, lam1_a};
        y_vld   <= u_vld;
        y_sof   <= u_sof;
      end

    // output position: k1 from the time index, slot from the interleave
    logic [7:0] po_q, po;
    logic [5:1] mo;
    logic [3:0] k1;
    always_comb begin
      po = y_sof ? 8'd0 : po_q + 8'd1;
      mo = 5'(po >> (3'(s_lg[h]) + 3'd1));
      k1 = split ? {mo[2], mo[3], mo[4], mo[5]} : {mo[1], mo[2], mo[3], mo[4]};
    end
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) po_q <= '0;
      else if (ce_h[h]) po_q <= po;

    assign out_vld[h]  = y_vld;
    assign out_sof[h]  = y_sof;
    assign out_slot[h] = 3'(po & ((8'd1 << s_lg[h]) - 8'd1));

    for (genvar o = 0; o < 4; o++) begin : g_out
      // k2 = lambda1 + 2*lambda2 + 4*lambda3 + 8*lambda4, o = 2*lambda3 + lambda4
      assign out_bin[4*h + o] = {o[0] ? 1'b1 : 1'b0, o[1] ? 1'b1 : 1'b0, lam12_b[1], lam12_b[0], k1};
      assign out[4*h + o].re  = sat_round(y_d[o].re);
      assign out[4*h + o].im  = sat_round(y_d[o].im);
    end
  end

  function automatic logic signed [OW-1:0] sat_round(input logic signed [DW-1:0] x);
    logic signed [DW:0] r;
    r = ((DW+1)'(x) + ((DW+1)'(1) <<< (OSH - 1))) >>> OSH;
    if (r > (DW+1)'((1 <<< (OW - 1)) - 1))       return OW'((1 <<< (OW - 1)) - 1);
    else if (r < -(DW+1)'(1 <<< (OW - 1)))       return OW'(-(1 <<< (OW - 1)));
    else                                         return OW'(r);
  endfunction

endmodule
