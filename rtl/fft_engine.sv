// fft_engine: the multimode 256-point FFT processing engine.
//
// Input scheduler (fclk domain) -> FFT core 1 = Module 1 + Module 3 (clock
// enable ce1) and FFT core 2 = Module 2 + Module 4 (ce2). Modules 1 and 2 each
// process four of the eight parallel paths; Modules 3 and 4 either merge the
// two cores (1/2/4/7/8-stream and high-speed modes) or work as two separate
// four-path FFTs (3/5/6-stream modes), so the two cores can run at different
// clock rates and supply voltages. Level shifters between the domains are
// wires in this single-voltage model.
//
// Output: out[0..3] from core 1 (Module 3), out[4..7] from core 2 (Module 4),
// each half with a valid and symbol marker, the MIMO stream the samples
// belong to and the FFT bin index of each lane. In 8-path modes one output
// cycle delivers 8 bins of one stream split over both halves; in the group
// modes each half delivers 4 bins of its own stream. The 8th slot of the
// 7-stream mode is idle and is flagged not valid. Output is in the
// pipeline's natural (partly bit-reversed) order; out_bin names each bin.
//
// Follows the published design: the split into scheduler, two cores and
// Modules 1-4, and which modes merge or split. This design's own choices:
// the output tagging (stream and bin), the output scaling (OSH) and the
// single-clock enable scheme.
module fft_engine
  import fft_pkg::*;
#(
  parameter int OSH = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  mode_cfg_t  cfg,
  input  logic [2:0] cnt,
  input  logic       ce1,
  input  logic       ce2,
  input  cin_t       in  [8],
  input  logic       in_vld,
  input  logic       in_sof,
  output cout_t      out [8],
  output logic [7:0] out_bin [8],
  output logic       out_vld [2],
  output logic       out_sof [2],
  output logic [2:0] out_stream [2]
);

  cplx_t sch_out [8];
  logic  sch_vld [2], sch_sof [2];

  input_scheduler u_sched (
    .clk, .rst_n, .cfg, .cnt, .in, .in_vld, .in_sof,
    .out(sch_out), .out_vld(sch_vld), .out_sof(sch_sof));

  logic [1:0] s1_lg, s2_lg;
  assign s1_lg = lg2slots(cfg.slots1);
  assign s2_lg = lg2slots(cfg.slots2);

  cplx_t m1_in [4], m2_in [4], m1_out [4], m2_out [4];
  logic  m1_vld, m1_sof, m2_vld, m2_sof;
  always_comb
    for (int l = 0; l < 4; l++) begin
      m1_in[l] = sch_out[l];
      m2_in[l] = sch_out[4 + l];
    end

  fft_module12 #(.PBASE(0)) u_mod1 (
    .clk, .rst_n, .ce(ce1), .split(cfg.split), .slots_lg(s1_lg),
    .in(m1_in), .in_vld(sch_vld[0]), .in_sof(sch_sof[0]),
    .out(m1_out), .out_vld(m1_vld), .out_sof(m1_sof));

  fft_module12 #(.PBASE(4)) u_mod2 (
    .clk, .rst_n, .ce(ce2), .split(cfg.split), .slots_lg(cfg.split ? s2_lg : s1_lg),
    .in(m2_in), .in_vld(sch_vld[1]), .in_sof(sch_sof[1]),
    .out(m2_out), .out_vld(m2_vld), .out_sof(m2_sof));

  logic       o_vld [2];
  logic [2:0] o_slot [2];

  fft_module34 #(.OSH(OSH)) u_mod34 (
    .clk, .rst_n, .ce1, .ce2, .split(cfg.split), .slots1_lg(s1_lg), .slots2_lg(s2_lg),
    .in1(m1_out), .in1_vld(m1_vld), .in1_sof(m1_sof),
    .in2(m2_out), .in2_vld(m2_vld), .in2_sof(m2_sof),
    .out, .out_bin, .out_vld(o_vld), .out_sof, .out_slot(o_slot));

  always_comb begin
    out_stream[0] = o_slot[0];
    out_stream[1] = cfg.split ? 3'(cfg.nstr1) + o_slot[1] : o_slot[1];
    for (int h = 0; h < 2; h++)
      out_vld[h] = o_vld[h] && !(!cfg.split && (4'(o_slot[h]) >= cfg.nstr1));
  end

endmodule
