// dvfs_fft_processor: multimode 256-point FFT processor with dynamic voltage
// and frequency scaling, for 1..8-stream MIMO OFDM (300 Msample/s per
// stream) or one 2.4-Gsample/s stream.
//
// Blocks: the DVFS controller (mode latch, frequency control, per-domain
// voltage detection and scaling), the divider-based clock generator, the DVS
// detection unit (two voltage detectors, behavioural models of the timing
// sensors) and the FFT processing engine (input scheduler at fclk and two FFT
// cores in their own clock/voltage domains).
//
// Interface. clk is fclk (300 MHz in the target system). fft_in carries eight
// lanes of 8-bit complex samples: stream s on lane s in MIMO modes, eight
// consecutive samples of the single stream in high-speed mode. op_mode is
// taken at the rising edge of packet_en; packet_en high also marks the
// input as valid. symbol_en is high with the first sample of every 256-point
// symbol (with the first of 32 eight-sample words in high-speed mode); the
// inputs are registered once and symbol_en restarts the clock divider so
// the scheduling frame lines up with the symbol. Results leave on fft_out:
// lanes 0-3 from core 1 and 4-7 from core 2, each half with a valid, a
// symbol marker, the stream number and per lane the bin index. Outputs of a
// half change at that domain's clock rate. vctrl1/vctrl2 request the core
// supplies from the off-chip DC-DC converter (1.0 V - code * 25 mV);
// vdd1_mv/vdd2_mv are the supplies it delivers and env1_ps/env2_ps extra
// delay seen by the detectors, used only by the detector models. ready goes
// high when the power-on calibration is complete; packets are accepted then.
//
// Follows the published design: the four top-level parts and how they
// connect. This design's own choices: the packet/symbol input handshake, the
// output tagging, and bringing the converter and detector-model signals out
// as ports.
module dvfs_fft_processor
  import fft_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  mode_e             op_mode,
  input  logic              packet_en,
  input  logic              symbol_en,
  input  cin_t              fft_in [8],
  output cout_t             fft_out [8],
  output logic [7:0]        out_bin [8],
  output logic              out_vld [2],
  output logic              out_sof [2],
  output logic [2:0]        out_stream [2],
  output logic [3:0]        vctrl1,
  output logic [3:0]        vctrl2,
  input  logic [11:0]       vdd1_mv,
  input  logic [11:0]       vdd2_mv,
  input  logic signed [11:0] env1_ps,
  input  logic signed [11:0] env2_ps,
  output logic              ready,
  output logic              scaled1,
  output logic              scaled2,
  output logic              clk_fd1,
  output logic              clk_fd2,
  output logic [3:0]        kmax1 [4],   // calibrated lowest supply code per clock ratio
  output logic [3:0]        kmax2 [4]
);

  mode_cfg_t  cfg;
  logic [1:0] div1, div2;
  logic [2:0] cnt;
  logic       ce1, ce2;
  logic       test1, test2;
  logic [5:0] dsel1, dsel2;
  logic [3:0] det1, det2;

  // input register
  cin_t in_q [8];
  logic vld_q, sof_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) in_q[k] <= '0;
      vld_q <= 1'b0;
      sof_q <= 1'b0;
    end else begin
      in_q  <= fft_in;
      vld_q <= packet_en;
      sof_q <= symbol_en && packet_en;
    end

  dvfs_controller u_dvfs (
    .clk, .rst_n, .op_mode, .packet_en, .ce1, .ce2,
    .detected1(det1), .detected2(det2), .cfg, .div1, .div2,
    .test1, .test2, .delay_sel1(dsel1), .delay_sel2(dsel2),
    .vcode1(vctrl1), .vcode2(vctrl2), .ready, .scaled1, .scaled2,
    .kmax1, .kmax2);

  clock_gen u_clkgen (
    .clk, .rst_n, .clk_reset(symbol_en && packet_en), .div1, .div2, .cnt,
    .clk_d1(clk_fd1), .clk_d2(clk_fd2), .ce_d1(ce1), .ce_d2(ce2));

  voltage_detector u_vdet1 (
    .clk, .rst_n, .ce(ce1), .div(div1), .vdd_mv(vdd1_mv), .env_ps(env1_ps),
    .test(test1), .delay_sel(dsel1), .detected(det1));

  voltage_detector u_vdet2 (
    .clk, .rst_n, .ce(ce2), .div(div2), .vdd_mv(vdd2_mv), .env_ps(env2_ps),
    .test(test2), .delay_sel(dsel2), .detected(det2));

  fft_engine u_engine (
    .clk, .rst_n, .cfg, .cnt, .ce1, .ce2, .in(in_q), .in_vld(vld_q), .in_sof(sof_q),
    .out(fft_out), .out_bin, .out_vld, .out_sof, .out_stream);

endmodule
