// dvfs_controller: the DVFS controller of the FFT processor.
//
// It latches the operation mode at the start of each packet (rising edge of
// packet_en), turns it into the data-path configuration and the clock ratio
// of each core domain (table in fft_pkg::mode_cfg: e.g. 1-stream runs both
// cores at fclk/8, 5-stream runs core 1 at fclk and core 2 at fclk/4), drives
// the clock generator's frequency control, and runs one open-loop voltage
// detection and scaling controller per domain. While those calibrate after
// reset, the frequency control follows their calibration sweep and packets
// are not accepted (ready low). The supply requests vcode1/vcode2 go to the
// off-chip DC-DC converter.
//
// Follows the published design: the per-mode clock ratios and one voltage
// controller per core domain. This design's own choices: latching the mode on
// the packet edge and holding packets back (ready) until calibration ends.
module dvfs_controller
  import fft_pkg::*;
#(
  parameter int NUNIT  = 4,
  parameter int SETTLE = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mode_e            op_mode,
  input  logic             packet_en,
  input  logic             ce1,
  input  logic             ce2,
  input  logic [NUNIT-1:0] detected1,
  input  logic [NUNIT-1:0] detected2,
  output mode_cfg_t        cfg,
  output logic [1:0]       div1,
  output logic [1:0]       div2,
  output logic             test1,
  output logic             test2,
  output logic [5:0]       delay_sel1,
  output logic [5:0]       delay_sel2,
  output logic [3:0]       vcode1,
  output logic [3:0]       vcode2,
  output logic             ready,
  output logic             scaled1,
  output logic             scaled2,
  output logic [3:0]       kmax1 [4],
  output logic [3:0]       kmax2 [4]
);

  logic pkt_q, pkt_start, cal1, cal2;
  logic [1:0] cdiv1, cdiv2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pkt_q <= 1'b0;
      cfg   <= mode_cfg(MODE_1S);
    end else begin
      pkt_q <= packet_en;
      if (packet_en && !pkt_q) cfg <= mode_cfg(op_mode);
    end

  // the detection starts one cycle after the mode is latched
  logic pkt_start_d;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pkt_start_d <= 1'b0;
    else        pkt_start_d <= packet_en && !pkt_q && ready;
  assign pkt_start = pkt_start_d;

  assign ready = !cal1 && !cal2;
  assign div1  = cal1 ? cdiv1 : cfg.div1;
  assign div2  = cal2 ? cdiv2 : cfg.div2;

  olvds_ctrl #(.NUNIT(NUNIT), .SETTLE(SETTLE)) u_ctrl1 (
    .clk, .rst_n, .ce(ce1), .pkt_start, .pkt_active(pkt_q), .pkt_div(cfg.div1),
    .detected(detected1), .test(test1), .delay_sel(delay_sel1), .vcode(vcode1),
    .calibrating(cal1), .cal_div(cdiv1), .scaled(scaled1), .kmax_out(kmax1));

  olvds_ctrl #(.NUNIT(NUNIT), .SETTLE(SETTLE)) u_ctrl2 (
    .clk, .rst_n, .ce(ce2), .pkt_start, .pkt_active(pkt_q), .pkt_div(cfg.div2),
    .detected(detected2), .test(test2), .delay_sel(delay_sel2), .vcode(vcode2),
    .calibrating(cal2), .cal_div(cdiv2), .scaled(scaled2), .kmax_out(kmax2));

endmodule
