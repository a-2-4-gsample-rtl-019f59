// tb_dvfs_controller: the DVFS controller with the clock generator, two
// detector models and ideal supplies (1000 mV - 25 mV per code). Checks:
//  * packets are refused (ready low) until both domains are calibrated, and
//    the calibrated lowest supply code per clock ratio matches a search done
//    here from the detector's delay law;
//  * for each of the nine modes the clock ratios of the two core domains
//    follow the mode table (1-stream: fclk/8 on both, 3-stream: /2 and /4,
//    5-stream: /1 and /4, 6-stream: /1 and /2, 7/8-stream and high-speed:
//    fclk on both, ...) and the stream split is right;
//  * each domain is scaled to the supply its clock ratio allows and returns
//    to nominal between packets;
//  * a mode change during a packet is ignored until the next packet.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_dvfs_controller;
  import fft_pkg::*;
  localparam int NUNIT = 4;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  mode_e op_mode = MODE_1S;
  logic packet_en = 0;
  logic ce1, ce2, clk_d1, clk_d2;
  logic [2:0] cnt;
  logic [NUNIT-1:0] det1, det2;
  mode_cfg_t cfg;
  logic [1:0] div1, div2;
  logic test1, test2, ready, scaled1, scaled2;
  logic [5:0] ds1, ds2;
  logic [3:0] vc1, vc2, kmax1 [4], kmax2 [4];
  int checks = 0, failures = 0;

  dvfs_controller #(.NUNIT(NUNIT), .SETTLE(8)) dut (
    .clk, .rst_n, .op_mode, .packet_en, .ce1, .ce2, .detected1(det1), .detected2(det2),
    .cfg, .div1, .div2, .test1, .test2, .delay_sel1(ds1), .delay_sel2(ds2),
    .vcode1(vc1), .vcode2(vc2), .ready, .scaled1, .scaled2, .kmax1, .kmax2);
  clock_gen u_clk (.clk, .rst_n, .clk_reset(1'b0), .div1, .div2, .cnt, .clk_d1, .clk_d2,
                   .ce_d1(ce1), .ce_d2(ce2));
  voltage_detector #(.NUNIT(NUNIT)) u_det1 (.clk, .rst_n, .ce(ce1), .div(div1),
    .vdd_mv(12'(1000 - 25 * vc1)), .env_ps(12'sd0), .test(test1), .delay_sel(ds1), .detected(det1));
  voltage_detector #(.NUNIT(NUNIT)) u_det2 (.clk, .rst_n, .ce(ce2), .div(div2),
    .vdd_mv(12'(1000 - 25 * vc2)), .env_ps(12'sd0), .test(test2), .delay_sel(ds2), .detected(det2));

  // reference: delay law of the detector model, exhaustive search
  function automatic real scale(input real v);
    return (v / ((v - 0.26) * (v - 0.26))) * (0.74 * 0.74);
  endfunction
  function automatic bit all_fit(input int f, input int code, input int n);
    for (int u = 0; u < NUNIT; u++)
      if ((2397.0 + 8.0 * u + 20.0 * n) * scale((1000.0 - 25.0 * code) / 1000.0) > 3333.0 * (1 << f))
        return 0;
    return 1;
  endfunction
  int nref [4][16], kref [4];
  function automatic int exp_code(input int f);
    int j, i;
    j = (kref[f] > 3) ? kref[f] - 3 : 0;
    i = kref[f];
    while (i > j && !all_fit(f, j, nref[f][j] - nref[f][i])) i--;
    return i;
  endfunction

  // mode table written out independently: {div1, div2, split, streams1, streams2}
  function automatic void table_row(input int m, output int d1, output int d2, output int sp,
                                    output int s1, output int s2);
    case (m)
      1: begin d1 = 3; d2 = 3; sp = 0; s1 = 1; s2 = 0; end
      2: begin d1 = 2; d2 = 2; sp = 0; s1 = 2; s2 = 0; end
      3: begin d1 = 1; d2 = 2; sp = 1; s1 = 2; s2 = 1; end
      4: begin d1 = 1; d2 = 1; sp = 0; s1 = 4; s2 = 0; end
      5: begin d1 = 0; d2 = 2; sp = 1; s1 = 4; s2 = 1; end
      6: begin d1 = 0; d2 = 1; sp = 1; s1 = 4; s2 = 2; end
      7: begin d1 = 0; d2 = 0; sp = 0; s1 = 7; s2 = 0; end
      8: begin d1 = 0; d2 = 0; sp = 0; s1 = 8; s2 = 0; end
      default: begin d1 = 0; d2 = 0; sp = 0; s1 = 1; s2 = 0; end
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int f = 0; f < 4; f++) begin
      kref[f] = 0;
      for (int v = 0; v < 16; v++) begin
        nref[f][v] = -1;
        for (int n = 59; n >= 0; n--) if (nref[f][v] < 0 && all_fit(f, v, n)) nref[f][v] = n;
      end
      for (int v = 0; v < 16 && nref[f][v] >= 0; v++) kref[f] = v;
    end
    repeat (3) @(posedge clk); #0.1 rst_n = 1;
    repeat (10) @(posedge clk); #0.1;
    check(!ready, "not ready while calibrating");
    wait (ready);
    for (int f = 0; f < 4; f++)
      check(kmax1[f] == 4'(kref[f]) && kmax2[f] == 4'(kref[f]),
            $sformatf("K(f=%0d) = %0d/%0d, expected %0d", f, kmax1[f], kmax2[f], kref[f]));
    for (int m = 1; m <= 9; m++) begin
      int d1, d2, sp, s1, s2;
      table_row(m, d1, d2, sp, s1, s2);
      @(posedge clk); #0.1;
      op_mode = mode_e'(m); packet_en = 1;
      @(posedge clk); #0.1;
      op_mode = (m == 1) ? MODE_8S : MODE_1S;   // ignored until the next packet
      check(div1 == 2'(d1) && div2 == 2'(d2),
            $sformatf("mode %0d: ratios %0d/%0d, expected %0d/%0d", m, div1, div2, d1, d2));
      check(cfg.split == sp[0] && cfg.nstr1 == 4'(s1) && cfg.nstr2 == 4'(s2) && cfg.hs == (m == 9),
            $sformatf("mode %0d: stream split", m));
      fork
        wait (scaled1 && scaled2);
        repeat (20000) @(posedge clk);
      join_any
      disable fork;
      check(scaled1 && scaled2, $sformatf("mode %0d: scaling finished", m));
      check(vc1 == 4'(exp_code(d1)) && vc2 == 4'(exp_code(d2)),
            $sformatf("mode %0d: supplies %0d/%0d, expected %0d/%0d", m, vc1, vc2, exp_code(d1), exp_code(d2)));
      check(div1 == 2'(d1) && div2 == 2'(d2), $sformatf("mode %0d: ratios held in the packet", m));
      #0.1 packet_en = 0;
      repeat (3) @(posedge clk); #0.1;
      check(vc1 == 0 && vc2 == 0, $sformatf("mode %0d: nominal supply between packets", m));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
