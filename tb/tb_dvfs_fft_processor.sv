// tb_dvfs_fft_processor: end-to-end test of the whole processor with every
// parameter at its default.
//
// The testbench plays the off-chip DC-DC converter: the core supplies follow
// the requested codes (1.0 V - 25 mV per code) by one 25-mV step every four
// fclk cycles. After reset it waits for the power-on calibration, then sends
// a sequence of packets, each of two 256-point symbols per stream, in all
// nine operation modes (and once more in 8-stream mode with extra detector
// delay on domain 1, so that the voltage search must back off). For every
// packet it checks:
//  * every bin of every stream against a double-precision DFT / 32 (the
//    output scaling) within 3 LSB, each bin delivered exactly once, nothing
//    delivered for streams that do not exist (7-stream idle slot);
//  * the symbol rate: one symbol per 256 fclk cycles per stream (MIMO) or per
//    32 fclk cycles (high-speed), measured between output symbol markers;
//  * the domain clock ratios of the mode, the supply codes reached by the
//    voltage search and their return to nominal between packets.
// Mechanisms counted (each must happen): calibration, voltage scaling below
// nominal, a backed-off voltage search, mode switches, path merge, 4-path
// groups, scheduler bypass (high-speed), idle-slot masking (7-stream).
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_dvfs_fft_processor;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int NSYM = 2;
  localparam real TOL = 3.0;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  mode_e op_mode = MODE_1S;
  logic packet_en = 0, symbol_en = 0;
  cin_t fft_in [8];
  cout_t fft_out [8];
  logic [7:0] out_bin [8];
  logic out_vld [2], out_sof [2];
  logic [2:0] out_stream [2];
  logic [3:0] vctrl1, vctrl2, kmax1 [4], kmax2 [4];
  logic [11:0] vdd1 = 1000, vdd2 = 1000;
  logic signed [11:0] env1 = 0, env2 = 0;
  logic ready, scaled1, scaled2, clk_fd1, clk_fd2;

  dvfs_fft_processor dut (
    .clk, .rst_n, .op_mode, .packet_en, .symbol_en, .fft_in, .fft_out, .out_bin, .out_vld,
    .out_sof, .out_stream, .vctrl1, .vctrl2, .vdd1_mv(vdd1), .vdd2_mv(vdd2),
    .env1_ps(env1), .env2_ps(env2), .ready, .scaled1, .scaled2, .clk_fd1, .clk_fd2,
    .kmax1, .kmax2);

  // DC-DC converter model: 25 mV per 4 fclk cycles towards the request
  logic [1:0] slew = 0;
  always @(posedge clk) begin
    slew <= slew + 2'd1;
    if (slew == 2'd3) begin
      if (vdd1 > 12'(1000 - 25 * vctrl1)) vdd1 <= vdd1 - 12'd25;
      else if (vdd1 < 12'(1000 - 25 * vctrl1)) vdd1 <= vdd1 + 12'd25;
      if (vdd2 > 12'(1000 - 25 * vctrl2)) vdd2 <= vdd2 - 12'd25;
      else if (vdd2 < 12'(1000 - 25 * vctrl2)) vdd2 <= vdd2 + 12'd25;
    end
  end

  int checks = 0, failures = 0;
  int n_cal = 0, n_vscale = 0, n_backoff = 0, n_switch = 0, n_merge = 0, n_group = 0,
      n_bypass = 0, n_idle = 0;
  int x_re [NSYM][8][256], x_im [NSYM][8][256];
  int got_re [NSYM][8][256], got_im [NSYM][8][256], hits [NSYM][8][256];
  int sym_h [2], last_sof [2], sof_gap_bad [2], sof_gaps [2];
  int cyc = 0, symlen = 256;

  always @(posedge clk) cyc++;

  // output capture; a half's outputs change on its domain clock enable
  always @(posedge clk) if (rst_n) begin
    for (int h = 0; h < 2; h++)
      if ((h == 0 ? dut.ce1 : dut.ce2) && out_vld[h]) begin
        int s;
        if (out_sof[h]) begin
          sym_h[h]++;
          if (last_sof[h] >= 0) begin
            sof_gaps[h]++;
            if (cyc - last_sof[h] != symlen) sof_gap_bad[h]++;
          end
          last_sof[h] = cyc;
        end
        s = sym_h[h];
        if (s >= 0 && s < NSYM)
          for (int l = 4 * h; l < 4 * h + 4; l++) begin
            got_re[s][out_stream[h]][out_bin[l]] = int'(fft_out[l].re);
            got_im[s][out_stream[h]][out_bin[l]] = int'(fft_out[l].im);
            hits[s][out_stream[h]][out_bin[l]]++;
          end
      end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic packet(input mode_e m, input int e1);
    int nstr, split, d1, d2;
    real yr [256], yi [256];
    int xr [256], xi [256];
    mode_cfg_t c;
    c = mode_cfg(m);   // used only for the counters below; expectations are explicit
    nstr = (m == MODE_HS) ? 1 : int'(m);
    symlen = (m == MODE_HS) ? 32 : 256;
    for (int s = 0; s < NSYM; s++)
      for (int st = 0; st < 8; st++)
        for (int n = 0; n < 256; n++) begin
          x_re[s][st][n] = int'($urandom_range(0, 255)) - 128;
          x_im[s][st][n] = int'($urandom_range(0, 255)) - 128;
          hits[s][st][n] = 0;
        end
    for (int h = 0; h < 2; h++) begin sym_h[h] = -1; last_sof[h] = -1; sof_gap_bad[h] = 0; sof_gaps[h] = 0; end
    env1 = 12'(e1);
    @(posedge clk); #0.1;
    op_mode = m; packet_en = 1;
    // packet preamble: the symbols start once both supplies are scaled
    fork
      wait (scaled1 && scaled2);
      repeat (5000) @(posedge clk);
    join_any
    disable fork;
    check(scaled1 && scaled2, $sformatf("mode %0d: voltage scaling done in the preamble", int'(m)));
    @(posedge clk); #0.1;
    for (int t = 0; t < NSYM * 256; t++) begin
      int s, n;
      s = t / symlen; n = t % symlen;
      if (m == MODE_HS) s = t / 32;
      if (m == MODE_HS && s >= NSYM) break;
      symbol_en = (n == 0);
      for (int k = 0; k < 8; k++) begin
        if (m == MODE_HS) begin
          fft_in[k].re = IW'(x_re[s][0][8 * n + k]);
          fft_in[k].im = IW'(x_im[s][0][8 * n + k]);
        end else begin
          fft_in[k].re = IW'(x_re[s][k][n]);
          fft_in[k].im = IW'(x_im[s][k][n]);
        end
      end
      @(posedge clk); #0.1;
      if (t == 0) begin
        // expected clock ratios (divide ratios of the mode table, log2)
        case (m)
          MODE_1S: begin d1 = 3; d2 = 3; end
          MODE_2S: begin d1 = 2; d2 = 2; end
          MODE_3S: begin d1 = 1; d2 = 2; end
          MODE_4S: begin d1 = 1; d2 = 1; end
          MODE_5S: begin d1 = 0; d2 = 2; end
          MODE_6S: begin d1 = 0; d2 = 1; end
          default: begin d1 = 0; d2 = 0; end
        endcase
        check(dut.div1 == 2'(d1) && dut.div2 == 2'(d2),
              $sformatf("mode %0d: clock ratios %0d/%0d, expected %0d/%0d", int'(m), dut.div1, dut.div2, d1, d2));
      end
    end
    symbol_en = 0;
    for (int k = 0; k < 8; k++) fft_in[k] = '0;
    if (vctrl1 != 0 || vctrl2 != 0) n_vscale++;
    if (vctrl1 < kmax1[d1] || vctrl2 < kmax2[d2]) n_backoff++;
    if (e1 == 0) check(vctrl1 == kmax1[d1] && vctrl2 == kmax2[d2],
                       $sformatf("mode %0d: supplies %0d/%0d, expected %0d/%0d", int'(m), vctrl1, vctrl2, kmax1[d1], kmax2[d2]));
    #0.1 packet_en = 0;
    repeat (4 * 256) @(posedge clk);
    #0.1;
    check(vctrl1 == 0 && vctrl2 == 0, "nominal supply between packets");
    // compare with the reference DFT
    for (int s = 0; s < NSYM; s++)
      for (int st = 0; st < nstr; st++) begin
        for (int n = 0; n < 256; n++) begin xr[n] = x_re[s][st][n]; xi[n] = x_im[s][st][n]; end
        dft256(xr, xi, 32.0, yr, yi);
        for (int k = 0; k < 256; k++) begin
          checks++;
          if (hits[s][st][k] != 1 || !near(real'(got_re[s][st][k]), yr[k], TOL) ||
              !near(real'(got_im[s][st][k]), yi[k], TOL)) begin
            failures++;
            if (failures < 10)
              $display("FAIL mode %0d sym %0d stream %0d bin %0d: got (%0d,%0d) hits %0d exp (%f,%f)",
                       int'(m), s, st, k, got_re[s][st][k], got_im[s][st][k], hits[s][st][k], yr[k], yi[k]);
          end
        end
      end
    for (int s = 0; s < NSYM; s++)
      for (int st = nstr; st < 8; st++) begin
        int any;
        any = 0;
        for (int k = 0; k < 256; k++) any += hits[s][st][k];
        check(any == 0, $sformatf("mode %0d: output for absent stream %0d", int'(m), st));
      end
    // symbol rate: one output symbol per symbol period in each active half
    for (int h = 0; h < 2; h++)
      if (h == 0 || m != MODE_1S)
        check(sof_gaps[h] >= 1 && sof_gap_bad[h] == 0,
              $sformatf("mode %0d half %0d: output symbol period wrong (%0d of %0d gaps)",
                        int'(m), h, sof_gap_bad[h], sof_gaps[h]));
    $display("packet mode %0d done, failures so far %0d", int'(m), failures);
    if (c.hs) n_bypass++;
    else if (c.split) n_group++;
    else n_merge++;
    if (m == MODE_7S) n_idle++;
  endtask

  initial begin
    mode_e prev;
    for (int k = 0; k < 8; k++) fft_in[k] = '0;
    repeat (3) @(posedge clk); #0.1 rst_n = 1;
    repeat (4) @(posedge clk);
    check(!ready, "not ready while calibrating");
    wait (ready);
    n_cal++;
    $display("calibrated at cycle %0d: K1 = %0d %0d %0d %0d, K2 = %0d %0d %0d %0d", cyc,
             kmax1[0], kmax1[1], kmax1[2], kmax1[3], kmax2[0], kmax2[1], kmax2[2], kmax2[3]);
    prev = MODE_1S;
    for (int m = 1; m <= 9; m++) begin
      if (mode_e'(m) != prev) n_switch++;
      packet(mode_e'(m), 0);
      prev = mode_e'(m);
    end
    packet(MODE_8S, 250);
    packet(MODE_1S, 0);
    n_switch += 2;
    $display("calibration %0d, voltage scaling %0d, backed-off search %0d, mode switches %0d",
             n_cal, n_vscale, n_backoff, n_switch);
    $display("path merge %0d, 4-path groups %0d, scheduler bypass %0d, idle slot %0d",
             n_merge, n_group, n_bypass, n_idle);
    check(n_cal > 0, "calibration happened");
    check(n_vscale > 0, "voltage scaling happened");
    check(n_backoff > 0, "voltage search backed off");
    check(n_switch > 0, "mode switch happened");
    check(n_merge > 0, "path merge used");
    check(n_group > 0, "4-path groups used");
    check(n_bypass > 0, "scheduler bypass used");
    check(n_idle > 0, "idle slot masked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
