// tb_olvds_ctrl: runs the open-loop voltage detection and scaling controller
// against the voltage detector model and an ideal supply that follows the
// requested code at once (1000 mV - 25 mV per step).
//
// Calibration: the margins N(V) and the lowest passing code K of every clock
// ratio are worked out here from the same delay law, by a direct search over
// all supply codes and delay settings, and compared with the controller's
// tables. Detection: for every clock ratio, packets are started with no extra
// delay and with an added environmental delay; the supply reached, the
// number of test pulses used, the nominal supply between packets and the
// "scaled" flag are checked against a reference run of the search (start at
// J = K - 3 and test i = K, K-1, ... with N(V_J) - N(V_i) added units,
// 16 passing tests per accepted candidate, 5 domain clocks per test).
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_olvds_ctrl;
  localparam int NUNIT = 4, NMAX = 59, VSTEPS = 15, NTEST = 16, SAFE = 3;
  localparam real TCLK = 3333.0, REPL = 2397.0, UNIT = 20.0, VTH = 0.26;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic pkt_start = 0, pkt_active = 0;
  logic [1:0] pkt_div = 0, div, cal_div;
  logic [NUNIT-1:0] detected;
  logic test, calibrating, scaled;
  logic [5:0] delay_sel;
  logic [3:0] vcode, kmax [4];
  logic [11:0] vdd;
  logic signed [11:0] env = 0;
  logic [2:0] cnt = 0;
  logic ce;
  int checks = 0, failures = 0, pulses = 0, retries = 0;

  assign div = calibrating ? cal_div : pkt_div;
  assign ce  = (cnt & 3'((1 << div) - 1)) == 3'((1 << div) - 1);
  assign vdd = 12'(1000 - 25 * vcode);
  always @(posedge clk) cnt <= cnt + 3'd1;
  always @(posedge clk) if (ce && test) pulses++;

  olvds_ctrl #(.SETTLE(8)) dut (.clk, .rst_n, .ce, .pkt_start, .pkt_active, .pkt_div, .detected,
                                .test, .delay_sel, .vcode, .calibrating, .cal_div, .scaled,
                                .kmax_out(kmax));
  voltage_detector #(.NUNIT(NUNIT)) det (.clk, .rst_n, .ce, .div, .vdd_mv(vdd), .env_ps(env),
                                         .test, .delay_sel, .detected);

  function automatic real scale(input real v);
    return (v / ((v - VTH) * (v - VTH))) * ((1.0 - VTH) * (1.0 - VTH));
  endfunction
  function automatic bit all_fit(input int f, input int code, input int n, input int e);
    for (int u = 0; u < NUNIT; u++)
      if ((REPL + 8.0 * u + UNIT * n) * scale((1000.0 - 25.0 * code) / 1000.0) + e > TCLK * (1 << f))
        return 0;
    return 1;
  endfunction

  int nref [4][16], kref [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic packet(input int f, input int e);
    int j, i, exp_code, exp_pulses;
    env = 12'(e);
    // reference search
    j = (kref[f] > SAFE) ? kref[f] - SAFE : 0;
    i = kref[f];
    exp_pulses = 0;
    while (i > j && !all_fit(f, j, nref[f][j] - nref[f][i], e)) begin
      i--; exp_pulses++;
    end
    if (i > j) exp_pulses += NTEST;
    exp_code = i;
    if (exp_code < kref[f]) retries++;
    @(posedge clk); #0.1;
    pkt_div = 2'(f); pkt_start = 1; pkt_active = 1; pulses = 0;
    @(posedge clk); #0.1; pkt_start = 0;
    check(vcode == 4'(j), $sformatf("f %0d: safe code %0d, expected %0d", f, vcode, j));
    fork
      wait (scaled);
      begin repeat (20000) @(posedge clk); end
    join_any
    disable fork;
    check(scaled, $sformatf("f %0d env %0d: scaling did not finish", f, e));
    check(vcode == 4'(exp_code), $sformatf("f %0d env %0d: vcode %0d, expected %0d", f, e, vcode, exp_code));
    check(pulses == exp_pulses, $sformatf("f %0d env %0d: %0d test pulses, expected %0d", f, e, pulses, exp_pulses));
    repeat (50) @(posedge clk);
    check(vcode == 4'(exp_code), "supply kept during the packet");
    #0.1 pkt_active = 0;
    repeat (3) @(posedge clk); #0.1;
    check(vcode == 0 && !scaled, "nominal supply between packets");
  endtask

  initial begin
    // reference calibration
    for (int f = 0; f < 4; f++) begin
      kref[f] = 0;
      for (int v = 0; v <= VSTEPS; v++) begin
        nref[f][v] = -1;
        for (int n = NMAX; n >= 0; n--) if (nref[f][v] < 0 && all_fit(f, v, n, 0)) nref[f][v] = n;
      end
      for (int v = 0; v <= VSTEPS && nref[f][v] >= 0; v++) kref[f] = v;
    end
    repeat (3) @(posedge clk); #0.1 rst_n = 1;
    wait (!calibrating);
    for (int f = 0; f < 4; f++) begin
      check(kmax[f] == 4'(kref[f]), $sformatf("K(f=%0d) = %0d, expected %0d", f, kmax[f], kref[f]));
      for (int v = 0; v <= kref[f]; v++)
        check(dut.ntab[f][v] == 6'(nref[f][v]),
              $sformatf("N(f=%0d,v=%0d) = %0d, expected %0d", f, v, dut.ntab[f][v], nref[f][v]));
    end
    for (int f = 0; f < 4; f++) begin
      packet(f, 0);
      packet(f, 60);
      packet(f, 250);
    end
    check(retries > 0, "a detection retry happened");
    $display("calibrated K = %0d %0d %0d %0d, retries %0d", kref[0], kref[1], kref[2], kref[3], retries);
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
