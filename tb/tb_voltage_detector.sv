// tb_voltage_detector: checks the detector model's timing behaviour. For
// random supplies (625..1000 mV), clock ratios, delay settings and extra
// environmental delays, a one-cycle test pulse is sent. Each unit's DFF2 must
// show the pulse exactly two domain clocks after it was issued when replica
// plus selected delay fit in the clock period, and one clock later
// otherwise. The expected pass/fail of every unit is computed here from the
// delay law (gate delay proportional to V / (V - 0.26)^2, replica 2397 ps,
// 20 ps per unit, 8 ps unit-to-unit offset at 1.0 V).
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_voltage_detector;
  localparam int NUNIT = 4;
  logic clk = 0, rst_n = 0, ce = 1, test = 0;
  always #1 clk = ~clk;
  logic [1:0] div;
  logic [11:0] vdd;
  logic signed [11:0] env;
  logic [5:0] dsel;
  logic [NUNIT-1:0] detected;
  int checks = 0, failures = 0, npass = 0, nfail = 0;

  voltage_detector #(.NUNIT(NUNIT)) dut (.clk, .rst_n, .ce, .div, .vdd_mv(vdd), .env_ps(env),
                                         .test, .delay_sel(dsel), .detected);

  function automatic bit fits(input int u);
    real v, s, d;
    v = real'(vdd) / 1000.0;
    s = (v / ((v - 0.26) * (v - 0.26))) * (0.74 * 0.74);
    d = (2397.0 + 8.0 * u + 20.0 * dsel) * s + real'(env);
    return d <= 3333.0 * (1 << div);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    div = 0; vdd = 1000; env = 0; dsel = 0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [NUNIT-1:0] expf;
      div  = 2'($urandom_range(0, 3));
      vdd  = 12'(1000 - 25 * $urandom_range(0, 15));
      dsel = 6'($urandom_range(0, 59));
      env  = 12'($urandom_range(0, 400)) - 12'sd100;
      for (int u = 0; u < NUNIT; u++) expf[u] = fits(u);
      if (&expf) npass++; else nfail++;
      // test pulse for one domain clock (ce stretches the clock to 2**div fclk)
      test = 1;
      @(posedge clk); #0.1 test = 0;
      @(posedge clk); #0.1;
      check(detected == expf, $sformatf("on time: got %b expected %b (vdd %0d div %0d sel %0d env %0d)",
                                        detected, expf, vdd, div, dsel, env));
      @(posedge clk); #0.1;
      check(detected == ~expf, $sformatf("one clock late: got %b expected %b", detected, ~expf));
      repeat (2) @(posedge clk); #0.1;
      check(detected == '0, "pulse gone");
    end
    // a gated clock enable holds the flip-flops
    test = 1; ce = 0;
    repeat (3) @(posedge clk); #0.1;
    check(detected == '0, "no capture without clock enable");
    ce = 1; test = 0;
    check(npass > 20 && nfail > 20, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
