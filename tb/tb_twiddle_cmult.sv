// tb_twiddle_cmult: random data and every W256 exponent against exact
// rotation (twiddles are 10-bit fraction, so the error bound is about
// |a| * 2^-10); checks the one-clock latency and the marker pipeline.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_twiddle_cmult;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce, in_vld, in_sof, out_vld, out_sof;
  always #1 clk = ~clk;
  cplx_t in, out;
  logic [7:0] e;
  int checks = 0, failures = 0;
  twiddle_cmult dut (.clk, .rst_n, .ce, .in, .e, .in_vld, .in_sof, .out, .out_vld, .out_sof);
  initial begin
    ce = 1; in = '0; e = 0; in_vld = 0; in_sof = 0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int i = 0; i < 512; i++) begin
      real rr, ri;
      in.re = DW'(int'($urandom_range(0, 40000)) - 20000);
      in.im = DW'(int'($urandom_range(0, 40000)) - 20000);
      e = 8'(i); in_vld = 1; in_sof = (i % 7 == 0);
      @(posedge clk); #0.1;
      rot(real'(in.re), real'(in.im), 256, int'(e), rr, ri);
      checks++;
      if (!near(real'(out.re), rr, 40.0) || !near(real'(out.im), ri, 40.0) ||
          out_vld != 1'b1 || out_sof != (i % 7 == 0)) begin
        failures++;
        if (failures < 5) $display("FAIL e=%0d out=(%0d,%0d) exp (%f,%f)", e, out.re, out.im, rr, ri);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
