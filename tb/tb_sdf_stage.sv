// tb_sdf_stage: checks the delay-feedback butterfly stage for every FIFO
// length it supports. A random stream with symbol markers is applied with a
// random clock enable; the outputs are compared with a software model of the
// radix-2 DIF stage: for each block of 2L samples, out[i] = x[i] + x[i+L] for
// i < L, then out[L+i] = x[i] - x[i+L], delivered L+1 enabled clocks after
// the input. Markers must keep that latency.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_sdf_stage;
  import fft_pkg::*;
  localparam int MAXLEN = 16;
  logic clk = 1'b0, rst_n = 1'b0, ce;
  always #1 clk = ~clk;
  logic [4:0] len_lg;
  cplx_t in, out;
  logic in_vld, in_sof, out_vld, out_sof;
  int checks = 0, failures = 0;

  sdf_stage #(.MAXLEN(MAXLEN), .LGW(5)) dut (.clk, .rst_n, .ce, .len_lg, .in, .in_vld, .in_sof,
                                              .out, .out_vld, .out_sof);

  int xr [512], xi [512], er [512], ei [512];

  task automatic run(input int lg, input int nblk);
    int L, n, oi;
    L = 1 << lg;
    n = 2 * L * nblk;
    for (int i = 0; i < n; i++) begin
      xr[i] = int'($urandom_range(0, 2000)) - 1000;
      xi[i] = int'($urandom_range(0, 2000)) - 1000;
    end
    for (int b = 0; b < nblk; b++)
      for (int i = 0; i < L; i++) begin
        er[2*L*b + i]     = xr[2*L*b + i] + xr[2*L*b + i + L];
        ei[2*L*b + i]     = xi[2*L*b + i] + xi[2*L*b + i + L];
        er[2*L*b + L + i] = xr[2*L*b + i] - xr[2*L*b + i + L];
        ei[2*L*b + L + i] = xi[2*L*b + i] - xi[2*L*b + i + L];
      end
    rst_n = 0; ce = 0; in = '0; in_vld = 0; in_sof = 0; len_lg = 5'(lg);
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    oi = 0;
    for (int i = 0; oi < n && i < 4 * n + 100; ) begin
      ce = ($urandom_range(0, 3) != 0);
      if (ce) begin
        in_vld = (i < n); in_sof = (i % n == 0) && (i < n);
        in.re = (i < n) ? DW'(xr[i]) : '0; in.im = (i < n) ? DW'(xi[i]) : '0;
      end
      @(posedge clk); #0.1;
      if (ce) i++;
      // outputs are checked when they change, i.e. after an enabled edge
      if (ce && out_vld) begin
        checks++;
        if (int'(out.re) != er[oi] || int'(out.im) != ei[oi] || out_sof != (oi == 0) || (i - 1 - oi) != L) begin
          failures++;
          if (failures < 5) $display("FAIL lg %0d out %0d: got %0d,%0d exp %0d,%0d sof %0d lat %0d",
                                     lg, oi, out.re, out.im, er[oi], ei[oi], out_sof, i - 1 - oi);
        end
        oi++;
      end
    end
    checks++;
    if (oi != n) begin failures++; $display("FAIL lg %0d: %0d of %0d outputs", lg, oi, n); end
  endtask

  initial begin
    for (int lg = 0; lg <= 4; lg++) run(lg, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
