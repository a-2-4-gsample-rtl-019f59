// tb_fft_module34: checks Modules 3 and 4 (the last three radix-2 steps and
// the path merge) with random data, random clock enables and every kind of
// configuration: 8-path modes with 1 and 4 interleaved streams (merge of the
// two cores), and group modes with 2+1 and 4+2 streams (each module on its
// own, with its own enable). For output lane 2*l3 + l4 of half h the
// expected value is computed from the definition
//   sum over g2,g3,g4 of v(g2; 2*g3 + g4) * W2^(g2*l2) * W8^(g3*(l1 + 2*l2))
//        * W2^(g3*l3) * W16^(g4*(l1 + 2*l2 + 4*l3)) * W2^(g4*l4)
// divided by 32, rounded and saturated to 11 bits; g2 is the core (8-path)
// or a time bit (groups). The output bin index, the stream slot and the
// count of outputs per symbol are checked too; one symbol is driven with
// large values to hit the saturation.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_fft_module34;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  logic ce1, ce2, split;
  logic [1:0] s1_lg, s2_lg;
  cplx_t in [2][4];
  logic in_vld [2], in_sof [2];
  cout_t out [8];
  logic [7:0] out_bin [8];
  logic out_vld [2], out_sof [2];
  logic [2:0] out_slot [2];
  int checks = 0, failures = 0, nsat = 0;

  fft_module34 dut (.clk, .rst_n, .ce1, .ce2, .split, .slots1_lg(s1_lg), .slots2_lg(s2_lg),
                    .in1(in[0]), .in1_vld(in_vld[0]), .in1_sof(in_sof[0]),
                    .in2(in[1]), .in2_vld(in_vld[1]), .in2_sof(in_sof[1]),
                    .out, .out_bin, .out_vld, .out_sof, .out_slot);

  int vr [2][512][4], vi [2][512][4];
  int oc [2], len [2];
  logic go [2];

  function automatic int brev4(input int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction
  function automatic int rsat(input real x);
    int r;
    r = $floor(x / 32.0 + 0.5);
    if (r > 1023) begin nsat++; return 1023; end
    if (r < -1024) begin nsat++; return -1024; end
    return r;
  endfunction

  task automatic expect_lane(input int h, input int o, input int c, output int er, output int ei,
                             output int ebin, output int eslot, output real tol);
    int q, s, m, l1, l2, l3, l4, k1;
    real ar, ai, tr, ti, ur, ui;
    q = 1 << (h == 1 && split ? s2_lg : s1_lg);
    s = c % q; m = c / q;
    l3 = o >> 1; l4 = o & 1;
    if (split) begin l2 = m & 1; l1 = (m >> 1) & 1; k1 = brev4((m >> 2) & 15); end
    else       begin l2 = h;     l1 = m & 1;        k1 = brev4((m >> 1) & 15); end
    ar = 0; ai = 0;
    for (int g2 = 0; g2 < 2; g2++)
      for (int g3 = 0; g3 < 2; g3++)
        for (int g4 = 0; g4 < 2; g4++) begin
          int src, pos;
          src = split ? h : g2;
          pos = split ? (((m & ~1) | g2) * q + s) : c;
          tr = real'(vr[src][pos][2 * g3 + g4]); ti = real'(vi[src][pos][2 * g3 + g4]);
          rot(tr, ti, 2, g2 * l2, ur, ui);
          rot(ur, ui, 8, g3 * (l1 + 2 * l2), tr, ti);
          rot(tr, ti, 2, g3 * l3, ur, ui);
          rot(ur, ui, 16, g4 * (l1 + 2 * l2 + 4 * l3), tr, ti);
          rot(tr, ti, 2, g4 * l4, ur, ui);
          ar += ur; ai += ui;
        end
    er = rsat(ar); ei = rsat(ai);
    tol = 1.01 + 0.003 * ((ar < 0 ? -ar : ar) + (ai < 0 ? -ai : ai)) / 32.0;
    ebin = k1 | (l1 << 4) | (l2 << 5) | (l3 << 6) | (l4 << 7);
    eslot = s;
  endtask

  always @(posedge clk) if (rst_n)
    for (int h = 0; h < 2; h++)
      if ((h == 0 ? ce1 : ce2) && out_vld[h]) begin
        if (out_sof[h]) begin go[h] = 1; oc[h] = 0; end
        if (go[h] && oc[h] < len[h]) begin
          for (int o = 0; o < 4; o++) begin
            int er, ei, eb, es;
            real tol;
            expect_lane(h, o, oc[h], er, ei, eb, es, tol);
            checks++;
            if (!near(real'(out[4*h+o].re), real'(er), tol) || !near(real'(out[4*h+o].im), real'(ei), tol)
                || out_bin[4*h+o] != 8'(eb) || out_slot[h] != 3'(es)) begin
              failures++;
              if (failures < 8) $display("FAIL split %0d half %0d lane %0d pos %0d: (%0d,%0d) bin %0d slot %0d, expected (%0d,%0d) bin %0d slot %0d",
                split, h, o, oc[h], out[4*h+o].re, out[4*h+o].im, out_bin[4*h+o], out_slot[h], er, ei, eb, es);
            end
          end
          oc[h]++;
        end
      end

  task automatic run(input logic sp, input int lg1, input int lg2, input int amp);
    int c [2];
    split = sp; s1_lg = 2'(lg1); s2_lg = 2'(lg2);
    len[0] = (sp ? 64 : 32) << lg1;
    len[1] = sp ? 64 << lg2 : len[0];
    for (int h = 0; h < 2; h++)
      for (int p = 0; p < 512; p++)
        for (int l = 0; l < 4; l++) begin
          vr[h][p][l] = int'($urandom_range(0, 2 * amp)) - amp;
          vi[h][p][l] = int'($urandom_range(0, 2 * amp)) - amp;
        end
    rst_n = 0; ce1 = 0; ce2 = 0;
    for (int h = 0; h < 2; h++) begin
      go[h] = 0; oc[h] = 0; c[h] = 0; in_vld[h] = 0; in_sof[h] = 0;
      for (int l = 0; l < 4; l++) in[h][l] = '0;
    end
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    while (c[0] < 2 * len[0] || c[1] < 2 * len[1]) begin
      ce1 = ($urandom_range(0, 2) != 0);
      ce2 = sp ? ($urandom_range(0, 3) == 0) : ce1;
      for (int h = 0; h < 2; h++) begin
        in_vld[h] = c[h] < len[h];
        in_sof[h] = c[h] == 0;
        for (int l = 0; l < 4; l++) begin
          in[h][l].re = (c[h] < len[h]) ? DW'(vr[h][c[h]][l]) : '0;
          in[h][l].im = (c[h] < len[h]) ? DW'(vi[h][c[h]][l]) : '0;
        end
      end
      @(posedge clk); #0.1;
      if (ce1) c[0]++;
      if (ce2) c[1]++;
    end
    for (int h = 0; h < 2; h++) begin
      checks++;
      if (oc[h] != len[h]) begin failures++; $display("FAIL: half %0d gave %0d of %0d outputs", h, oc[h], len[h]); end
    end
  endtask

  initial begin
    run(0, 0, 0, 3000);
    run(0, 2, 0, 3000);
    run(0, 3, 0, 3000);
    run(1, 1, 0, 3000);
    run(1, 2, 1, 3000);
    run(0, 0, 0, 10000);   // sums stay inside the 18-bit internal range
    checks++;
    if (nsat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
