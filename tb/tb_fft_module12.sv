// tb_fft_module12: checks Module 1 (PBASE 0) and Module 2 (PBASE 4) on their
// own, in 8-path modes with 1 and 8 interleaved streams and in the 4-path
// group modes with 2 and 4 streams, with a random clock enable. Each output
// is compared with the partial transform the module must produce, computed in
// double precision from the definition:
//   Y = W4^(g2*l1) * sum_g1 W2^(g1*l1) * W256^(n2*k1) * sum_n1 x(16 n1 + n2) W16^(n1*k1)
// with n2 = 8*g1 + path (8-path) or 8*g1 + 4*g2 + lane (groups), and k1, l1
// (and g2 in group modes) read from the output position in bit-reversed order.
// The number of outputs per symbol is checked as well.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_fft_module12;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  always #1 clk = ~clk;
  logic split;
  logic [1:0] slots_lg;
  cplx_t in [2][4], out [2][4];
  logic in_vld, in_sof, out_vld [2], out_sof [2];
  int checks = 0, failures = 0;

  fft_module12 #(.PBASE(0)) u1 (.clk, .rst_n, .ce, .split, .slots_lg, .in(in[0]), .in_vld, .in_sof,
                                .out(out[0]), .out_vld(out_vld[0]), .out_sof(out_sof[0]));
  fft_module12 #(.PBASE(4)) u2 (.clk, .rst_n, .ce, .split, .slots_lg, .in(in[1]), .in_vld, .in_sof,
                                .out(out[1]), .out_vld(out_vld[1]), .out_sof(out_sof[1]));

  int xr [8][256], xi [8][256];
  int oc [2];
  logic go [2];

  function automatic int brev4(input int v);
    return ((v & 1) << 3) | ((v & 2) << 1) | ((v & 4) >> 1) | ((v & 8) >> 3);
  endfunction

  // expected output of module u, lane l, at output position c
  task automatic expect_val(input int u, input int l, input int c, output real er, output real ei);
    int q, s, m, k1, l1, g2, p, st;
    real ar, ai, br, bi, tr, ti;
    q = 1 << slots_lg; s = c % q; m = c / q;
    if (!split) begin k1 = brev4((m >> 1) & 15); l1 = m & 1; g2 = u; p = 4 * u + l; end
    else        begin k1 = brev4((m >> 2) & 15); l1 = (m >> 1) & 1; g2 = m & 1; p = l; end
    st = split ? s + 4 * u : s;       // group 2 carries its own streams
    er = 0; ei = 0;
    for (int g1 = 0; g1 < 2; g1++) begin
      int n2;
      n2 = split ? 8 * g1 + 4 * g2 + p : 8 * g1 + p;
      ar = 0; ai = 0;
      for (int n1 = 0; n1 < 16; n1++) begin
        rot(real'(xr[st][16 * n1 + n2]), real'(xi[st][16 * n1 + n2]), 16, n1 * k1, tr, ti);
        ar += tr; ai += ti;
      end
      rot(ar, ai, 256, n2 * k1, br, bi);
      rot(br, bi, 2, g1 * l1, tr, ti);
      er += tr; ei += ti;
    end
    rot(er, ei, 4, g2 * l1, tr, ti);
    er = tr; ei = ti;
  endtask

  always @(posedge clk) if (rst_n && ce) begin
    for (int u = 0; u < 2; u++) if (out_vld[u]) begin
      if (out_sof[u]) begin go[u] = 1; oc[u] = 0; end
      if (go[u] && oc[u] < (split ? 64 : 32) << slots_lg) begin
        for (int l = 0; l < 4; l++) begin
          real er, ei, tol;
          expect_val(u, l, oc[u], er, ei);
          tol = 6.0 + 0.004 * ((er < 0 ? -er : er) + (ei < 0 ? -ei : ei));
          checks++;
          if (!near(real'(out[u][l].re), er, tol) || !near(real'(out[u][l].im), ei, tol)) begin
            failures++;
            if (failures < 6) $display("FAIL split %0d slots %0d mod %0d lane %0d pos %0d: got (%0d,%0d) exp (%f,%f)",
                                       split, slots_lg, u, l, oc[u], out[u][l].re, out[u][l].im, er, ei);
          end
        end
        oc[u]++;
      end
    end
  end

  task automatic run(input logic sp, input int slg);
    int q, len, c;
    split = sp; slots_lg = 2'(slg); q = 1 << slg;
    len = (sp ? 64 : 32) * q;          // core clocks per symbol
    for (int s = 0; s < 8; s++)
      for (int n = 0; n < 256; n++) begin
        xr[s][n] = int'($urandom_range(0, 200)) - 100;
        xi[s][n] = int'($urandom_range(0, 200)) - 100;
      end
    rst_n = 0; ce = 0; in_vld = 0; in_sof = 0; go[0] = 0; go[1] = 0; oc[0] = 0; oc[1] = 0;
    for (int u = 0; u < 2; u++) for (int l = 0; l < 4; l++) in[u][l] = '0;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    c = 0;
    while (c < 3 * len) begin
      ce = ($urandom_range(0, 2) != 0);
      if (ce) begin
        int s, m;
        s = (c % len) % q; m = (c % len) / q;
        in_vld = (c < len); in_sof = (c == 0);
        for (int u = 0; u < 2; u++)
          for (int l = 0; l < 4; l++) begin
            int n;
            n = sp ? 4 * m + l : 8 * m + 4 * u + l;
            // module 2 in group mode carries its own streams 4..7
            in[u][l].re = (c < len) ? DW'(xr[sp ? s + 4 * u : s][n]) : '0;
            in[u][l].im = (c < len) ? DW'(xi[sp ? s + 4 * u : s][n]) : '0;
          end
      end
      @(posedge clk); #0.1;
      if (ce) c++;
    end
    for (int u = 0; u < 2; u++) begin
      checks++;
      if (oc[u] != len) begin failures++; $display("FAIL: module %0d gave %0d of %0d outputs", u, oc[u], len); end
    end
  endtask

  initial begin
    run(0, 0);
    run(0, 3);
    run(1, 1);
    run(1, 2);
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
