// tb_fft_engine: end-to-end check of the FFT processing engine in all nine
// operation modes. For every mode it feeds two back-to-back symbols of random
// 8-bit complex samples per stream (the idle 8th slot of the 7-stream mode
// gets noise that must not appear at the output), lets the pipeline drain,
// and compares every output bin of every stream with a double-precision DFT
// divided by 2**5 (the output scaling), within a small tolerance. It also
// checks that each (symbol, stream, bin) is delivered exactly once and that
// the group clocks follow the per-mode divide ratios.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_fft_engine;
  import fft_pkg::*;

  localparam int NSYM = 2;
  localparam real TOL = 3.0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  mode_cfg_t  cfg;
  logic [2:0] cnt;
  logic       ce1, ce2;
  cin_t       in [8];
  logic       in_vld, in_sof;
  cout_t      out [8];
  logic [7:0] out_bin [8];
  logic       out_vld [2], out_sof [2];
  logic [2:0] out_stream [2];

  fft_engine dut (.clk, .rst_n, .cfg, .cnt, .ce1, .ce2, .in, .in_vld, .in_sof,
                  .out, .out_bin, .out_vld, .out_sof, .out_stream);

  function automatic logic lastc(input logic [1:0] d, input logic [2:0] q);
    return (q & 3'((1 << d) - 1)) == 3'((1 << d) - 1);
  endfunction
  assign ce1 = lastc(cfg.div1, cnt);
  assign ce2 = lastc(cfg.div2, cnt);

  int checks = 0, failures = 0;
  int x_re [NSYM][8][256], x_im [NSYM][8][256];
  int got_re [NSYM][8][256], got_im [NSYM][8][256], hits [NSYM][8][256];
  int sym_h [2];
  int n_merge = 0, n_group = 0, n_bypass = 0;

  // output capture
  always @(posedge clk) if (rst_n) begin
    for (int h = 0; h < 2; h++) begin
      if ((h == 0 ? ce1 : ce2) && out_vld[h]) begin
        int s;
        if (out_sof[h]) sym_h[h] = sym_h[h] + 1;
        s = sym_h[h];
        if (s >= 0 && s < NSYM)
          for (int l = 4*h; l < 4*h + 4; l++) begin
            got_re[s][out_stream[h]][out_bin[l]] = int'(out[l].re);
            got_im[s][out_stream[h]][out_bin[l]] = int'(out[l].im);
            hits[s][out_stream[h]][out_bin[l]]++;
          end
      end
    end
  end

  task automatic run_mode(input mode_e m);
    int nstr, t, tmax, symlen;
    real er, ei, a;
    cfg = mode_cfg(m);
    nstr = (m == MODE_HS) ? 1 : int'(m);
    for (int s = 0; s < NSYM; s++)
      for (int st = 0; st < 8; st++)
        for (int n = 0; n < 256; n++) begin
          x_re[s][st][n] = int'($urandom_range(0, 200)) - 100;
          x_im[s][st][n] = int'($urandom_range(0, 200)) - 100;
          hits[s][st][n] = 0;
        end
    sym_h[0] = -1; sym_h[1] = -1;
    rst_n = 1'b0; cnt = 3'd0; in_vld = 1'b0; in_sof = 1'b0;
    for (int k = 0; k < 8; k++) in[k] = '0;
    repeat (3) @(posedge clk);
    #0.1 rst_n = 1'b1;
    symlen = (m == MODE_HS) ? 32 : 256;
    tmax = (NSYM + 3) * 256 + 64;
    for (t = 0; t < tmax; t++) begin
      int s, n;
      s = t / symlen; n = t % symlen;
      in_vld = (s < NSYM);
      in_sof = (s < NSYM) && (n == 0);
      for (int k = 0; k < 8; k++) begin
        if (s >= NSYM) in[k] = '0;
        else if (m == MODE_HS) begin
          in[k].re = IW'(x_re[s][0][8*n + k]);
          in[k].im = IW'(x_im[s][0][8*n + k]);
        end else begin
          in[k].re = IW'(x_re[s][k][n]);
          in[k].im = IW'(x_im[s][k][n]);
        end
      end
      cnt = 3'(t);
      @(posedge clk);
      #0.1;
    end
    // compare with the reference DFT
    for (int s = 0; s < NSYM; s++)
      for (int st = 0; st < nstr; st++)
        for (int k = 0; k < 256; k++) begin
          er = 0.0; ei = 0.0;
          for (int n = 0; n < 256; n++) begin
            a = -2.0 * 3.14159265358979 * real'((n * k) % 256) / 256.0;
            er += real'(x_re[s][st][n]) * $cos(a) - real'(x_im[s][st][n]) * $sin(a);
            ei += real'(x_re[s][st][n]) * $sin(a) + real'(x_im[s][st][n]) * $cos(a);
          end
          er = er / 32.0; ei = ei / 32.0;
          checks++;
          if (hits[s][st][k] != 1 ||
              (real'(got_re[s][st][k]) - er) > TOL || (er - real'(got_re[s][st][k])) > TOL ||
              (real'(got_im[s][st][k]) - ei) > TOL || (ei - real'(got_im[s][st][k])) > TOL) begin
            failures++;
            if (failures < 10)
              $display("FAIL mode %0d sym %0d stream %0d bin %0d: got (%0d,%0d) hits %0d exp (%f,%f)",
                       int'(m), s, st, k, got_re[s][st][k], got_im[s][st][k], hits[s][st][k], er, ei);
          end
        end
    // nothing may be delivered for streams that do not exist
    for (int s = 0; s < NSYM; s++)
      for (int st = nstr; st < 8; st++) begin
        checks++;
        for (int k = 0; k < 256; k++) if (hits[s][st][k] != 0) begin failures++; break; end
      end
    if (cfg.hs) n_bypass++;
    else if (cfg.split) n_group++;
    else n_merge++;
  endtask

  initial begin
    cfg = mode_cfg(MODE_1S);
    for (int m = 1; m <= 9; m++) run_mode(mode_e'(m));
    checks++; if (n_merge == 0)  begin failures++; $display("FAIL: path merge never used"); end
    checks++; if (n_group == 0)  begin failures++; $display("FAIL: group mode never used"); end
    checks++; if (n_bypass == 0) begin failures++; $display("FAIL: scheduler bypass never used"); end
    $display("modes: merge %0d group %0d bypass %0d", n_merge, n_group, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
