// tb_input_scheduler: drives every mode with lanes whose samples encode
// (stream, sample index) and checks, at each core-domain clock enable, that
// each path carries the stream and sample given by the scheduling rule:
//   8-path modes: slot c -> stream c mod p, sample 8*(c div p) + path
//   group modes : slot c -> stream base + c mod q, sample 4*(c div q) + lane
//   high-speed  : path k carries sample 8*c + k.
// It also checks that the symbol marker opens slot 0 and that each group
// receives the expected number of slots per 8 fclk cycles.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_input_scheduler;
  import fft_pkg::*;
  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;
  mode_cfg_t cfg;
  logic [2:0] cnt;
  cin_t in [8];
  logic in_vld, in_sof;
  cplx_t out [8];
  logic out_vld [2], out_sof [2];
  int checks = 0, failures = 0;
  input_scheduler dut (.clk, .rst_n, .cfg, .cnt, .in, .in_vld, .in_sof, .out, .out_vld, .out_sof);

  function automatic logic lastc(input logic [1:0] d, input logic [2:0] q);
    return (q & 3'((1 << d) - 1)) == 3'((1 << d) - 1);
  endfunction

  int c [2];
  logic started [2];
  mode_e cur;

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < 2; g++) begin
      logic [1:0] d;
      d = (g == 0) ? cfg.div1 : cfg.div2;
      if (lastc(d, cnt) && !(cfg.split == 0 && g == 1)) begin
        if (out_sof[g]) begin started[g] = 1; c[g] = 0; end
        if (started[g]) begin
          for (int k = (cfg.split ? 4*g : 0); k < (cfg.split ? 4*g + 4 : 8); k++) begin
            int es, ei, sl;
            if (cfg.hs) begin es = k; ei = 8 * c[g] + k; end
            else if (!cfg.split) begin
              sl = c[g] % int'(cfg.slots1);
              es = sl; ei = 8 * (c[g] / int'(cfg.slots1)) + k;
              if (sl >= int'(cfg.nstr1)) continue;
            end else if (g == 0) begin
              es = c[g] % int'(cfg.slots1); ei = 4 * (c[g] / int'(cfg.slots1)) + k;
            end else begin
              es = int'(cfg.nstr1) + c[g] % int'(cfg.slots2); ei = 4 * (c[g] / int'(cfg.slots2)) + k - 4;
            end
            if (ei < 128) begin
              checks++;
              if (int'(out[k].re) != (cfg.hs ? 0 : es) || int'(out[k].im) != ei) begin
                failures++;
                if (failures < 8) $display("FAIL mode %0d g%0d c=%0d path %0d: got (%0d,%0d) exp (%0d,%0d)",
                                           int'(cur), g, c[g], k, out[k].re, out[k].im, cfg.hs ? 0 : es, ei);
              end
            end
          end
          c[g]++;
        end
      end
    end
  end

  initial begin
    for (int m = 1; m <= 9; m++) begin
      cur = mode_e'(m);
      cfg = mode_cfg(cur);
      rst_n = 0; cnt = 0; in_vld = 0; in_sof = 0;
      started[0] = 0; started[1] = 0; c[0] = 0; c[1] = 0;
      for (int k = 0; k < 8; k++) in[k] = '0;
      repeat (2) @(posedge clk); #0.1 rst_n = 1;
      for (int t = 0; t < 160; t++) begin
        for (int k = 0; k < 8; k++) begin
          in[k].re = cfg.hs ? 8'd0 : 8'(k);
          in[k].im = cfg.hs ? 8'((8 * t + k) % 128) : 8'(t % 128);
        end
        in_vld = 1; in_sof = (t == 0);
        cnt = 3'(t);
        @(posedge clk); #0.1;
      end
      // 128 samples per stream have been checked on every path
      checks++;
      if (!started[0]) begin failures++; $display("FAIL mode %0d: no symbol marker", m); end
      checks++;
      if (cfg.split && c[1] != 38 * int'(cfg.slots2)) begin
        failures++; $display("FAIL mode %0d: group 2 slots %0d", m, c[1]);
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
