// tb_clock_gen: for every divide ratio of both domains, counts the enable
// pulses and divided-clock rising edges over 64 fclk cycles (expect 64/2**div)
// and checks that clk_reset restarts the divider at count 0.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
`timescale 1ns/1ps
module tb_clock_gen;
  logic clk = 0, rst_n = 0, clk_reset = 0;
  always #1 clk = ~clk;
  logic [1:0] div1, div2;
  logic [2:0] cnt;
  logic clk_d1, clk_d2, ce_d1, ce_d2;
  int checks = 0, failures = 0;
  clock_gen dut (.clk, .rst_n, .clk_reset, .div1, .div2, .cnt, .clk_d1, .clk_d2, .ce_d1, .ce_d2);
  int n1, n2, r1, r2;
  logic p1, p2;
  always @(posedge clk_d1) r1++;
  always @(posedge clk_d2) r2++;
  initial begin
    div1 = 0; div2 = 3;
    repeat (2) @(posedge clk); #0.1 rst_n = 1;
    for (int d = 0; d < 4; d++) begin
      div1 = 2'(d); div2 = 2'(3 - d);
      clk_reset = 1; @(posedge clk); #0.1 clk_reset = 0;
      checks++; if (cnt != 0) failures++;
      n1 = 0; n2 = 0; r1 = 0; r2 = 0;
      repeat (64) begin
        if (ce_d1) n1++;
        if (ce_d2) n2++;
        @(posedge clk); #0.1;
      end
      checks += 2;
      if (n1 != 64 >> d)       begin failures++; $display("FAIL ce1 div %0d: %0d", d, n1); end
      if (n2 != 64 >> (3 - d)) begin failures++; $display("FAIL ce2 div %0d: %0d", 3 - d, n2); end
      checks += 2;
      if (d > 0 && (r1 < (64 >> d) - 1 || r1 > (64 >> d) + 1)) begin failures++; $display("FAIL clk_d1 edges %0d", r1); end
      if (3 - d > 0 && (r2 < (64 >> (3 - d)) - 1 || r2 > (64 >> (3 - d)) + 1)) begin failures++; $display("FAIL clk_d2 edges %0d", r2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
