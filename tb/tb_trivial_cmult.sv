// tb_trivial_cmult: every W16 exponent with random data against exact
// complex rotation; 1 and -j must be exact, the rest within one LSB.
//
// The expected values follow the published behaviour (DFT, radix-2^4 index
// maps, mode table, calibration and search rules); stimulus, tolerances and
// the behavioural models used here are this testbench's own choices.
module tb_trivial_cmult;
  import fft_pkg::*;
  import fft_ref_pkg::*;
  cplx_t a, y;
  logic [2:0] e;
  int checks = 0, failures = 0;
  trivial_cmult dut (.a, .e, .y);
  initial begin
    for (int i = 0; i < 400; i++) begin
      real rr, ri;
      a.re = DW'(int'($urandom_range(0, 60000)) - 30000);
      a.im = DW'(int'($urandom_range(0, 60000)) - 30000);
      e = 3'(i % 8);
      #1;
      rot(real'(a.re), real'(a.im), 16, int'(e), rr, ri);
      checks++;
      if (!near(real'(y.re), rr, (e == 0 || e == 4) ? 0.01 : 20.0) ||
          !near(real'(y.im), ri, (e == 0 || e == 4) ? 0.01 : 20.0)) begin
        failures++;
        if (failures < 5) $display("FAIL e=%0d a=(%0d,%0d) y=(%0d,%0d) exp (%f,%f)", e, a.re, a.im, y.re, y.im, rr, ri);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
