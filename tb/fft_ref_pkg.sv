// fft_ref_pkg: reference arithmetic for the testbenches (double precision).
//
// Plain textbook definitions (the DFT of the FFT and twiddle rotation);
// nothing here depends on the design under test.
package fft_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  // 256-point DFT of integer samples, scaled by 1/scale
  function automatic void dft256(input int xr [256], input int xi [256], input real scale,
                                 output real yr [256], output real yi [256]);
    real a;
    for (int k = 0; k < 256; k++) begin
      yr[k] = 0.0;
      yi[k] = 0.0;
      for (int n = 0; n < 256; n++) begin
        a = -2.0 * PI * real'((n * k) % 256) / 256.0;
        yr[k] += real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        yi[k] += real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      yr[k] = yr[k] / scale;
      yi[k] = yi[k] / scale;
    end
  endfunction

  // (ar + j ai) * W_N^e
  function automatic void rot(input real ar, input real ai, input int n, input int e,
                              output real yr, output real yi);
    real a;
    a = -2.0 * PI * real'(e % n) / real'(n);
    yr = ar * $cos(a) - ai * $sin(a);
    yi = ar * $sin(a) + ai * $cos(a);
  endfunction

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction
endpackage
