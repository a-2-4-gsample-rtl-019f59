// trivial_cmult: constant ("trivial") complex multiplier by W16^e, e = 0..7.
//
// The radix-2^4 decomposition leaves only these constants between butterfly
// steps inside a radix-16 stage: 1 and -j (W4), W8^1 and W8^3, and the W16
// powers. 1, -j and -1-free cases are exact (swap and negate); the others are
// multiplications by fixed TWW-bit constants (cos and sin of k*pi/8, taken
// from the generated twiddle table), which synthesis reduces to shift-and-add
// networks in the way canonical-signed-digit constant multipliers are built.
// Purely combinational. e is W16's exponent: e = 4 gives -j, e = 2 gives W8^1,
// e = 6 gives W8^3.
//
// Follows the published design: the set of constants and their place between
// the steps. This design's own choices: the 12-bit constants and rounding.
module trivial_cmult
  import fft_pkg::*;
(
  input  cplx_t      a,
  input  logic [2:0] e,
  output cplx_t      y
);

  localparam tw_table_t TW = w256_table();

  always_comb begin
    unique case (e)
      3'd0: y = a;
      3'd4: begin                     // -j
        y.re = a.im;
        y.im = -a.re;
      end
      default: y = cmul_tw(a, tw_t'(TW[{e, 4'b0000}]));
    endcase
  end

endmodule
