// sdf_stage: one radix-2 butterfly unit (BU) with its delay-feedback FIFO.
//
// This is the building block of every data path of the FFT cores. Samples
// arrive one per enabled clock (ce). The FIFO length L = 2**len_lg is set by
// the operation mode, so the same hardware serves every stream count: with
// p interleaved streams the two butterfly inputs x(n) and x(n + distance) are
// p*distance samples apart. The FIFO is a shift register of MAXLEN words whose
// output tap is chosen by len_lg, the behaviour of the tap/multiplexer chain
// printed for the first-stage FIFO of Module 1/2 (64, 32, 16, 16 words).
//
// Operation over each block of 2L samples (counted from in_sof):
//   first half : the input is pushed into the FIFO; the FIFO output (the
//                differences of the previous block) is sent on.
//   second half: out = fifo + in (sum), and fifo - in is pushed.
// The output is registered. Latency: L + 1 enabled clocks; out_sof/out_vld
// mark the first output sample and carry the input markers with that latency.
// Rounding/scaling: none, the word grows inside the DW-bit cplx_t.
//
// Follows the published design: a BU with a mode-sized feedback FIFO. This
// design's own choices: the shift-register FIFO with a selectable tap, the
// markers carried beside the data and the position counter.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int MAXLEN = 128,                // longest FIFO (words)
  parameter int LGW    = $clog2(MAXLEN) + 1, // width of len_lg
  localparam int PW    = $clog2(MAXLEN) + 1  // block position counter width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ce,       // domain clock enable
  input  logic [LGW-1:0] len_lg,   // log2 of FIFO length, <= log2(MAXLEN)
  input  cplx_t          in,
  input  logic           in_vld,
  input  logic           in_sof,   // first sample of a symbol
  output cplx_t          out,
  output logic           out_vld,
  output logic           out_sof
);

  cplx_t      fifo   [MAXLEN];
  logic [1:0] mark   [MAXLEN];     // {vld, sof} of the input, delayed by L
  logic [PW-1:0] pos_q;             // position of the previous input in its 2L block
  logic [PW-1:0] pos;
  logic       half;
  cplx_t      f_out, f_in, bu_out;
  logic [1:0] m_out;

  always_comb begin
    pos   = in_sof ? '0 : pos_q + 1'b1;
    half  = |(pos & PW'(1 << len_lg));
    f_out = fifo[(1 << len_lg) - 1];
    m_out = mark[(1 << len_lg) - 1];
    if (half) begin
      bu_out.re = f_out.re + in.re;
      bu_out.im = f_out.im + in.im;
      f_in.re   = f_out.re - in.re;
      f_in.im   = f_out.im - in.im;
    end else begin
      bu_out = f_out;
      f_in   = in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q   <= '0;
      out     <= '0;
      out_vld <= 1'b0;
      out_sof <= 1'b0;
      for (int i = 0; i < MAXLEN; i++) begin
        fifo[i] <= '0;
        mark[i] <= '0;
      end
    end else if (ce) begin
      // a block position counter that wraps at 2L
      pos_q <= pos & PW'((2 << len_lg) - 1);
      fifo[0] <= f_in;
      mark[0] <= {in_vld, in_sof};
      for (int i = 1; i < MAXLEN; i++) begin
        fifo[i] <= fifo[i-1];
        mark[i] <= mark[i-1];
      end
      out     <= bu_out;
      out_vld <= m_out[1];
      out_sof <= m_out[0];
    end
  end

endmodule
