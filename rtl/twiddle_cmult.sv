// twiddle_cmult: general complex multiplier by W256^e with its twiddle table.
//
// This is the only full complex multiplier of each data path; it sits between
// the two radix-16 stages of the 256-point transform. The 256-entry table of
// TWW-bit cosine/sine pairs is generated at elaboration time from a constant
// function (repeated rotation by W256^1), so it synthesises to a ROM.
// One pipeline register follows the multiplier: out is valid one enabled
// clock (ce) after in, and the vld/sof markers are delayed to match.
//
// Follows the published design: one W256 complex multiplier per path after
// the fourth BU. This design's own choices: the table word length (12 bits,
// 10 fraction bits), round-half-up and the output register.
module twiddle_cmult
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce,
  input  cplx_t      in,
  input  logic [7:0] e,        // exponent of W256
  input  logic       in_vld,
  input  logic       in_sof,
  output cplx_t      out,
  output logic       out_vld,
  output logic       out_sof
);

  localparam tw_table_t TW = w256_table();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out     <= '0;
      out_vld <= 1'b0;
      out_sof <= 1'b0;
    end else if (ce) begin
      out     <= (e == 8'd0) ? in : cmul_tw(in, tw_t'(TW[e]));
      out_vld <= in_vld;
      out_sof <= in_sof;
    end
  end

endmodule
