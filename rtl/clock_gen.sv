// clock_gen: divider-based clock generator for dynamic frequency scaling.
//
// A 3-bit divider chain running on the system clock fclk gives fclk/2, /4 and
// /8; per core domain a multiplexer tree picks fclk or one of them under the
// frequency control (div = log2 of the ratio, so fD = fclk / 2**div). The
// input scheduler domain (fD0) always runs at fclk. The divider restarts when
// clk_reset is high, so that the next cycle is count 0; the FFT engine uses
// this to align its 8-cycle scheduling frame with the start of a symbol.
//
// Besides the divided clocks themselves (clk_d1/clk_d2, for a gated or
// multi-clock implementation) the block gives one-fclk-cycle clock enables
// ce_d1/ce_d2 that are high in the last fclk cycle of every fD period; the
// rest of this RTL runs on fclk with these enables, which is the functional
// equivalent of clocking a domain at fD. cnt is the divider state.
// Glitch-free switching of a divided clock while it runs is not handled:
// the frequency is changed between packets.
//
// Follows the published design: a divider-based generator with per-domain
// frequency selection and a clock reset. This design's own choices: the
// clock-enable outputs used by the rest of the RTL.
module clock_gen (
  input  logic       clk,        // system clock fclk
  input  logic       rst_n,
  input  logic       clk_reset,  // restart the divider
  input  logic [1:0] div1,       // domain 1: fD1 = fclk / 2**div1
  input  logic [1:0] div2,       // domain 2: fD2 = fclk / 2**div2
  output logic [2:0] cnt,
  output logic       clk_d1,
  output logic       clk_d2,
  output logic       ce_d1,
  output logic       ce_d2
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         cnt <= '0;
    else if (clk_reset) cnt <= '0;
    else                cnt <= cnt + 3'd1;

  function automatic logic pick_clk(input logic [1:0] d, input logic c, input logic [2:0] q);
    case (d)
      2'd0:    return c;
      2'd1:    return q[0];
      2'd2:    return q[1];
      default: return q[2];
    endcase
  endfunction

  function automatic logic last_cycle(input logic [1:0] d, input logic [2:0] q);
    case (d)
      2'd0:    return 1'b1;
      2'd1:    return q[0];
      2'd2:    return &q[1:0];
      default: return &q;
    endcase
  endfunction

  assign clk_d1 = pick_clk(div1, clk, cnt);
  assign clk_d2 = pick_clk(div2, clk, cnt);
  assign ce_d1  = last_cycle(div1, cnt);
  assign ce_d2  = last_cycle(div2, cnt);

endmodule
