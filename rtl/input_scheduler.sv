// input_scheduler: distributes 1..8 MIMO input streams over the eight data
// paths of the FFT cores and lowers the per-path sample rate.
//
// Input: eight lanes at fclk. In MIMO modes lane s carries stream s, one
// sample per clock; in high-speed mode the eight lanes carry consecutive
// samples of one 2.4-Gsample/s stream (lane k = sample 8t + k) and the
// scheduler only registers them. in_sof marks the first sample of a symbol
// and must fall on frame count 0 (the clock generator restarts on it).
//
// Output order (per path, in core-domain clocks):
//   * 8-path modes, p slots (1/2/4/8-stream; 7-stream uses 8 slots with slot
//     7 idle): slot t carries stream t mod p, sample 8*(t div p) + path.
//   * 3/5/6-stream: paths 0-3 carry the first q1 streams, paths 4-7 the
//     remaining q2, each group with slot t = stream t mod q, sample
//     4*(t div q) + lane. The two groups run at their own rates.
// A slot lasts 2**div fclk cycles, the period of the receiving domain, and the
// output is held for the whole slot.
//
// Implementation: a two-bank 8x8 register corner turn. Frame f (8 clocks)
// writes eight samples of every lane into one bank while the bank written in
// frame f-1 is read out in slot order. This gives the input-to-path mapping
// of the scheduler built from input delays, switch network, barrel shifter,
// hold registers and output delays, with a different internal structure.
// Latency: 9 fclk cycles from a sample's frame start to its slot.
// Of the mode configuration, the group-2 stream count (cfg.nstr2) is not
// needed here: group 2 simply takes the streams after the first nstr1.
//
// Follows the published design: the slot order of every mode, the 4+4 path
// grouping and the bypass in high-speed mode. This design's own choice: the
// corner-turn structure described above.
module input_scheduler
  import fft_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  mode_cfg_t cfg,
  input  logic [2:0] cnt,       // frame count from the clock generator
  input  cin_t      in  [8],
  input  logic      in_vld,
  input  logic      in_sof,
  output cplx_t     out [8],
  output logic      out_vld [2],  // per group (paths 0-3, 4-7)
  output logic      out_sof [2]
);

  cin_t bank [2][8][8];          // [bank][lane/stream][sample in frame]
  logic wb;                      // bank being written
  logic fr_vld [2], fr_sof [2];  // frame markers per bank

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        fr_vld[b] <= 1'b0;
        fr_sof[b] <= 1'b0;
        for (int s = 0; s < 8; s++)
          for (int i = 0; i < 8; i++) bank[b][s][i] <= '0;
      end
    end else begin
      for (int s = 0; s < 8; s++) bank[wb][s][cnt] <= in[s];
      if (cnt == 3'd0) begin
        fr_vld[wb] <= in_vld;
        fr_sof[wb] <= in_sof;
      end
      if (cnt == 3'd7) wb <= ~wb;
    end

  // read side: the bank written during the previous frame
  logic       rb;
  logic [2:0] slot1, slot2;
  logic [2:0] str1, str2;
  logic       hi1, hi2;
  assign rb = ~wb;

  function automatic cplx_t ext(input cin_t x);
    cplx_t y;
    y.re = DW'(x.re);
    y.im = DW'(x.im);
    return y;
  endfunction

  always_comb begin
    slot1 = cnt >> cfg.div1;
    slot2 = cnt >> cfg.div2;
    // group modes: slot t -> stream t mod q, frame half t div q
    str1 = 3'(slot1 & 3'(cfg.slots1 - 4'd1));
    hi1  = |(slot1 & 3'(cfg.slots1));
    str2 = 3'(cfg.nstr1) + 3'(slot2 & 3'(cfg.slots2 - 4'd1));
    hi2  = |(slot2 & 3'(cfg.slots2));
  end

  cplx_t nxt [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (cfg.hs)
        nxt[k] = ext(in[k]);
      else if (!cfg.split)
        nxt[k] = ext(bank[rb][slot1][k]);
      else if (k < 4)
        nxt[k] = ext(bank[rb][str1][{hi1, 2'(k)}]);
      else
        nxt[k] = ext(bank[rb][str2][{hi2, 2'(k - 4)}]);
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int k = 0; k < 8; k++) out[k] <= '0;
      for (int g = 0; g < 2; g++) begin
        out_vld[g] <= 1'b0;
        out_sof[g] <= 1'b0;
      end
    end else begin
      for (int k = 0; k < 8; k++) out[k] <= nxt[k];
      if (cfg.hs) begin
        for (int g = 0; g < 2; g++) begin
          out_vld[g] <= in_vld;
          out_sof[g] <= in_sof;
        end
      end else begin
        out_vld[0] <= fr_vld[rb];
        out_vld[1] <= fr_vld[rb];
        // the symbol marker belongs to the first slot of the frame only
        out_sof[0] <= fr_sof[rb] && (slot1 == 3'd0);
        out_sof[1] <= fr_sof[rb] && (slot2 == 3'd0);
      end
    end

endmodule
