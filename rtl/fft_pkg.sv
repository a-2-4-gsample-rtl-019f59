// fft_pkg: types, mode table and twiddle arithmetic shared by the multimode
// 256-point FFT processing engine and its DVFS control.
//
// * cplx_t is the internal complex sample (DW bits per part, two's complement).
//   The 8-bit input grows by one bit per butterfly, so DW=18 holds a full
//   256-point transform (8 + 8 + 2 guard bits) without any internal scaling.
// * mode_e enumerates the nine operation modes: 1..8-stream MIMO and the
//   high-speed single-stream mode.
// * mode_cfg() turns a mode into the data-path configuration: whether the
//   eight paths carry one evenly spread set of streams or two independent
//   four-path groups, how many stream slots each group interleaves, and the
//   clock divide ratio of each core domain (the frequency table printed with
//   the divider-based clock generator).
// * The twiddle factors are generated in constant functions by repeated
//   rotation with the 40-bit fixed-point value of W256^1, so no table file is
//   needed. Twiddles are TWW-bit signed with TWW-2 fraction bits.
//
// The mode table follows the published frequency table of the clock
// generator; the word lengths 8 (input) and 11 (output) are the published
// ones. The 18-bit internal word, the 12-bit twiddles and the encodings are
// this design's own choices.
package fft_pkg;

  parameter int IW  = 8;    // input word length per real part
  parameter int OW  = 11;   // output word length per real part
  parameter int DW  = 18;   // internal word length per real part
  parameter int TWW = 12;   // twiddle word length (Q1.10 plus sign)
  parameter int NPT = 256;  // FFT size

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [IW-1:0] re;
    logic signed [IW-1:0] im;
  } cin_t;

  typedef struct packed {
    logic signed [OW-1:0] re;
    logic signed [OW-1:0] im;
  } cout_t;

  typedef enum logic [3:0] {
    MODE_1S = 4'd1, MODE_2S = 4'd2, MODE_3S = 4'd3, MODE_4S = 4'd4,
    MODE_5S = 4'd5, MODE_6S = 4'd6, MODE_7S = 4'd7, MODE_8S = 4'd8,
    MODE_HS = 4'd9
  } mode_e;

  // Data-path configuration derived from the mode.
  //   split   : 1 = two independent 4-path groups (3/5/6-stream modes)
  //   hs      : 1 = high-speed mode, scheduler bypassed
  //   slots1  : stream slots interleaved on group 1 (paths 0-3), or on all
  //             eight paths when split=0 (7-stream uses 8 slots, one idle)
  //   slots2  : stream slots on group 2 (paths 4-7), split modes only
  //   nstr1   : streams really carried in group 1 (or in total when split=0)
  //   div1/2  : log2 of the clock divide ratio of domain 1 / domain 2
  typedef struct packed {
    logic       split;
    logic       hs;
    logic [3:0] slots1;
    logic [3:0] slots2;
    logic [3:0] nstr1;
    logic [3:0] nstr2;
    logic [1:0] div1;
    logic [1:0] div2;
  } mode_cfg_t;

  function automatic mode_cfg_t mode_cfg(input mode_e m);
    mode_cfg_t c;
    c = '0;
    unique case (m)
      MODE_1S: begin c.slots1 = 4'd1; c.nstr1 = 4'd1; c.div1 = 2'd3; c.div2 = 2'd3; end
      MODE_2S: begin c.slots1 = 4'd2; c.nstr1 = 4'd2; c.div1 = 2'd2; c.div2 = 2'd2; end
      MODE_3S: begin c.split = 1'b1; c.slots1 = 4'd2; c.nstr1 = 4'd2;
                     c.slots2 = 4'd1; c.nstr2 = 4'd1; c.div1 = 2'd1; c.div2 = 2'd2; end
      MODE_4S: begin c.slots1 = 4'd4; c.nstr1 = 4'd4; c.div1 = 2'd1; c.div2 = 2'd1; end
      MODE_5S: begin c.split = 1'b1; c.slots1 = 4'd4; c.nstr1 = 4'd4;
                     c.slots2 = 4'd1; c.nstr2 = 4'd1; c.div1 = 2'd0; c.div2 = 2'd2; end
      MODE_6S: begin c.split = 1'b1; c.slots1 = 4'd4; c.nstr1 = 4'd4;
                     c.slots2 = 4'd2; c.nstr2 = 4'd2; c.div1 = 2'd0; c.div2 = 2'd1; end
      MODE_7S: begin c.slots1 = 4'd8; c.nstr1 = 4'd7; c.div1 = 2'd0; c.div2 = 2'd0; end
      MODE_8S: begin c.slots1 = 4'd8; c.nstr1 = 4'd8; c.div1 = 2'd0; c.div2 = 2'd0; end
      MODE_HS: begin c.hs = 1'b1; c.slots1 = 4'd1; c.nstr1 = 4'd1; c.div1 = 2'd0; c.div2 = 2'd0; end
      default: begin c.slots1 = 4'd1; c.nstr1 = 4'd1; c.div1 = 2'd3; c.div2 = 2'd3; end
    endcase
    return c;
  endfunction

  // log2 of a power-of-two slot count (1, 2, 4 or 8)
  function automatic logic [1:0] lg2slots(input logic [3:0] s);
    case (s)
      4'd2:    return 2'd1;
      4'd4:    return 2'd2;
      4'd8:    return 2'd3;
      default: return 2'd0;
    endcase
  endfunction

  // ---- twiddle generation -------------------------------------------------
  // W256^1 = cos(2*pi/256) - j sin(2*pi/256) in Q40 fixed point.
  localparam longint C1_Q40 = 64'sd1099180475430;
  localparam longint S1_Q40 = 64'sd26983366121;

  typedef struct packed {
    logic signed [TWW-1:0] re;
    logic signed [TWW-1:0] im;
  } tw_t;

  // Round a Q40 value to a TWW-bit twiddle part with TWW-2 fraction bits.
  function automatic logic signed [TWW-1:0] q40_to_tw(input longint v);
    return TWW'((v + (64'sd1 <<< (40 - (TWW - 2) - 1))) >>> (40 - (TWW - 2)));
  endfunction

  typedef logic [NPT-1:0][2*TWW-1:0] tw_table_t;  // entry e = {re, im} of W256^e

  function automatic tw_table_t w256_table();
    tw_table_t t;
    longint cr, ci, nr, ni;
    cr = 64'sd1 <<< 40;
    ci = 0;
    for (int e = 0; e < NPT; e++) begin
      t[e] = {q40_to_tw(cr), q40_to_tw(ci)};
      nr = ((cr >>> 10) * (C1_Q40 >>> 10) + (ci >>> 10) * (S1_Q40 >>> 10)) >>> 20;
      ni = ((ci >>> 10) * (C1_Q40 >>> 10) - (cr >>> 10) * (S1_Q40 >>> 10)) >>> 20;
      cr = nr;
      ci = ni;
    end
    return t;
  endfunction

  // Complex multiply of a data word by a twiddle, rounded back to DW bits.
  function automatic cplx_t cmul_tw(input cplx_t a, input tw_t w);
    logic signed [DW+TWW:0] ar, ai, wr, wi, pr, pi;
    cplx_t y;
    ar = (DW+TWW+1)'(a.re);
    ai = (DW+TWW+1)'(a.im);
    wr = (DW+TWW+1)'(w.re);
    wi = (DW+TWW+1)'(w.im);
    pr = ar * wr - ai * wi + ((DW+TWW+1)'(1) <<< (TWW - 3));
    pi = ar * wi + ai * wr + ((DW+TWW+1)'(1) <<< (TWW - 3));
    y.re = DW'(pr >>> (TWW - 2));
    y.im = DW'(pi >>> (TWW - 2));
    return y;
  endfunction

endpackage
