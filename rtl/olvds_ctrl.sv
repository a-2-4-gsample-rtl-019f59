// olvds_ctrl: open-loop voltage detection and scaling controller for one
// power domain (one FFT core).
//
// Detector calibration (once after reset): for each clock ratio 1, 1/2, 1/4,
// 1/8 of fclk, starting at the nominal 1.0 V (vcode 0), the added delay of
// the tunable line is swept from NMAX down to 0; the first setting whose test
// pulse arrives in time is the timing margin N(V) and is stored. The supply
// is then lowered by one step (25 mV, vcode+1) and the sweep repeated, until
// no setting passes (timing violation) or the lowest code VSTEPS is reached.
// K(f), the last passing code, is kept per frequency.
//
// Voltage detection and scaling (at every packet start): the table of the
// packet's clock ratio is chosen, the supply is set at once to the "safe"
// code J = K - SAFE (at least 0), and with the supply left there, the replica
// plus N(V_J) - N(V_i) delay units is tested NTEST times for i = K. If all
// pass, the supply is lowered to V_i; otherwise i is decreased (one step
// higher voltage) and the tests repeat; at i = J the supply stays at V_J.
// Between packets (pkt_active low) the supply returns to nominal.
//
// One test takes five domain clocks: the test pulse is issued in the first,
// DFF1 captures it at the end of the first, DFF2 at the end of the second,
// and the detected signals of all detection units are sampled at the end of
// the third; all units must show the pulse. After a supply change the
// controller waits SETTLE fclk cycles for the off-chip converter.
// Interface: clk is fclk; ce is the domain clock enable; cal_div tells the
// clock generator which ratio to use while calibrating.
//
// Follows the published design: the 59..0 sweep, 25-mV steps, per-frequency
// tables, the safe voltage and the 16 tests per candidate. This design's own
// choices: the safe margin SAFE = 3 steps, five clocks per test, the settle
// wait and the return to nominal between packets.
module olvds_ctrl #(
  parameter int NUNIT  = 4,
  parameter int NMAX   = 59,   // longest tunable delay, in delay units
  parameter int VSTEPS = 15,   // lowest supply code: 1.0 V - 15 * 25 mV = 0.625 V
  parameter int NTEST  = 16,   // tests per candidate voltage
  parameter int SAFE   = 3,    // steps between the safe voltage and V_K
  parameter int SETTLE = 64    // fclk cycles allowed for a supply change
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             pkt_start,   // pulse: a packet begins
  input  logic             pkt_active,  // level: packet in progress
  input  logic [1:0]       pkt_div,     // the packet's clock ratio, log2
  input  logic [NUNIT-1:0] detected,
  output logic             test,
  output logic [5:0]       delay_sel,
  output logic [3:0]       vcode,       // supply request: 1.0 V - vcode * 25 mV
  output logic             calibrating,
  output logic [1:0]       cal_div,
  output logic             scaled,      // detection finished for this packet
  output logic [3:0]       kmax_out [4] // calibrated K per clock ratio
);

  typedef enum logic [2:0] {
    S_CAL_SET, S_CAL_SETTLE, S_CAL_TEST, S_IDLE, S_DET_SETTLE, S_DET_TEST, S_RUN
  } state_e;

  state_e     state;
  logic [1:0] fidx;
  logic [3:0] vidx, icode, jcode;
  logic [5:0] nd;
  logic [5:0] ntab [4][VSTEPS+1];
  logic [3:0] kmax [4];
  logic [2:0] tc;
  logic       pass_q;
  logic [4:0] npass;
  logic [7:0] settle;

  assign test        = (state == S_CAL_TEST || state == S_DET_TEST) && tc == 3'd0;
  assign calibrating = (state == S_CAL_SET || state == S_CAL_SETTLE || state == S_CAL_TEST);
  assign cal_div     = fidx;
  assign kmax_out    = kmax;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state     <= S_CAL_SET;
      fidx      <= '0;
      vidx      <= '0;
      icode     <= '0;
      jcode     <= '0;
      nd        <= 6'(NMAX);
      tc        <= '0;
      pass_q    <= 1'b0;
      npass     <= '0;
      settle    <= '0;
      vcode     <= '0;
      delay_sel <= '0;
      scaled    <= 1'b0;
      for (int f = 0; f < 4; f++) begin
        kmax[f] <= '0;
        for (int v = 0; v <= VSTEPS; v++) ntab[f][v] <= '0;
      end
    end else begin
      case (state)
        // ---------------- detector calibration ----------------
        S_CAL_SET: begin
          vcode     <= vidx;
          nd        <= 6'(NMAX);
          delay_sel <= 6'(NMAX);
          settle    <= 8'(SETTLE);
          state     <= S_CAL_SETTLE;
        end
        S_CAL_SETTLE: begin
          if (settle != 0) settle <= settle - 8'd1;
          else if (ce) begin
            tc    <= '0;
            state <= S_CAL_TEST;
          end
        end
        S_CAL_TEST: if (ce) begin
          tc <= tc + 3'd1;
          if (tc == 3'd2) pass_q <= &detected;
          if (tc == 3'd4) begin
            tc <= '0;
            if (pass_q) begin
              ntab[fidx][vidx] <= nd;
              if (vidx == 4'(VSTEPS)) begin
                kmax[fidx] <= vidx;
                vidx       <= '0;
                fidx       <= fidx + 2'd1;
                state      <= (fidx == 2'd3) ? S_IDLE : S_CAL_SET;
              end else begin
                vidx  <= vidx + 4'd1;
                state <= S_CAL_SET;
              end
            end else if (nd == 6'd0) begin
              // timing violation at this supply: the previous one is V_K
              kmax[fidx] <= (vidx == 4'd0) ? 4'd0 : vidx - 4'd1;
              vidx       <= '0;
              fidx       <= fidx + 2'd1;
              state      <= (fidx == 2'd3) ? S_IDLE : S_CAL_SET;
            end else begin
              nd        <= nd - 6'd1;
              delay_sel <= nd - 6'd1;
            end
          end
        end
        // ---------------- voltage detection and scaling ----------------
        S_IDLE, S_RUN: begin
          if (pkt_start) begin
            fidx   <= pkt_div;
            icode  <= kmax[pkt_div];
            jcode  <= (kmax[pkt_div] > 4'(SAFE)) ? kmax[pkt_div] - 4'(SAFE) : 4'd0;
            vcode  <= (kmax[pkt_div] > 4'(SAFE)) ? kmax[pkt_div] - 4'(SAFE) : 4'd0;
            settle <= 8'(SETTLE);
            scaled <= 1'b0;
            state  <= S_DET_SETTLE;
          end else if (!pkt_active) begin
            vcode  <= '0;
            scaled <= 1'b0;
            state  <= S_IDLE;
          end
        end
        S_DET_SETTLE: begin
          if (settle != 0) settle <= settle - 8'd1;
          else if (ce) begin
            if (icode <= jcode) begin
              scaled <= 1'b1;
              state  <= S_RUN;
            end else begin
              delay_sel <= ntab[fidx][jcode] - ntab[fidx][icode];
              npass     <= '0;
              tc        <= '0;
              state     <= S_DET_TEST;
            end
          end
        end
        S_DET_TEST: if (ce) begin
          tc <= tc + 3'd1;
          if (tc == 3'd2) pass_q <= &detected;
          if (tc == 3'd4) begin
            tc <= '0;
            if (pass_q) begin
              npass <= npass + 5'd1;
              if (npass == 5'(NTEST - 1)) begin
                vcode  <= icode;
                scaled <= 1'b1;
                state  <= S_RUN;
              end
            end else begin
              icode <= icode - 4'd1;
              state <= S_DET_SETTLE;   // settle is 0: starts at the next ce
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end

endmodule
