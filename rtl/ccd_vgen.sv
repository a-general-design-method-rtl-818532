// ccd_vgen -- vertical row-transfer timing generator, V-Gen.
//
// One vertical row transfer is cut into six segments. A Moore state machine
// with eight basic states drives the 4-bit word VOUT = {V1, V2, V3, V4}
// (table in ccd_tg_pkg; V4 follows V3 and drives the transfer gate):
//   SS      all clocks low, output while the camera is idle;
//   S0      V1, V2 high, held during integration and horizontal readout;
//   S1..S6  the three-phase sequence of one row transfer.
// The state advances only on clock cycles where ce is 1; ce is the
// CLK6line enable from the master clock generator, six pulses per row
// transfer. Transitions: SS -> S1 on go.line_transfer, SS -> S0 on
// go.pix_transfer, else stay; S0 -> SS on go.idle, S0 -> S1 on
// go.line_transfer, else stay; S1 -> ... -> S6 unconditionally; S6 -> SS
// on go.idle, S6 -> S1 on go.line_transfer (next row: this is how M rows
// are merged vertically, by keeping line_transfer on), otherwise S6 -> S0.
// The control module raises exactly one Go-signal at a time; if several
// are raised, idle wins over line_transfer over pix_transfer.
//
// Timing: state and VOUT are registers, updated on the ce cycle that
// enters a state. V3 falls on the S5 -> S6 step, once per row; S1 repeats
// the S0 word, so the first output change of a row transfer comes one
// CLK6line period after the transfer starts.
//
// Assertion: at most one Go-signal is set in any cycle.
//
// Taken from the published design: the states, their words and the
// transitions. Own choices: the clock-enable form of CLK6line, the
// priority among Go-signals, S6 -> S0 when no Go-signal is set, and a
// synchronous reset into SS.
module ccd_vgen
  import ccd_tg_pkg::*;
(
  input  logic    clk,      // CLK12fpix
  input  logic    rst,      // synchronous, active high
  input  logic    ce,       // one pulse per CLK6line period
  input  v_go_t   go,
  output vout_t   vout,
  output vstate_t state
);

  vstate_t nxt;

  always_comb begin
    nxt = state;
    if (ce) begin
      unique case (state)
        VSS:     nxt = go.idle ? VSS : go.line_transfer ? VS1 : go.pix_transfer ? VS0 : VSS;
        VS0:     nxt = go.idle ? VSS : go.line_transfer ? VS1 : VS0;
        VS6:     nxt = go.idle ? VSS : go.line_transfer ? VS1 : VS0;
        default: nxt = vstate_t'(state + 3'd1);
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= VSS;
      vout  <= vout_of(VSS);
    end else begin
      state <= nxt;
      vout  <= vout_of(nxt);
    end
  end

  // The control module raises at most one Go-signal at a time.
  a_go_onehot0: assert property (@(posedge clk) disable iff (rst) $countones(go) <= 1)
    else $error("ccd_vgen: more than one Go-signal set");

endmodule
