// ccd_hgen -- high-frequency (pixel clock) timing generator, H-Gen.
//
// One pixel period is cut into 12 equal segments. A Moore state machine
// steps through the basic states S1..S12, one per clock of CLK12fpix (12x
// the pixel rate), and every state drives a fixed 8-bit word HOUT =
// {H2, H1, H3, SG, RG, SHP, SHD, CLKADC} (table in ccd_tg_pkg). S1..S12
// repeat for as long as go.pix_transfer is 1, one pixel per round. State
// S0 is the parking state used during vertical row transfer (H1 and H2
// high, all else low). Transitions: S0 -> S1 when go.pix_transfer, else
// stay; S1 -> ... -> S12 unconditionally, so a started pixel is always
// finished; S12 -> S1 when go.pix_transfer, otherwise S12 -> S0.
//
// Horizontal binning: a counter counts falling edges of H3 (one per pixel)
// and wraps at NHB. SG keeps its table waveform only in the pixel whose H3
// edge made the counter wrap; in the other NHB-1 pixels SG is held high so
// that their charge collects under the summing gate and is dumped to the
// output node once per NHB pixels. NHB = 0 is taken as 1 (no binning). The
// counter restarts in S0, i.e. at the start of every line.
//
// Timing: state and HOUT are registers; HOUT always equals the word of the
// current state, so the outputs are glitch-free and change on the clock
// edge that enters a state. go is sampled on the edge that leaves S0/S12.
//
// Assertions: line and pixel transfer are never requested together, and
// the three horizontal phases are never all high or all low.
//
// Taken from the published design: the 13 states, their output words, the
// transition rule and the NHB counter on H3. Own choices: registered
// outputs, synchronous reset into S0, the exact SG gating for binning.
module ccd_hgen
  import ccd_tg_pkg::*;
#(
  parameter int unsigned CW = 12   // width of the NHB setting
) (
  input  logic          clk,       // CLK12fpix
  input  logic          rst,       // synchronous, active high
  input  h_go_t         go,        // H_GoLineTransfer / H_GoPixTransfer
  input  logic [CW-1:0] nhb,       // pixels merged horizontally
  output hout_t         hout,
  output hstate_t       state
);

  hstate_t       nxt;
  logic [CW-1:0] bin_cnt, bin_cnt_n, nhb_eff;
  hout_t         hout_n;

  assign nhb_eff = (nhb == '0) ? CW'(1) : nhb;

  always_comb begin
    unique case (state)
      HS0, HS12: nxt = go.pix_transfer ? HS1 : HS0;
      default:   nxt = hstate_t'(state + 4'd1);
    endcase
  end

  // binning counter: advances on the H3 falling edge (S8 -> S9)
  always_comb begin
    bin_cnt_n = bin_cnt;
    if (nxt == HS0)
      bin_cnt_n = '0;
    else if (state == HS8 && nxt == HS9)
      bin_cnt_n = (bin_cnt + CW'(1) >= nhb_eff) ? '0 : bin_cnt + CW'(1);
  end

  always_comb begin
    hout_n = hout_of(nxt);
    if (bin_cnt_n != '0) hout_n[HB_SG] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= HS0;
      bin_cnt <= '0;
      hout    <= hout_of(HS0);
    end else begin
      state   <= nxt;
      bin_cnt <= bin_cnt_n;
      hout    <= hout_n;
    end
  end

  // Line transfer and pixel transfer are never requested together.
  a_go_excl: assert property (@(posedge clk) disable iff (rst) !(go.line_transfer && go.pix_transfer))
    else $error("ccd_hgen: line and pixel transfer requested together");
  // The three horizontal phases are never all high or all low.
  a_three_phase: assert property (@(posedge clk) disable iff (rst)
                                  !(&{hout[HB_H1], hout[HB_H2], hout[HB_H3]}) &&
                                   (|{hout[HB_H1], hout[HB_H2], hout[HB_H3]}))
    else $error("ccd_hgen: three-phase rule broken");

endmodule
