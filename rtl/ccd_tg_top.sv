// ccd_tg_top -- full-frame area-array CCD drive timing generator.
//
// Top level of the generator: six modules wired as in the published module
// division.
//   ccd_bus_if   3-wire bus -> SSTART, SSTOP, NVB, NHB registers
//   ccd_clkgen   GCK is CLK12fpix; divides it to the CLK6line enable
//   ccd_ctrl     working-state machine, row/pixel/binning counters,
//                Go-signals for the two waveform generators
//   ccd_hgen     pixel-rate waveforms HOUT (H1-H3, SG, RG, SHP, SHD, CLKADC)
//   ccd_vgen     row-transfer waveforms VOUT (V1-V3, V4 = VTG)
//   ccd_sgen     HD, VD, CLPOB for the analog front end
// V3 (from VOUT) and H3 (from HOUT) are fed back to the control module,
// whose counters count their falling edges.
//
// Everything runs on the one clock clk = GCK = CLK12fpix, 12x the pixel
// rate (120 MHz for the 10 MHz pixel clock of the CCD485). One pixel takes
// 12 clocks; one row transfer takes 6 CLK6line periods = 6*LINE_DIV clocks.
// A full frame of NL rows of NP pixels (NP = 2048 pixels and NL = 2049
// rows per output port of the four-output CCD485) takes about
// NL * (12*NP + 6*LINE_DIV + a few) clocks.
//
// The sensor's 132 driver inputs are the same few waveforms fanned out to
// the four quadrants and two halves; that fan-out and the level shifting
// happen in the clock drivers on the board, so this block brings out one
// copy of each waveform. trg and sub must be synchronous to clk.
//
// LINE_DIV must be at least 13. The control module needs 4 clocks to
// redirect the vertical generator before its next step (see ccd_ctrl), and
// when a row transfer starts straight after integration the horizontal
// clocks may be anywhere in a pixel: they need up to 13 clocks to finish it
// and park in S0, and the vertical clocks first move one CLK6line period
// after the transfer starts (S1 repeats the S0 word).
module ccd_tg_top
  import ccd_tg_pkg::*;
#(
  parameter int unsigned NP       = 2048,  // pixels per row and port
  parameter int unsigned NL       = 2049,  // rows per frame and port
  parameter int unsigned LINE_DIV = 120,   // CLK12fpix cycles per CLK6line period
  parameter int unsigned CW       = 12     // counter and register width
) (
  input  logic        clk,        // GCK = CLK12fpix
  input  logic        rst,        // synchronous, active high
  input  logic        trg,        // TRG: integration while 1
  input  logic        sub,        // SUB: window output
  input  logic        bus_sck,
  input  logic        bus_sdata,
  input  logic        bus_sen_n,
  output logic [7:0]  hout,       // {H2,H1,H3,SG,RG,SHP,SHD,CLKADC}
  output logic [3:0]  vout,       // {V1,V2,V3,V4}
  output logic        hd,
  output logic        vd,
  output logic        clpob,
  output logic        clk6line,
  output logic [2:0]  state       // control state, ccd_tg_pkg::ctrl_state_t
);

  logic [CW-1:0] sstart, sstop, nvb, nhb;
  logic [CW-1:0] vcount, hcount, bcount;
  logic          ce_line;
  h_go_t         h_go;
  v_go_t         v_go;
  ctrl_state_t   cstate;
  hstate_t       hstate;
  vstate_t       vstate;

  ccd_bus_if #(.CW(CW), .NL(NL)) u_bus (
    .clk, .rst, .sck(bus_sck), .sdata(bus_sdata), .sen_n(bus_sen_n),
    .sstart, .sstop, .nvb, .nhb
  );

  ccd_clkgen #(.LINE_DIV(LINE_DIV)) u_clk (
    .clk, .rst, .ce_line, .clk6line
  );

  ccd_ctrl #(.CW(CW), .NP(NP), .NL(NL)) u_ctrl (
    .clk, .rst, .trg, .sub, .sstart, .sstop, .nvb,
    .v3(vout[VB_V3]), .h3(hout[HB_H3]),
    .h_go, .v_go, .vcount, .hcount, .bcount, .state(cstate)
  );

  ccd_hgen #(.CW(CW)) u_hgen (
    .clk, .rst, .go(h_go), .nhb, .hout, .state(hstate)
  );

  ccd_vgen u_vgen (
    .clk, .rst, .ce(ce_line), .go(v_go), .vout, .state(vstate)
  );

  ccd_sgen #(.CW(CW)) u_sgen (
    .clk, .rst, .vcount, .hcount,
    .frame_active(cstate == LINETRANSFER || cstate == PIXELTRANSFER),
    .line_active(cstate == PIXELTRANSFER),
    .hd, .vd, .clpob
  );

  assign state = cstate;

  initial assert (LINE_DIV >= 13) else $error("LINE_DIV must be at least 13");

endmodule
