// ccd_ctrl -- control module of the CCD timing generator.
//
// A Moore state machine follows the working cycle of a full-frame CCD:
//   IDLE          nothing is read; horizontal clocks run, vertical clocks off
//   INTEGRATION   exposure; vertical clocks hold the S0 level
//   LINETRANSFER  rows are shifted into the horizontal register
//   PIXELTRANSFER one row is shifted out pixel by pixel
//   FASTERASE     rows outside the output window are shifted and discarded
// Transitions (the conditions of the published transition table):
//   IDLE          -> INTEGRATION    trg = 1 (shooting instruction)
//   INTEGRATION   -> LINETRANSFER   trg = 0 and sub = 0 (full frame)
//   INTEGRATION   -> FASTERASE      trg = 0 and sub = 1 (window output)
//   LINETRANSFER  -> PIXELTRANSFER  BCOUNTER = NVB (all merged rows moved)
//   PIXELTRANSFER -> IDLE           HCOUNTER = NP and VCOUNTER >= NL
//   PIXELTRANSFER -> LINETRANSFER   HCOUNTER = NP and (sub = 0 and VCOUNTER < NL
//                                   or sub = 1 and VCOUNTER < Sstop)
//   PIXELTRANSFER -> FASTERASE      HCOUNTER = NP, sub = 1, Sstop <= VCOUNTER < NL
//   FASTERASE     -> IDLE           VCOUNTER >= NL (erase finished)
//   FASTERASE     -> LINETRANSFER   VCOUNTER = Sstart (window reached)
// Counters: VCOUNTER counts falling edges of V3 (rows moved since the frame
// started) and is cleared in IDLE and INTEGRATION; BCOUNTER counts falling
// edges of V3 inside one LINETRANSFER visit (rows merged); HCOUNTER counts
// falling edges of H3 inside one PIXELTRANSFER visit (pixels read). V3 and
// H3 are fed back from the two waveform generators.
// Outputs: the Go-signals of H-Gen and V-Gen decoded from the state
// (ccd_tg_pkg::h_go_of/v_go_of), registered together with the state.
//
// Timing: an edge of V3 or H3 is seen one clock after it appears, the
// counter updates one clock later and state and Go-signals one clock after
// that. H-Gen needs its Go-signals 4 clocks after the H3 edge (S9 -> S12),
// and V-Gen at its next CLK6line step, so the CLK6line period must be at
// least 4 clocks.
//
// Assertions: HCOUNTER never passes NP during a readout and BCOUNTER never
// passes NVB during a row transfer.
//
// Own choices: the VCOUNTER tests against NL use >= rather than =, so that a
// row count that is not a multiple of NVB still ends the frame; NVB = 0 is
// taken as 1; sub and trg are used as given, synchronised by the caller.
module ccd_ctrl
  import ccd_tg_pkg::*;
#(
  parameter int unsigned CW = 12,    // counter width
  parameter int unsigned NP = 2048,  // pixels per row and output port
  parameter int unsigned NL = 2049   // rows per frame and output port
) (
  input  logic          clk,
  input  logic          rst,         // synchronous, active high
  input  logic          trg,         // TRG: 1 while integrating
  input  logic          sub,         // SUB: 1 = window output
  input  logic [CW-1:0] sstart,      // first row of the window
  input  logic [CW-1:0] sstop,       // first row after the window
  input  logic [CW-1:0] nvb,         // rows merged vertically
  input  logic          v3,          // V3 from V-Gen
  input  logic          h3,          // H3 from H-Gen
  output h_go_t         h_go,
  output v_go_t         v_go,
  output logic [CW-1:0] vcount,      // VCOUNTER
  output logic [CW-1:0] hcount,      // HCOUNTER
  output logic [CW-1:0] bcount,      // BCOUNTER
  output ctrl_state_t   state
);

  localparam logic [CW-1:0] NP_C = CW'(NP);
  localparam logic [CW-1:0] NL_C = CW'(NL);

  ctrl_state_t   nxt;
  logic          v3_q, h3_q, v3_fall, h3_fall;
  logic [CW-1:0] nvb_eff;

  assign v3_fall = v3_q & ~v3;
  assign h3_fall = h3_q & ~h3;
  assign nvb_eff = (nvb == '0) ? CW'(1) : nvb;

  always_comb begin
    nxt = state;
    unique case (state)
      IDLE:
        if (trg) nxt = INTEGRATION;
      INTEGRATION:
        if (!trg) nxt = sub ? FASTERASE : LINETRANSFER;
      LINETRANSFER:
        if (bcount >= nvb_eff) nxt = PIXELTRANSFER;
      PIXELTRANSFER:
        if (hcount == NP_C) begin
          if (vcount >= NL_C)                nxt = IDLE;
          else if (!sub || vcount < sstop)   nxt = LINETRANSFER;
          else                               nxt = FASTERASE;
        end
      FASTERASE:
        if (vcount >= NL_C)                  nxt = IDLE;
        else if (vcount == sstart)           nxt = LINETRANSFER;
      default:
        nxt = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= IDLE;
      h_go   <= h_go_of(IDLE);
      v_go   <= v_go_of(IDLE);
      v3_q   <= 1'b0;
      h3_q   <= 1'b0;
      vcount <= '0;
      hcount <= '0;
      bcount <= '0;
    end else begin
      state <= nxt;
      h_go  <= h_go_of(nxt);
      v_go  <= v_go_of(nxt);
      v3_q  <= v3;
      h3_q  <= h3;

      if (state == IDLE || state == INTEGRATION) vcount <= '0;
      else if (v3_fall)                          vcount <= vcount + CW'(1);

      if (state != LINETRANSFER) bcount <= '0;
      else if (v3_fall)          bcount <= bcount + CW'(1);

      if (state != PIXELTRANSFER && nxt == PIXELTRANSFER) hcount <= '0;
      else if (state == PIXELTRANSFER && h3_fall)         hcount <= hcount + CW'(1);
    end
  end

  // A row readout ends exactly at NP pixels; a LINETRANSFER visit ends
  // exactly at NVB rows.
  a_hcount: assert property (@(posedge clk) disable iff (rst)
                             state == PIXELTRANSFER |-> hcount <= NP_C)
    else $error("ccd_ctrl: HCOUNTER passed NP");
  a_bcount: assert property (@(posedge clk) disable iff (rst)
                             state == LINETRANSFER |-> bcount <= nvb_eff)
    else $error("ccd_ctrl: BCOUNTER passed NVB");

endmodule
