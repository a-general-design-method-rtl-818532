// ccd_tg_pkg -- types and constants shared by the CCD timing generator.
//
// The generator builds every CCD drive waveform from a small set of "basic
// output states": each state is one tick of a fast clock and carries one
// output word. This package holds those state sets and their output words:
//
//   * the 13 pixel-clock states S0..S12 of the high-frequency generator and
//     their 8-bit HOUT word,
//   * the 8 vertical states SS, S0..S6 of the row-transfer generator and
//     their 4-bit VOUT word,
//   * the 5 states of the control module and the Go-signals each of them
//     drives into the two waveform generators.
//
// HOUT bit order {H2, H1, H3, SG, RG, SHP, SHD, CLKADC} and the per-state
// values follow the published pixel-clock segment table; the table's
// columns C2, C1, C3 are taken as the three horizontal phases H2, H1, H3.
// VOUT bit order {V1, V2, V3, V4} follows the published vertical segment
// table; V4 has the same waveform as V3 and serves the transfer gate VTG.
// Changing a waveform means editing one row of hout_of() or vout_of();
// adding an output means widening the word.
package ccd_tg_pkg;

  localparam int unsigned HOUT_W = 8;
  localparam int unsigned VOUT_W = 4;

  // HOUT bit positions
  localparam int unsigned HB_H2     = 7;
  localparam int unsigned HB_H1     = 6;
  localparam int unsigned HB_H3     = 5;
  localparam int unsigned HB_SG     = 4;
  localparam int unsigned HB_RG     = 3;
  localparam int unsigned HB_SHP    = 2;
  localparam int unsigned HB_SHD    = 1;
  localparam int unsigned HB_CLKADC = 0;

  // VOUT bit positions
  localparam int unsigned VB_V1 = 3;
  localparam int unsigned VB_V2 = 2;
  localparam int unsigned VB_V3 = 1;
  localparam int unsigned VB_V4 = 0;

  typedef logic [HOUT_W-1:0] hout_t;
  typedef logic [VOUT_W-1:0] vout_t;

  // Basic states of the high-frequency (pixel clock) generator.
  typedef enum logic [3:0] {
    HS0, HS1, HS2, HS3, HS4, HS5, HS6, HS7, HS8, HS9, HS10, HS11, HS12
  } hstate_t;

  // Basic states of the vertical row-transfer generator.
  typedef enum logic [2:0] {
    VSS, VS0, VS1, VS2, VS3, VS4, VS5, VS6
  } vstate_t;

  // Working states of the CCD as tracked by the control module.
  typedef enum logic [2:0] {
    IDLE, INTEGRATION, LINETRANSFER, PIXELTRANSFER, FASTERASE
  } ctrl_state_t;

  // Control inputs of the high-frequency generator.
  typedef struct packed {
    logic line_transfer;   // H_GoLineTransfer
    logic pix_transfer;    // H_GoPixTransfer
  } h_go_t;

  // Control inputs of the vertical generator.
  typedef struct packed {
    logic idle;            // V_GoIdle
    logic line_transfer;   // V_GoLineTransfer
    logic pix_transfer;    // V_GoPixTransfer
  } v_go_t;

  // Output word of each pixel-clock state, {H2,H1,H3,SG,RG,SHP,SHD,CLKADC}.
  function automatic hout_t hout_of(hstate_t s);
    unique case (s)
      HS0:     return 8'b1100_0000;
      HS1:     return 8'b0100_0001;
      HS2:     return 8'b0100_0001;
      HS3:     return 8'b0111_1001;
      HS4:     return 8'b0111_1001;
      HS5:     return 8'b0011_0001;
      HS6:     return 8'b0011_0101;
      HS7:     return 8'b1011_0100;
      HS8:     return 8'b1011_0000;
      HS9:     return 8'b1000_0000;
      HS10:    return 8'b1000_0000;
      HS11:    return 8'b1100_0010;
      HS12:    return 8'b1100_0010;
      default: return 8'b1100_0000;
    endcase
  endfunction

  // Output word of each vertical state, {V1,V2,V3,V4}.
  function automatic vout_t vout_of(vstate_t s);
    unique case (s)
      VSS:     return 4'b0000;
      VS0:     return 4'b1100;
      VS1:     return 4'b1100;
      VS2:     return 4'b0100;
      VS3:     return 4'b0111;
      VS4:     return 4'b0011;
      VS5:     return 4'b1011;
      VS6:     return 4'b1000;
      default: return 4'b0000;
    endcase
  endfunction

  // Go-signals to the high-frequency generator in each control state.
  function automatic h_go_t h_go_of(ctrl_state_t s);
    unique case (s)
      LINETRANSFER: return '{line_transfer: 1'b1, pix_transfer: 1'b0};
      default:      return '{line_transfer: 1'b0, pix_transfer: 1'b1};
    endcase
  endfunction

  // Go-signals to the vertical generator in each control state.
  function automatic v_go_t v_go_of(ctrl_state_t s);
    unique case (s)
      IDLE:          return '{idle: 1'b1, line_transfer: 1'b0, pix_transfer: 1'b0};
      INTEGRATION:   return '{idle: 1'b0, line_transfer: 1'b0, pix_transfer: 1'b1};
      LINETRANSFER:  return '{idle: 1'b0, line_transfer: 1'b1, pix_transfer: 1'b0};
      PIXELTRANSFER: return '{idle: 1'b0, line_transfer: 1'b0, pix_transfer: 1'b1};
      FASTERASE:     return '{idle: 1'b0, line_transfer: 1'b1, pix_transfer: 1'b0};
      default:       return '{idle: 1'b1, line_transfer: 1'b0, pix_transfer: 1'b0};
    endcase
  endfunction

endpackage
