// ccd_sgen -- image timing generator, S-Gen.
//
// Produces the line clock HD, the frame clock VD and the black-level clamp
// CLPOB for the analog front end from the row counter VCOUNTER and the
// pixel counter HCOUNTER of the control module. Each output is high while
// its counter lies in a preset half-open range [START, STOP):
//   HD    = line_active  and HD_START    <= HCOUNTER < HD_STOP
//   CLPOB = line_active  and CLPOB_START <= HCOUNTER < CLPOB_STOP
//   VD    = frame_active and VD_START    <= VCOUNTER < VD_STOP
// line_active is 1 while a row is being read out (control in PIXELTRANSFER),
// frame_active while rows are moved or read (LINETRANSFER or
// PIXELTRANSFER); they keep the outputs quiet while idle, integrating or
// erasing, when the counters hold stale values.
//
// Timing: outputs are registered, one clock after the counters.
//
// The range comparison follows the published design. The ranges are not
// given there: HD and VD mark the first pixel of a row and the first row of
// a frame, and CLPOB covers the eight optical black pixels at the start of
// a row; the qualifying line_active/frame_active inputs and the
// active-high polarity are this design's choices.
module ccd_sgen #(
  parameter int unsigned CW          = 12,
  parameter int unsigned HD_START    = 0,
  parameter int unsigned HD_STOP     = 1,
  parameter int unsigned VD_START    = 0,
  parameter int unsigned VD_STOP     = 1,
  parameter int unsigned CLPOB_START = 0,
  parameter int unsigned CLPOB_STOP  = 8
) (
  input  logic          clk,
  input  logic          rst,           // synchronous, active high
  input  logic [CW-1:0] vcount,        // VCOUNTER
  input  logic [CW-1:0] hcount,        // HCOUNTER
  input  logic          frame_active,
  input  logic          line_active,
  output logic          hd,
  output logic          vd,
  output logic          clpob
);

  function automatic logic in_range(logic [CW-1:0] v, int unsigned lo, int unsigned hi);
    return (32'(v) >= lo) && (32'(v) < hi);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      hd    <= 1'b0;
      vd    <= 1'b0;
      clpob <= 1'b0;
    end else begin
      hd    <= line_active  && in_range(hcount, HD_START, HD_STOP);
      clpob <= line_active  && in_range(hcount, CLPOB_START, CLPOB_STOP);
      vd    <= frame_active && in_range(vcount, VD_START, VD_STOP);
    end
  end

endmodule
