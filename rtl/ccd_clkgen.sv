// ccd_clkgen -- master clock generator, CLK-Gen.
//
// The pixel-segment clock CLK12fpix is the external clock GCK itself and is
// used directly as the single system clock. The vertical-segment clock
// CLK6line is obtained from it by division by LINE_DIV. Inside the design
// CLK6line is not used as a clock: a counter produces ce_line, a one-cycle
// enable at the rate of CLK6line, so all logic stays in one clock domain.
// For observation or for logic outside, clk6line is also produced as a
// registered square wave (high for the first LINE_DIV/2 cycles of each
// period).
//
// Timing: ce_line is high in the last cycle of every LINE_DIV-cycle period,
// first LINE_DIV cycles after reset. Division ratio LINE_DIV >= 2.
//
// The division itself follows the published design; its ratio is not
// given there and LINE_DIV = 120 (1 MHz vertical segments for a 120 MHz
// CLK12fpix, i.e. 10 MHz pixels) is this design's choice. A DCM or PLL in
// front of GCK, which the published design suggests for very high pixel
// rates, is vendor hardware and not part of this module.
module ccd_clkgen #(
  parameter int unsigned LINE_DIV = 120
) (
  input  logic clk,        // GCK = CLK12fpix
  input  logic rst,        // synchronous, active high
  output logic ce_line,    // CLK6line enable pulse
  output logic clk6line    // CLK6line as a square wave
);

  localparam int unsigned DW = (LINE_DIV > 2) ? $clog2(LINE_DIV) : 1;
  localparam logic [DW-1:0] LAST = DW'(LINE_DIV - 1);
  localparam logic [DW-1:0] HALF = DW'(LINE_DIV / 2);

  logic [DW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      ce_line  <= 1'b0;
      clk6line <= 1'b0;
    end else begin
      cnt      <= (cnt == LAST) ? '0 : cnt + DW'(1);
      ce_line  <= (cnt == LAST - DW'(1));
      clk6line <= (cnt == LAST) || (cnt < HALF - DW'(1));
    end
  end

  initial assert (LINE_DIV >= 2) else $error("LINE_DIV must be at least 2");

endmodule
