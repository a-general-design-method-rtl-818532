// tb_ccd_tg_full -- one full-size frame through the CCD timing generator.
//
// The generator is used at its default size (NP = 2048 pixels per row and
// port, NL = 2049 rows, LINE_DIV = 120) with its reset register values
// (full frame, no binning). One exposure is taken and the whole frame is
// read out: about 51 million clocks. From the output waveforms alone the
// bench checks that 2049 rows are moved and read, that every row has 2048
// pixels and 2048 SG dumps, one HD pulse per row and one VD pulse per
// frame, that the horizontal clocks are parked while a row enters the
// horizontal register, and that the frame time matches the clock budget
// 12*NP clocks per row of readout plus 5..6 CLK6line periods of transfer.
module tb_ccd_tg_full;
  import ccd_tg_pkg::*;

  localparam int NP = 2048;
  localparam int NL = 2049;
  localparam int LD = 120;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       trg = 1'b0;
  logic [7:0] hout;
  logic [3:0] vout;
  logic       hd, vd, clpob, clk6line;
  logic [2:0] state;

  int checks = 0, failures = 0;

  ccd_tg_top dut (
    .clk, .rst, .trg, .sub(1'b0), .bus_sck(1'b0), .bus_sdata(1'b0), .bus_sen_n(1'b1),
    .hout, .vout, .hd, .vd, .clpob, .clk6line, .state);

  always #4 clk = ~clk;

  logic v3_q = 0, h3_q = 0, sg_q = 0, hd_q = 0, vd_q = 0;
  logic [2:0] state_q = 3'(IDLE);
  int rows_moved = 0, rows_read = 0, pix = 0, sg = 0, hd_n = 0, vd_n = 0;
  int bad_rows = 0, park_err = 0;
  longint frame_cycles = 0;

  always @(posedge clk) begin
    if (!rst) begin
      v3_q <= vout[VB_V3];
      h3_q <= hout[HB_H3];
      sg_q <= hout[HB_SG];
      hd_q <= hd; vd_q <= vd;
      state_q <= state;
      if (state != 3'(IDLE)) frame_cycles++;
      if (v3_q && !vout[VB_V3]) rows_moved++;
      if (state == 3'(PIXELTRANSFER)) begin
        if (h3_q && !hout[HB_H3]) pix++;
        if (sg_q && !hout[HB_SG]) sg++;
      end
      if (state != state_q && state == 3'(PIXELTRANSFER)) begin
        rows_read++; pix = 0; sg = 0;
      end
      if (state != state_q && state_q == 3'(PIXELTRANSFER)) begin
        // the last SG dump of a row falls after the row's last H3 edge
        if (pix != NP || sg < NP - 1) bad_rows++;
      end
      if (hd && !hd_q) hd_n++;
      if (vd && !vd_q) vd_n++;
      if ((vout == 4'b0100 || vout[VB_V4]) && hout != 8'b1100_0000) park_err++;
    end
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(negedge clk);
    trg = 1'b1;
    repeat (100) @(negedge clk);
    trg = 1'b0;
    do @(posedge clk); while (state != 3'(IDLE));
    repeat (100) @(posedge clk);
    expect_eq("rows moved", rows_moved, NL);
    expect_eq("rows read", rows_read, NL);
    expect_eq("rows with wrong pixel or SG count", bad_rows, 0);
    expect_eq("HD pulses", hd_n, NL);
    expect_eq("VD pulses", vd_n, 1);
    expect_eq("H not parked during row entry", park_err, 0);
    checks++;
    if (frame_cycles < 95 + longint'(NL) * (12 * NP + 5 * LD) ||
        frame_cycles > 105 + longint'(NL) * (12 * NP + 6 * LD + 20)) begin
      failures++; $display("FAIL frame time %0d cycles", frame_cycles);
    end
    $display("frame: %0d rows, %0d clocks", rows_read, frame_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
