// tb_ccd_tg_top -- end-to-end testbench of the CCD timing generator.
//
// The generator is built small (NP = 16 pixels, NL = 10 rows, LINE_DIV = 16)
// and programmed over its 3-wire bus. Four exposures are taken:
//   1. full frame, no binning;
//   2. vertical binning by 2 and horizontal binning by 4;
//   3. window output of rows 3..5 (fast erase before and after);
//   4. window output with the window running to the last row.
// Per frame the bench counts, from the output waveforms alone, the rows
// moved (V3 falling edges), the rows read and the pixels of each row (H3
// falling edges while reading), the SG dumps of each row, HD and VD pulses,
// and the frame time, and compares them with values worked out from the
// settings. In every cycle it checks that the horizontal clocks are parked
// (H1 = H2 = 1, all else 0) while a row is on its way into the horizontal
// register, i.e. while the vertical clocks are in S2..S5 (V2 alone high, or
// the transfer gate high), except during fast erase, when both run by
// design; and that neither three-phase clock set has all phases high or (while
// running) all low. Each mechanism - integration, row transfer, pixel
// transfer, fast erase, vertical and horizontal binning, register writes -
// is counted and must occur at least once.
module tb_ccd_tg_top;
  import ccd_tg_pkg::*;

  localparam int NP = 16;
  localparam int NL = 10;
  localparam int LD = 16;
  localparam int HALF = 3;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       trg = 1'b0, sub = 1'b0;
  logic       sck = 1'b0, sdata = 1'b0, sen_n = 1'b1;
  logic [7:0] hout;
  logic [3:0] vout;
  logic       hd, vd, clpob, clk6line;
  logic [2:0] state;

  int checks = 0, failures = 0;

  ccd_tg_top #(.NP(NP), .NL(NL), .LINE_DIV(LD)) dut (
    .clk, .rst, .trg, .sub, .bus_sck(sck), .bus_sdata(sdata), .bus_sen_n(sen_n),
    .hout, .vout, .hd, .vd, .clpob, .clk6line, .state);

  always #5 clk = ~clk;

  // ---- bus master ----
  task automatic write(int addr, int data);
    logic [15:0] w;
    w = {4'(addr), 12'(data)};
    sen_n = 1'b0;
    repeat (HALF) @(posedge clk);
    for (int i = 15; i >= 0; i--) begin
      sdata = w[i];
      repeat (HALF) @(posedge clk);
      sck = 1'b1;
      repeat (HALF) @(posedge clk);
      sck = 1'b0;
    end
    repeat (HALF) @(posedge clk);
    sen_n = 1'b1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  // ---- waveform monitors ----
  logic v3_q = 0, h3_q = 0, sg_q = 0, hd_q = 0, vd_q = 0, clpob_q = 0;
  int   rows_moved, rows_read, sg_dumps, hd_pulses, vd_pulses, clpob_cycles;
  int   pix_in_row, sg_in_row, frame_cycles;
  int   row_pix[$], row_sg[$];
  int   n_integration = 0, n_line = 0, n_pixel = 0, n_erase = 0;
  int   n_vbin = 0, n_hbin_hold = 0, n_bus = 0;
  int   rows_this_line;
  logic [2:0] state_q = 3'(IDLE);
  logic park_err_reported = 0;

  always @(posedge clk) begin
    if (!rst) begin
      v3_q <= vout[VB_V3];
      h3_q <= hout[HB_H3];
      sg_q <= hout[HB_SG];
      hd_q <= hd; vd_q <= vd; clpob_q <= clpob;
      state_q <= state;
      if (state != 3'(IDLE)) frame_cycles++;

      // state entries
      if (state != state_q) begin
        if (state == 3'(INTEGRATION)) n_integration++;
        if (state == 3'(LINETRANSFER)) begin n_line++; rows_this_line = 0; end
        if (state == 3'(FASTERASE)) n_erase++;
        if (state == 3'(PIXELTRANSFER)) begin
          n_pixel++; rows_read++; pix_in_row = 0; sg_in_row = 0;
          if (rows_this_line > 1) n_vbin++;
        end
        if (state_q == 3'(PIXELTRANSFER)) begin
          row_pix.push_back(pix_in_row);
        end
      end

      if (v3_q && !vout[VB_V3]) begin rows_moved++; rows_this_line++; end
      if (h3_q && !hout[HB_H3] && state == 3'(PIXELTRANSFER)) pix_in_row++;
      if (sg_q && !hout[HB_SG] && (state == 3'(PIXELTRANSFER) || state_q == 3'(PIXELTRANSFER)
                                   || state == 3'(LINETRANSFER) || state == 3'(IDLE))) sg_in_row++;
      if (hd && !hd_q) hd_pulses++;
      if (vd && !vd_q) vd_pulses++;
      if (clpob && h3_q && !hout[HB_H3]) clpob_cycles++;
      // SG held high through the pixel's dump segments: horizontal binning
      if (hout[HB_H2] && !hout[HB_H1] && !hout[HB_H3] && hout[HB_SG]) n_hbin_hold++;

      // horizontal clocks parked while vertical clocks move charge
      if ((vout == 4'b0100 || vout[VB_V4]) && state != 3'(FASTERASE)) begin
        checks++;
        if (hout != 8'b1100_0000) begin
          failures++;
          if (!park_err_reported) $display("FAIL t=%0t H not parked (hout=%b) during row transfer", $time, hout);
          park_err_reported = 1;
        end
      end
      // three-phase rules
      checks++;
      if (&{hout[HB_H1], hout[HB_H2], hout[HB_H3]} || !(|{hout[HB_H1], hout[HB_H2], hout[HB_H3]})) begin
        failures++; $display("FAIL t=%0t H phases all equal", $time);
      end
      checks++;
      if (&vout[3:1] || (vout != 4'b0000 && !(|vout[3:1]))) begin
        failures++; $display("FAIL t=%0t V phases %b", $time, vout);
      end
      checks++;
      if (vout[VB_V4] != vout[VB_V3]) begin failures++; $display("FAIL VTG differs from V3"); end
    end
  end

  // SG dumps of each row: counted from one row readout start to the next
  always @(posedge clk) if (!rst && state != state_q && state == 3'(LINETRANSFER) && state_q == 3'(PIXELTRANSFER))
    row_sg.push_back(sg_in_row);

  task automatic expose(logic s);
    rows_moved = 0; rows_read = 0; hd_pulses = 0; vd_pulses = 0; frame_cycles = 0;
    clpob_cycles = 0;
    row_pix.delete(); row_sg.delete();
    sub = s;
    @(negedge clk); trg = 1'b1;
    repeat (50) @(negedge clk);
    trg = 1'b0;
    do @(posedge clk); while (state == 3'(INTEGRATION));
    do @(posedge clk); while (state != 3'(IDLE));
    repeat (200) @(posedge clk);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %0d, expected %0d", what, got, exp); end
  endtask

  task automatic expect_rows(string what, int nrows, int nhb);
    expect_eq({what, " rows read"}, rows_read, nrows);
    expect_eq({what, " HD pulses"}, hd_pulses, nrows);
    expect_eq({what, " pixels under CLPOB"}, clpob_cycles, nrows * 8);
    foreach (row_pix[i]) expect_eq({what, " pixels in a row"}, row_pix[i], NP);
    foreach (row_sg[i])  expect_eq({what, " SG dumps in a row"}, row_sg[i], NP / nhb);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    #1 rst = 0;
    repeat (20) @(posedge clk);

    // 1: full frame
    expose(1'b0);
    expect_rows("full", NL, 1);
    expect_eq("full rows moved", rows_moved, NL);
    expect_eq("full VD pulses", vd_pulses, 1);
    // frame time: per row 12*NP clocks of readout, then a row transfer of
    // 5 vertical periods up to the V3 edge after waiting 0..1 period for
    // the vertical phase, plus a few clocks of hand-over
    checks++;
    if (frame_cycles < 45 + NL * (12 * NP + 5 * LD) || frame_cycles > 55 + NL * (12 * NP + 6 * LD + 20)) begin
      failures++; $display("FAIL frame time %0d cycles", frame_cycles);
    end

    // 2: binning NVB = 2, NHB = 4
    write(2, 2); n_bus++;
    write(3, 4); n_bus++;
    expose(1'b0);
    expect_rows("binned", NL / 2, 4);
    expect_eq("binned rows moved", rows_moved, NL);

    // 3: window rows 3..5
    write(2, 1); n_bus++;
    write(3, 1); n_bus++;
    write(0, 3); n_bus++;
    write(1, 6); n_bus++;
    expose(1'b1);
    expect_rows("window", 3, 1);
    expect_eq("window rows moved", rows_moved, NL);

    // 4: window from row 7 to the end
    write(0, 7); n_bus++;
    write(1, NL); n_bus++;
    expose(1'b1);
    expect_rows("window to end", NL - 7, 1);
    expect_eq("window to end rows moved", rows_moved, NL);

    // every mechanism happened
    expect_eq("integrations", n_integration, 4);
    checks++; if (n_line == 0)      begin failures++; $display("FAIL no row transfer"); end
    checks++; if (n_pixel == 0)     begin failures++; $display("FAIL no pixel transfer"); end
    checks++; if (n_erase < 3)      begin failures++; $display("FAIL fast erase %0d times", n_erase); end
    checks++; if (n_vbin == 0)      begin failures++; $display("FAIL no vertical binning"); end
    checks++; if (n_hbin_hold == 0) begin failures++; $display("FAIL no horizontal binning"); end
    checks++; if (n_bus == 0)       begin failures++; $display("FAIL no bus write"); end
    $display("mechanisms: integration=%0d linetransfer=%0d pixeltransfer=%0d fasterase=%0d vbin=%0d hbin_hold=%0d bus=%0d",
             n_integration, n_line, n_pixel, n_erase, n_vbin, n_hbin_hold, n_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
