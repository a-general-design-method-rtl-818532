// tb_ccd_hgen -- self-checking testbench of the pixel-clock generator.
//
// A reference model written from the segment table predicts HOUT every
// clock: the 12-segment pixel sequence, the S0 parking word during line
// transfer, and SG held high in all but every NHB-th pixel. The bench runs
// pixel transfer, line transfer (park in S0) and binning with NHB = 1, 3
// and 0, and checks the pixel period (12 clocks between H3 falling edges)
// and the number of SG dumps per run of pixels.
module tb_ccd_hgen;
  import ccd_tg_pkg::*;

  localparam int CW = 12;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  h_go_t         go;
  logic [CW-1:0] nhb;
  hout_t         hout;
  hstate_t       state;

  int checks = 0, failures = 0;

  ccd_hgen #(.CW(CW)) dut (.clk, .rst, .go, .nhb, .hout, .state);

  always #5 clk = ~clk;

  // reference words, written out from the segment table: index 0 = S0
  // columns: H2 H1 H3 SG RG SHP SHD CLKADC
  logic [7:0] ref_word [13] = '{
    8'b11000000, 8'b01000001, 8'b01000001, 8'b01111001, 8'b01111001,
    8'b00110001, 8'b00110101, 8'b10110100, 8'b10110000, 8'b10000000,
    8'b10000000, 8'b11000010, 8'b11000010 };

  int   m_seg;        // model segment 0..12
  int   m_bin;        // model binning count
  int   nhb_i;
  logic [7:0] m_out;

  // model of the next clock, evaluated before each rising edge
  task automatic model_step();
    int nseg;
    nhb_i = (nhb == 0) ? 1 : int'(nhb);
    if (m_seg == 0 || m_seg == 12) nseg = go.pix_transfer ? 1 : 0;
    else                           nseg = m_seg + 1;
    if (nseg == 0) m_bin = 0;
    else if (m_seg == 8) m_bin = (m_bin + 1) % nhb_i;
    m_seg = nseg;
    m_out = ref_word[m_seg];
    if (m_bin != 0) m_out[4] = 1'b1;
  endtask

  // measurement
  int   last_h3_fall, sg_falls, h3_falls, cyc;
  logic h3_q, sg_q;
  bit   measure_period;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      h3_q <= hout[HB_H3];
      sg_q <= hout[HB_SG];
      if (h3_q && !hout[HB_H3]) begin
        if (measure_period && last_h3_fall >= 0) begin
          checks++;
          if (cyc - last_h3_fall != 12) begin
            failures++;
            $display("FAIL: pixel period %0d clocks", cyc - last_h3_fall);
          end
        end
        last_h3_fall <= cyc;
        h3_falls++;
      end
      if (sg_q && !hout[HB_SG]) sg_falls++;
    end
  end

  task automatic run(int n);
    repeat (n) begin
      @(negedge clk);
      model_step();
      @(posedge clk); #1;
      checks++;
      if (hout !== m_out) begin
        failures++;
        $display("FAIL t=%0t seg=%0d hout=%b exp=%b", $time, m_seg, hout, m_out);
      end
    end
  endtask

  initial begin
    cyc = 0; last_h3_fall = -1; sg_falls = 0; h3_falls = 0; measure_period = 0;
    h3_q = 0; sg_q = 0;
    go = '{line_transfer: 1'b0, pix_transfer: 1'b0};
    nhb = 1;
    m_seg = 0; m_bin = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (hout !== ref_word[0]) begin failures++; $display("FAIL reset word %b", hout); end

    // parked: stays in S0
    run(20);
    // continuous pixel transfer, no binning
    go = '{line_transfer: 1'b0, pix_transfer: 1'b1};
    measure_period = 1;
    run(12 * 10);
    // line transfer: finish the pixel, then park
    go = '{line_transfer: 1'b1, pix_transfer: 1'b0};
    measure_period = 0; last_h3_fall = -1;
    run(40);
    checks++;
    if (state != HS0) begin failures++; $display("FAIL not parked in S0"); end

    // binning by 3: 9 pixels -> 3 SG dumps
    nhb = 3;
    sg_falls = 0; h3_falls = 0;
    go = '{line_transfer: 1'b0, pix_transfer: 1'b1};
    run(12 * 9 - 1);
    go = '{line_transfer: 1'b1, pix_transfer: 1'b0};
    run(30);
    checks++;
    if (h3_falls != 9 || sg_falls != 3) begin
      failures++;
      $display("FAIL binning: %0d pixels, %0d SG dumps (exp 9, 3)", h3_falls, sg_falls);
    end

    // NHB = 0 behaves as 1
    nhb = 0;
    sg_falls = 0; h3_falls = 0;
    go = '{line_transfer: 1'b0, pix_transfer: 1'b1};
    run(12 * 5 - 1);
    go = '{line_transfer: 1'b1, pix_transfer: 1'b0};
    run(30);
    checks++;
    if (h3_falls != 5 || sg_falls != 5) begin
      failures++;
      $display("FAIL nhb=0: %0d pixels, %0d SG dumps (exp 5, 5)", h3_falls, sg_falls);
    end

    // random Go-signals
    nhb = 2;
    repeat (200) begin
      go = '{line_transfer: 1'b0, pix_transfer: 1'($urandom_range(0, 1))};
      go.line_transfer = ~go.pix_transfer;
      run(int'($urandom_range(1, 20)));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
