// tb_ccd_vgen -- self-checking testbench of the row-transfer generator.
//
// The clock enable ce is pulsed every CE_DIV clocks. A reference model of
// the published vertical state diagram predicts VOUT after every enable;
// between enables VOUT must not move. Covered: idle (SS), integration
// (S0), single and back-to-back row transfers (vertical binning), return
// to idle from S0 and from S6, and random Go-signal sequences. The period
// of V3 falling edges during continuous transfer must be 6 enables.
module tb_ccd_vgen;
  import ccd_tg_pkg::*;

  localparam int CE_DIV = 5;

  logic    clk = 1'b0;
  logic    rst = 1'b1;
  logic    ce  = 1'b0;
  v_go_t   go;
  vout_t   vout;
  vstate_t state;

  int checks = 0, failures = 0;

  ccd_vgen dut (.clk, .rst, .ce, .go, .vout, .state);

  always #5 clk = ~clk;

  // {V1,V2,V3,V4} for SS, S0, S1..S6 (index 0 = SS, 1 = S0, 2..7 = S1..S6)
  logic [3:0] ref_word [8] = '{4'b0000, 4'b1100, 4'b1100, 4'b0100,
                               4'b0111, 4'b0011, 4'b1011, 4'b1000};
  int m;   // model state index

  function automatic int model_next(int s, v_go_t g);
    if (s == 0)      return g.idle ? 0 : g.line_transfer ? 2 : g.pix_transfer ? 1 : 0;
    else if (s == 1) return g.idle ? 0 : g.line_transfer ? 2 : 1;
    else if (s == 7) return g.idle ? 0 : g.line_transfer ? 2 : 1;
    else             return s + 1;
  endfunction

  int   cyc = 0, last_fall = -1, v3_falls = 0;
  logic v3_q = 1'b0;
  bit   measure = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    v3_q <= vout[VB_V3];
    if (!rst && v3_q && !vout[VB_V3]) begin
      v3_falls++;
      if (measure && last_fall >= 0) begin
        checks++;
        if (cyc - last_fall != 6 * CE_DIV) begin
          failures++;
          $display("FAIL V3 period %0d", cyc - last_fall);
        end
      end
      last_fall <= cyc;
    end
  end

  // n enable periods with the given Go-signals
  task automatic steps(v_go_t g, int n);
    go = g;
    repeat (n) begin
      repeat (CE_DIV - 1) begin
        @(negedge clk); ce = 1'b0;
        @(posedge clk); #1;
        checks++;
        if (vout !== ref_word[m]) begin
          failures++; $display("FAIL hold t=%0t vout=%b exp=%b", $time, vout, ref_word[m]);
        end
      end
      @(negedge clk); ce = 1'b1;
      m = model_next(m, go);
      @(posedge clk); #1;
      ce = 1'b0;
      checks++;
      if (vout !== ref_word[m]) begin
        failures++; $display("FAIL step t=%0t vout=%b exp=%b (model %0d)", $time, vout, ref_word[m], m);
      end
    end
  endtask

  localparam v_go_t G_IDLE = '{idle: 1'b1, line_transfer: 1'b0, pix_transfer: 1'b0};
  localparam v_go_t G_LINE = '{idle: 1'b0, line_transfer: 1'b1, pix_transfer: 1'b0};
  localparam v_go_t G_PIX  = '{idle: 1'b0, line_transfer: 1'b0, pix_transfer: 1'b1};

  initial begin
    go = G_IDLE; m = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (vout !== 4'b0000 || state != VSS) begin failures++; $display("FAIL reset"); end

    steps(G_IDLE, 3);
    steps(G_PIX, 4);                 // integration: S0
    checks++;
    if (state != VS0) begin failures++; $display("FAIL not in S0"); end
    steps(G_LINE, 1);                // start a row transfer
    steps(G_PIX, 5);                 // finish it and return to S0
    steps(G_PIX, 3);
    checks++;
    if (state != VS0 || v3_falls != 1) begin failures++; $display("FAIL single row: falls=%0d", v3_falls); end
    measure = 1; last_fall = -1;
    steps(G_LINE, 6 * 4);            // four rows back to back
    measure = 0;
    @(posedge clk); #1;
    checks++;
    if (v3_falls != 5) begin failures++; $display("FAIL binning rows: falls=%0d", v3_falls); end
    steps(G_IDLE, 8);                // from S6 to SS
    checks++;
    if (state != VSS) begin failures++; $display("FAIL not idle"); end
    steps(G_LINE, 3);                // SS -> S1 directly
    steps(G_LINE, 3);
    steps(G_IDLE, 2);

    repeat (300) begin
      int pick;
      pick = int'($urandom_range(0, 2));
      case (pick)
        0: steps(G_IDLE, int'($urandom_range(1, 4)));
        1: steps(G_LINE, int'($urandom_range(1, 9)));
        default: steps(G_PIX, int'($urandom_range(1, 4)));
      endcase
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
