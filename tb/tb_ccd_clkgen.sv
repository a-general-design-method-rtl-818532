// tb_ccd_clkgen -- self-checking testbench of the master clock generator.
//
// Two instances, at the default division (120) and at a small odd one (5),
// run for many periods. The bench checks that ce_line is a single-cycle
// pulse exactly every LINE_DIV clocks, first LINE_DIV clocks after reset,
// and that clk6line has period LINE_DIV with LINE_DIV/2 high cycles.
module tb_ccd_clkgen;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic ce_a, ck_a, ce_b, ck_b;

  int checks = 0, failures = 0;

  ccd_clkgen                dut_a (.clk, .rst, .ce_line(ce_a), .clk6line(ck_a));
  ccd_clkgen #(.LINE_DIV(5)) dut_b (.clk, .rst, .ce_line(ce_b), .clk6line(ck_b));

  always #5 clk = ~clk;

  // counts of clocks since reset release, last pulse, etc.
  int cyc;
  int a_last, b_last, a_pulses, b_pulses, a_high, b_high;

  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0; a_last <= 0; b_last <= 0; a_pulses <= 0; b_pulses <= 0; a_high <= 0; b_high <= 0;
    end else begin
      cyc <= cyc + 1;
      if (ce_a) begin
        checks++;
        if (cyc + 1 - a_last != 120) begin failures++; $display("FAIL A period %0d", cyc + 1 - a_last); end
        a_last <= cyc + 1;
        a_pulses <= a_pulses + 1;
      end
      if (ce_b) begin
        checks++;
        if (cyc + 1 - b_last != 5) begin failures++; $display("FAIL B period %0d", cyc + 1 - b_last); end
        b_last <= cyc + 1;
        b_pulses <= b_pulses + 1;
      end
      // skip the first period (square wave starts low out of reset)
      if (cyc >= 120 && ck_a) a_high <= a_high + 1;
      if (cyc >= 5 && ck_b) b_high <= b_high + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (120 * 50) @(posedge clk);
    #1;
    checks++;
    if (a_pulses != 50) begin failures++; $display("FAIL A pulses %0d", a_pulses); end
    checks++;
    if (b_pulses != 1200) begin failures++; $display("FAIL B pulses %0d", b_pulses); end
    checks++;
    if (a_high != 49 * 60) begin failures++; $display("FAIL A high cycles %0d", a_high); end
    checks++;
    if (b_high != 1199 * 2) begin failures++; $display("FAIL B high cycles %0d", b_high); end
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
