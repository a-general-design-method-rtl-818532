// tb_ccd_sgen -- self-checking testbench of the image timing generator.
//
// Drives random and swept counter values and activity flags into two
// instances (default ranges, and HD [2,5), VD [1,3), CLPOB [4,12)) and
// checks one clock later that HD, VD and CLPOB are high exactly when their
// counter is inside the range and the qualifying flag is set.
module tb_ccd_sgen;

  localparam int CW = 12;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic [CW-1:0] vcount = '0, hcount = '0;
  logic          fa = 1'b0, la = 1'b0;
  logic          hd0, vd0, cp0, hd1, vd1, cp1;

  int checks = 0, failures = 0;

  ccd_sgen #(.CW(CW)) dut0 (.clk, .rst, .vcount, .hcount, .frame_active(fa), .line_active(la),
                            .hd(hd0), .vd(vd0), .clpob(cp0));
  ccd_sgen #(.CW(CW), .HD_START(2), .HD_STOP(5), .VD_START(1), .VD_STOP(3),
             .CLPOB_START(4), .CLPOB_STOP(12))
           dut1 (.clk, .rst, .vcount, .hcount, .frame_active(fa), .line_active(la),
                 .hd(hd1), .vd(vd1), .clpob(cp1));

  always #5 clk = ~clk;

  task automatic apply(int v, int h, logic f, logic l);
    logic e_hd0, e_vd0, e_cp0, e_hd1, e_vd1, e_cp1;
    @(negedge clk);
    vcount = CW'(v); hcount = CW'(h); fa = f; la = l;
    e_hd0 = l && h == 0;
    e_cp0 = l && h < 8;
    e_vd0 = f && v == 0;
    e_hd1 = l && h >= 2 && h < 5;
    e_cp1 = l && h >= 4 && h < 12;
    e_vd1 = f && v >= 1 && v < 3;
    @(posedge clk); #1;
    checks++;
    if ({hd0, vd0, cp0, hd1, vd1, cp1} !== {e_hd0, e_vd0, e_cp0, e_hd1, e_vd1, e_cp1}) begin
      failures++;
      $display("FAIL v=%0d h=%0d f=%b l=%b got %b exp %b", v, h, f, l,
               {hd0, vd0, cp0, hd1, vd1, cp1}, {e_hd0, e_vd0, e_cp0, e_hd1, e_vd1, e_cp1});
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int h = 0; h < 20; h++) apply(0, h, 1'b1, 1'b1);
    for (int v = 0; v < 6; v++)
      for (int h = 0; h < 14; h++) apply(v, h, 1'b1, (h % 3) != 0);
    for (int v = 0; v < 6; v++) apply(v, 0, 1'b0, 1'b0);
    repeat (2000) apply(int'($urandom_range(0, 15)), int'($urandom_range(0, 20)),
                        1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
    apply(4095, 4095, 1'b1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
