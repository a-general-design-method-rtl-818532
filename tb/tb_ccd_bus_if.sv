// tb_ccd_bus_if -- self-checking testbench of the 3-wire bus interface.
//
// A bus master task shifts 16-bit frames (4 address bits, 12 data bits,
// MSB first, sdata changed while sck is low, sen_n low for the frame) at a
// bus clock well below the system clock. The bench checks the reset values
// of the four registers, writes to each address, that a frame of the wrong
// length and a frame to an unused address leave all registers alone, and
// random write sequences against a register-file model.
module tb_ccd_bus_if;

  localparam int CW = 12;
  localparam int NL = 2049;
  localparam int HALF = 4;   // system clocks per half bus period

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          sck = 1'b0, sdata = 1'b0, sen_n = 1'b1;
  logic [CW-1:0] sstart, sstop, nvb, nhb;

  int checks = 0, failures = 0;
  logic [CW-1:0] model [4];

  ccd_bus_if #(.CW(CW), .NL(NL)) dut (.clk, .rst, .sck, .sdata, .sen_n, .sstart, .sstop, .nvb, .nhb);

  always #5 clk = ~clk;

  task automatic send(logic [15:0] word, int nbits);
    sen_n = 1'b0;
    repeat (HALF) @(posedge clk);
    for (int i = nbits - 1; i >= 0; i--) begin
      sdata = word[i];
      repeat (HALF) @(posedge clk);
      sck = 1'b1;
      repeat (HALF) @(posedge clk);
      sck = 1'b0;
    end
    repeat (HALF) @(posedge clk);
    sen_n = 1'b1;
    repeat (4 * HALF) @(posedge clk);
  endtask

  task automatic write(int addr, int data);
    send({4'(addr), 12'(data)}, 16);
    if (addr < 4) model[addr] = 12'(data);
  endtask

  task automatic check(string what);
    checks++;
    if ({sstart, sstop, nvb, nhb} !== {model[0], model[1], model[2], model[3]}) begin
      failures++;
      $display("FAIL %s: regs %0d %0d %0d %0d, exp %0d %0d %0d %0d", what,
               sstart, sstop, nvb, nhb, model[0], model[1], model[2], model[3]);
    end
  endtask

  initial begin
    model = '{12'd0, 12'(NL), 12'd1, 12'd1};
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (4) @(posedge clk);
    check("reset");
    write(0, 100);  check("sstart");
    write(1, 1900); check("sstop");
    write(2, 4);    check("nvb");
    write(3, 2);    check("nhb");
    write(7, 55);   check("unused address");
    send(16'h0ABC, 15); check("short frame");
    send(16'h0ABC, 17); check("long frame");
    write(0, 4095); check("all ones");
    write(0, 0);    check("zero");
    repeat (60) begin
      write(int'($urandom_range(0, 5)), int'($urandom_range(0, 4095)));
      check("random");
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
