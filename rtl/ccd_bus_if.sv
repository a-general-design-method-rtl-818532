// ccd_bus_if -- 3-wire serial bus interface.
//
// Receives the run-time settings of the timing generator over a 3-wire
// serial bus (sck, sdata, sen_n), converts each serial word to parallel
// and stores its data field in the register selected by its address field.
//
// Protocol (this design's choice; only "3-wire, serial in, registers by
// address" is given by the published design):
//   * sen_n goes low to open a frame and high to close it;
//   * while sen_n is low, sdata is sampled on every rising edge of sck,
//     most significant bit first;
//   * a frame carries AW address bits followed by CW data bits
//     (4 + 12 = 16 bits by default); on the rising edge of sen_n the word is
//     written if exactly AW+CW bits were received, otherwise it is dropped.
// Register map:
//   0  SSTART  first row of the output window        (reset 0)
//   1  SSTOP   first row after the output window     (reset NL)
//   2  NVB     rows merged vertically                (reset 1)
//   3  NHB     pixels merged horizontally            (reset 1)
//   other addresses are ignored.
//
// Timing: the three bus lines are asynchronous to clk and pass through
// two-flop synchronisers; edges are detected in the clk domain, so sck high
// and low times must each exceed two clk periods. A register changes three
// clk cycles after the rising edge of sen_n.
module ccd_bus_if #(
  parameter int unsigned CW = 12,    // data field and register width
  parameter int unsigned AW = 4,     // address field width
  parameter int unsigned NL = 2049   // reset value of SSTOP
) (
  input  logic          clk,
  input  logic          rst,         // synchronous, active high
  input  logic          sck,
  input  logic          sdata,
  input  logic          sen_n,
  output logic [CW-1:0] sstart,
  output logic [CW-1:0] sstop,
  output logic [CW-1:0] nvb,
  output logic [CW-1:0] nhb
);

  localparam int unsigned WW = AW + CW;            // word width
  localparam int unsigned BW = $clog2(WW + 2);     // bit counter width

  typedef enum logic [AW-1:0] {
    A_SSTART = AW'(0),
    A_SSTOP  = AW'(1),
    A_NVB    = AW'(2),
    A_NHB    = AW'(3)
  } addr_t;

  logic [2:0]    sck_s, sen_s;
  logic [1:0]    sd_s;
  logic          sck_rise, frame_end, in_frame;
  logic [WW-1:0] sr;
  logic [BW-1:0] nbits;
  logic [AW-1:0] addr;
  logic [CW-1:0] data;

  assign sck_rise  = sck_s[1] & ~sck_s[2];
  assign frame_end = sen_s[1] & ~sen_s[2];
  assign in_frame  = ~sen_s[1];
  assign addr      = sr[WW-1 -: AW];
  assign data      = sr[CW-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      sck_s  <= '0;
      sen_s  <= '1;
      sd_s   <= '0;
      sr     <= '0;
      nbits  <= '0;
      sstart <= '0;
      sstop  <= CW'(NL);
      nvb    <= CW'(1);
      nhb    <= CW'(1);
    end else begin
      sck_s <= {sck_s[1:0], sck};
      sen_s <= {sen_s[1:0], sen_n};
      sd_s  <= {sd_s[0], sdata};

      if (in_frame && sck_rise) begin
        sr <= {sr[WW-2:0], sd_s[1]};
        if (nbits != BW'(WW + 1)) nbits <= nbits + BW'(1);
      end else if (!in_frame) begin
        nbits <= '0;
      end

      if (frame_end && nbits == BW'(WW)) begin
        unique case (addr)
          A_SSTART: sstart <= data;
          A_SSTOP:  sstop  <= data;
          A_NVB:    nvb    <= data;
          A_NHB:    nhb    <= data;
          default:  ;
        endcase
      end
    end
  end

endmodule
