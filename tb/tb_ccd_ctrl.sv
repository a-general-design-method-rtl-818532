// tb_ccd_ctrl -- self-checking testbench of the control module.
//
// The testbench stands in for the two waveform generators: while the
// control module asks for row transfer (V_GoLineTransfer) it produces a V3
// falling edge every 6*K clocks, finishing a started row; while it asks for
// pixel transfer (H_GoPixTransfer) it produces an H3 falling edge every 12
// clocks. For several settings (full frame, vertical binning by 2 and by 4,
// window output with erase before and after the window, window from row 0)
// the sequence of states visited and the VCOUNTER value on every entry to
// PIXELTRANSFER are compared with sequences worked out by hand from the
// transition table. The Go-signals are checked against the output table in
// every cycle, and HCOUNTER must equal NP when a row readout ends.
module tb_ccd_ctrl;
  import ccd_tg_pkg::*;

  localparam int CW = 12;
  localparam int NP = 4;
  localparam int NL = 6;
  localparam int K  = 3;     // clocks per vertical segment

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          trg = 1'b0, sub = 1'b0;
  logic [CW-1:0] sstart = '0, sstop = CW'(NL), nvb = CW'(1);
  logic          v3 = 1'b0, h3 = 1'b0;
  h_go_t         h_go;
  v_go_t         v_go;
  logic [CW-1:0] vcount, hcount, bcount;
  ctrl_state_t   state;

  int checks = 0, failures = 0;

  ccd_ctrl #(.CW(CW), .NP(NP), .NL(NL)) dut (
    .clk, .rst, .trg, .sub, .sstart, .sstop, .nvb, .v3, .h3,
    .h_go, .v_go, .vcount, .hcount, .bcount, .state);

  always #5 clk = ~clk;

  // ---- stand-in waveform generators ----
  int vphase = 0, hphase = 0;
  always @(posedge clk) begin
    // vertical: a row is 6*K clocks, V3 high in the middle, falls at 5*K
    if (vphase != 0 || v_go.line_transfer) begin
      vphase <= (vphase == 6 * K - 1) ? 0 : vphase + 1;
      v3 <= (vphase >= 2 * K && vphase < 5 * K);
    end else v3 <= 1'b0;
    // horizontal: a pixel is 12 clocks, H3 high in segments 3..8
    if (hphase != 0 || h_go.pix_transfer) begin
      hphase <= (hphase == 11) ? 0 : hphase + 1;
      h3 <= (hphase >= 2 && hphase < 8);
    end else h3 <= 1'b0;
  end

  // ---- Go-signal table (IDLE, INTEGRATION, LINE, PIXEL, ERASE) ----
  // columns: H_Line H_Pix V_Idle V_Line V_Pix
  logic [4:0] go_tab [5] = '{5'b01100, 5'b01001, 5'b10010, 5'b01001, 5'b01010};
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if ({h_go.line_transfer, h_go.pix_transfer, v_go.idle, v_go.line_transfer, v_go.pix_transfer}
          !== go_tab[int'(state)]) begin
        failures++;
        $display("FAIL go-signals in state %s", state.name());
      end
    end
  end

  // ---- state trace ----
  ctrl_state_t seen[$];
  int          seen_v[$];
  ctrl_state_t prev;
  always @(posedge clk) begin
    #2;
    if (!rst && state != prev) begin
      seen.push_back(state);
      seen_v.push_back(state == PIXELTRANSFER ? int'(vcount) : -1);
      if (prev == PIXELTRANSFER) begin
        checks++;
        if (int'(hcount) != NP) begin failures++; $display("FAIL hcount %0d at row end", hcount); end
      end
    end
    prev = state;
  end

  task automatic frame(logic s, int b, int st, int sp, ctrl_state_t exp_s[], int exp_v[], string name);
    sub = s; nvb = CW'(b); sstart = CW'(st); sstop = CW'(sp);
    seen.delete(); seen_v.delete();
    @(negedge clk); trg = 1'b1;
    repeat (20) @(negedge clk);
    trg = 1'b0;
    // wait for the return to IDLE
    do @(posedge clk); while (state != IDLE);
    repeat (80) @(posedge clk);
    checks++;
    if (seen.size() != exp_s.size()) begin
      failures++;
      $display("FAIL %s: %0d state changes, expected %0d", name, seen.size(), exp_s.size());
    end else begin
      foreach (exp_s[i]) begin
        checks++;
        if (seen[i] != exp_s[i] || (exp_v[i] >= 0 && seen_v[i] != exp_v[i])) begin
          failures++;
          $display("FAIL %s step %0d: %s v=%0d, expected %s v=%0d", name, i,
                   seen[i].name(), seen_v[i], exp_s[i].name(), exp_v[i]);
        end
      end
    end
  endtask

  localparam ctrl_state_t I = IDLE, G = INTEGRATION, L = LINETRANSFER,
                          P = PIXELTRANSFER, E = FASTERASE;

  initial begin
    prev = IDLE;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (state != IDLE) begin failures++; $display("FAIL not idle after reset"); end

    // full frame, one row per readout
    frame(0, 1, 0, NL, '{G, L, P, L, P, L, P, L, P, L, P, L, P, I},
                       '{-1, -1, 1, -1, 2, -1, 3, -1, 4, -1, 5, -1, 6, -1}, "full");
    // vertical binning by 2
    frame(0, 2, 0, NL, '{G, L, P, L, P, L, P, I},
                       '{-1, -1, 2, -1, 4, -1, 6, -1}, "bin2");
    // vertical binning by 4: the second group runs past NL
    frame(0, 4, 0, NL, '{G, L, P, L, P, I},
                       '{-1, -1, 4, -1, 8, -1}, "bin4");
    // window rows 2..3: erase 2, read 2, erase the rest
    frame(1, 1, 2, 4, '{G, E, L, P, L, P, E, I},
                      '{-1, -1, -1, 3, -1, 4, -1, -1}, "window");
    // window from row 0 to the end
    frame(1, 1, 0, NL, '{G, E, L, P, L, P, L, P, L, P, L, P, L, P, I},
                       '{-1, -1, -1, 1, -1, 2, -1, 3, -1, 4, -1, 5, -1, 6, -1}, "window0");
    // NVB = 0 behaves as 1
    frame(0, 0, 0, NL, '{G, L, P, L, P, L, P, L, P, L, P, L, P, I},
                       '{-1, -1, 1, -1, 2, -1, 3, -1, 4, -1, 5, -1, 6, -1}, "nvb0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
