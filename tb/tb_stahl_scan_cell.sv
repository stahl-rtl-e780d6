// tb_stahl_scan_cell: self-checking test of one STAHL scan cell.
// A reference model keeps the upper flip-flop (D -> Q2) and the lower one
// (SI/D -> Q3) and is updated on every rising CK edge:
//   EN = 1: upper <= D, lower <= SI      Q = upper, SO = lower
//   EN = 0: upper <= D, lower <= D       Q = lower, SO = lower
// Random D, SI and EN are applied away from the clock edges for many cycles,
// with Q and SO checked before every edge (so the edge timing is checked as
// well: nothing may change between edges except through the output mux).
// Then strikes are injected into every loop of both latches in function mode
// during each clock phase, and the stored value must survive.
`timescale 1ps/1ps
module tb_stahl_scan_cell;
  import stahl_pkg::*;

  localparam int PERIOD = 500;     // 2 GHz

  logic ck, ckb, en, enb, d, si, q, so;
  seu_t seu_a, seu_b;
  int checks = 0, failures = 0;

  assign ckb = ~ck;
  assign enb = ~en;

  stahl_scan_cell dut (.ck, .ckb, .en, .enb, .d, .si, .seu_a, .seu_b, .q, .so);

  logic r_up, r_lo;

  task automatic check(input logic eq, input logic eso, input string what);
    checks++;
    if (q !== eq || so !== eso) begin
      failures++;
      $display("FAIL %s: q=%0b so=%0b expected %0b %0b (t=%0t)", what, q, so, eq, eso, $time);
    end
  endtask

  // One clock cycle: CK low for the first half, rising edge in the middle.
  task automatic cycle(input logic nen, input logic nd, input logic nsi);
    ck = 0;
    #(PERIOD/4);
    en = nen; d = nd; si = nsi;
    #(PERIOD/4 - 10);
    check(en ? r_up : r_lo, r_lo, "before edge");
    #10;
    ck = 1;
    r_lo = en ? si : d;
    r_up = d;
    #(PERIOD/2 - 10);
    check(en ? r_up : r_lo, r_lo, "after edge");
    #10;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seu_a = SEU_NONE; seu_b = SEU_NONE;
    ck = 0; en = 0; d = 0; si = 0;
    #(PERIOD/2);
    ck = 1;                        // load 0 into the cell
    #(PERIOD/2);
    r_up = 0; r_lo = 0;
    check(0, 0, "init");

    // Directed: function mode flip-flop, then scan mode independence.
    cycle(0, 1, 0); check(1, 1, "func captures 1");
    cycle(0, 0, 1); check(0, 0, "func captures 0");
    cycle(1, 1, 0); check(1, 0, "scan: upper takes D, lower takes SI");
    cycle(1, 0, 1); check(0, 1, "scan: independent halves");
    en = 0; #10;    check(1, 1, "EN falls: Q shows the lower flip-flop");
    en = 1; #10;

    repeat (3000) cycle(1'($urandom), 1'($urandom), 1'($urandom));

    // Strikes in function mode, in both clock phases, on every node kind.
    for (int k = 0; k < 12; k++) begin
      seu_t s;
      logic v;
      v = k[0];
      cycle(0, v, ~v);
      s = SEU_NONE;
      case (k % 3)
        0: s.fl0 = 1'b1;
        1: s.fl1 = 1'b1;
        default: s.n5 = 1'b1;
      endcase
      // phase CK = 1: master latching; phase CK = 0: slave latching
      for (int ph = 0; ph < 2; ph++) begin
        ck = ph[0] ? 1'b0 : 1'b1;
        #20;
        if (k >= 6) seu_b = s; else seu_a = s;
        #20;
        check(v, v, "function-mode strike, during");
        seu_a = SEU_NONE; seu_b = SEU_NONE;
        #20;
        check(v, v, "function-mode strike, after");
      end
      ck = 1; #20;
      cycle(0, v, ~v);
      check(v, v, "value kept after strikes");
      // Switch to scan mode without a clock: both halves must still hold v.
      en = 1; #10; check(v, v, "both halves intact");
      en = 0; #10;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
