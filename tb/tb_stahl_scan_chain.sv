// tb_stahl_scan_chain: end-to-end test of the STAHL scan chain at its default
// size (three cells) with the example combinational logic, an inverter per
// cell with 100 ps delay, at a 2 GHz clock (500 ps period, CK low in the
// first half of each cycle, rising edge in the middle).
//
// It runs the complete test procedure of the chain:
//   scan flush      flush bits shifted from si to so through the lower
//                   flip-flops while the upper flip-flops keep running
//                   functional cycles (each d[i] toggles every cycle);
//   load + standard capture
//                   pattern 111 shifted in, EN falls a half cycle before the
//                   edge, the response to the pattern (000) is captured and
//                   shifted out;
//   fast capture    EN falls 20 ps before the edge, less than the logic
//                   delay, so the response to the upper flip-flops' state is
//                   captured instead, then shifted out;
//   function mode   EN = 0 for many cycles with strikes injected into loop
//                   and mux nodes of random latches: nothing may change;
//                   then strikes on output nodes: the struck pin glitches
//                   while the strike lasts, and the cell recovers;
//   shift-mode strike
//                   a strike on a lower flip-flop loop during shifting flips
//                   that bit for good (the shift path is not hardened).
// A reference model keeps the upper and lower flip-flop of every cell and
// is updated on every rising edge from the value the logic presents then.
// Outputs q, s and so are checked before and after every edge. Each
// mechanism is counted and must occur at least once.
`timescale 1ps/1ps
module tb_stahl_scan_chain;
  import stahl_pkg::*;

  localparam int N      = 3;
  localparam int PERIOD = 500;
  localparam int TCOMB  = 100;
  // Flush bits of the procedure (values chosen here).
  localparam logic FA = 1'b1, FB = 1'b0, FC = 1'b1, FD = 1'b0, FE = 1'b1;

  typedef enum logic [1:0] {SHIFT, STD_CAP, FAST_CAP, FUNC} cyc_e;

  logic          ck, en, si, so;
  logic [N-1:0]  d, q, s;
  seu_t [N-1:0][1:0] seu;
  int checks = 0, failures = 0;

  stahl_scan_chain dut (.ck, .en, .si, .d, .seu, .q, .s, .so);
  comb_inverter_model #(.WIDTH(N), .DELAY_PS(TCOMB)) u_logic (.q(q), .d(d));

  // Reference state.
  logic [N-1:0] up, lo;

  // Mechanism counters.
  int n_flush_ok = 0, n_func_during_shift = 0, n_std_cap = 0, n_fast_cap = 0;
  int n_fast_differs = 0, n_mode_switch = 0, n_seu_masked = 0, n_seu_shift_upset = 0;
  int n_func_cycles = 0, n_out_glitch = 0;

  task automatic fail(input string what);
    failures++;
    $display("FAIL %s (t=%0t) q=%b s=%b up=%b lo=%b", what, $time, q, s, up, lo);
  endtask

  task automatic check_outputs(input string what);
    checks++;
    if (s !== lo || so !== lo[N-1] || q !== (en ? up : lo)) fail(what);
  endtask

  // One clock cycle. strike_cell < 0 means no strike.
  task automatic cycle(input cyc_e kind, input logic nsi,
                       input int strike_cell = -1, input int strike_latch = 0,
                       input seu_t strike = SEU_NONE);
    logic [N-1:0] dval;
    logic d1_before;
    ck = 0;
    en = (kind == STD_CAP || kind == FUNC) ? 1'b0 : 1'b1;
    #50;
    if (strike_cell >= 0) begin
      logic [N-1:0] glitch_q, glitch_s;
      // In function mode only a strike on an output node of STAHL-B shows
      // at the cell's pins: Q3 at q and so.
      glitch_s = '0;
      glitch_q = '0;
      // In shift mode STAHL-B is two plain latches (it holds while CK = 0),
      // so a strike on its loop FL1 shows at so and one on FL0 at q.
      if (strike_latch == 1) begin
        glitch_s[strike_cell] = strike.q1 | (en & strike.fl1);
        glitch_q[strike_cell] = en ? (strike.q0 | strike.fl0) : strike.q1;
      end
      seu[strike_cell][strike_latch] = strike;
      #30;
      checks++;
      if (q !== ((en ? up : lo) ^ glitch_q) || s !== (lo ^ glitch_s))
        fail("output moved during strike");
      seu = '0;
      if (strike.q0 || strike.q1) n_out_glitch += (glitch_q != '0 || glitch_s != '0) ? 1 : 0;
      else if (kind == FUNC) n_seu_masked++;
      else if (strike_latch == 1 && strike.fl1) begin
        lo[strike_cell] = ~lo[strike_cell];       // lower flip-flop upset
        n_seu_shift_upset++;
      end
      #10;
      checks++;
      if (s !== lo || q !== (en ? up : lo)) fail("after strike");
    end else begin
      #40;
    end
    si = nsi;
    #140;                                    // 20 ps before the rising edge
    check_outputs("before edge");
    if (kind == FAST_CAP) begin
      en = 0;
      #1;
      checks++;
      if (q !== lo) fail("Q did not switch to the shifted-in pattern");
      else n_mode_switch++;
      #19;
    end else begin
      #20;
    end
    if (kind == STD_CAP) begin
      checks++;
      if (q !== lo) fail("Q not on the pattern for standard capture");
      else n_mode_switch++;
    end
    // Value the logic presents at the edge.
    case (kind)
      SHIFT:    dval = ~up;
      STD_CAP:  dval = ~lo;
      FAST_CAP: dval = ~up;
      default:  dval = ~lo;
    endcase
    checks++;
    if (d !== dval) fail("combinational logic not at the expected value");
    if (kind == FAST_CAP && ~up != ~lo) n_fast_differs++;
    d1_before = d[1];
    ck = 1;
    if (kind == SHIFT) begin
      lo = {lo[N-2:0], si};
      up = dval;
    end else begin
      lo = dval;
      up = dval;
    end
    case (kind)
      STD_CAP:  n_std_cap++;
      FAST_CAP: n_fast_cap++;
      FUNC:     n_func_cycles++;
      default:  ;
    endcase
    #100;
    if (kind != FUNC) en = 1;
    #140;
    check_outputs("after edge");
    if (kind == SHIFT && d[1] != d1_before) n_func_during_shift++;
    #10;
  endtask

  logic [N-1:0] pat;

  initial begin
    #(PERIOD * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seu = '0;
    ck = 0; en = 0; si = 0;
    // Bring the chain to a known state: two function-mode cycles with the
    // logic settled, which makes both halves of every cell equal.
    #(PERIOD);
    ck = 1; #(PERIOD/2); ck = 0; #(PERIOD/2);
    ck = 1; #(PERIOD/2);
    lo = ~q; up = ~q;
    ck = 0; #(PERIOD/2);
    ck = 1; #(PERIOD/2);
    ck = 0;
    checks++;
    if (q !== up || s !== lo) fail("initialisation");

    // ---- Long scan flush: every bit must reach so N cycles later ----
    begin
      logic [15:0] flush;
      flush = 16'b1011_0010_1110_0001;
      for (int i = 0; i < 16 + N; i++) begin
        logic expect_so;
        expect_so = lo[N-1];
        cycle(SHIFT, (i < 16) ? flush[i] : 1'b0);
        if (i >= N && i - N < 16) begin
          checks++;
          if (expect_so !== flush[i - N]) fail("flush bit at so");
          else n_flush_ok++;
        end
      end
    end

    // ---- The published procedure, cycle for cycle ----
    // Flush bits Fa, Fb; pattern S3 S2 S1 = 1 1 1; standard capture (response
    // R3 R2 R1 = 0 0 0); four shift cycles carrying Fc, Fd and two zeros out
    // of si while R1..R3 leave at so; fast capture, which must capture
    // R'3 R'2 R'1 = 1 1 1 (the upper flip-flops hold 000 by then, having
    // toggled four times since the capture); shift out R'1..R'3 behind Fe.
    cycle(SHIFT, FA);
    cycle(SHIFT, FB);
    for (int i = 0; i < N; i++) cycle(SHIFT, 1'b1);     // S3, S2, S1
    checks++;
    if (lo !== '1) fail("pattern 111 not loaded");
    cycle(STD_CAP, 1'b0);
    checks++;
    if (lo !== '0 || up !== '0) fail("standard capture response is not 000");
    begin
      logic [3:0] tail;
      tail = {1'b0, 1'b0, FD, FC};
      for (int i = 0; i < 4; i++) begin
        if (i < N) begin
          checks++;
          if (so !== 1'b0) fail("response bit R at so");
        end
        cycle(SHIFT, tail[i]);
      end
    end
    checks++;
    if (up !== '0) fail("upper flip-flops not back at 000 before the fast capture");
    cycle(FAST_CAP, 1'b0);
    checks++;
    if (lo !== 3'b111) fail("fast capture did not give R' = 111");
    for (int i = 0; i < N; i++) begin
      checks++;
      if (so !== 1'b1) fail("fast capture bit R' at so");
      cycle(SHIFT, (i == 0) ? FE : 1'b0);
    end
    checks++;
    if (so !== FE) fail("Fe at so");

    // ---- Random patterns with both capture types ----
    repeat (20) begin
      pat = N'($urandom);
      for (int i = N-1; i >= 0; i--) cycle(SHIFT, pat[i]);
      checks++;
      if (lo !== pat) fail("random pattern load");
      cycle(($urandom % 2 == 1) ? STD_CAP : FAST_CAP, 1'b0);
    end

    // ---- Function mode with strikes on Type-1 nodes ----
    cycle(FUNC, 1'b0);
    repeat (80) begin
      seu_t st;
      st = SEU_NONE;
      case ($urandom % 4)
        0: st.fl0 = 1'b1;
        1: st.fl1 = 1'b1;
        2: st.n5  = 1'b1;
        default: st.n6 = 1'b1;
      endcase
      cycle(FUNC, 1'b0, int'($urandom % N), int'($urandom % 2), st);
    end

    // ---- Function mode with strikes on the output nodes: the struck pin
    //      glitches while the strike lasts and the cell recovers ----
    repeat (20) begin
      seu_t st;
      st = SEU_NONE;
      if ($urandom % 2 == 1) st.q1 = 1'b1; else st.q0 = 1'b1;
      cycle(FUNC, 1'b0, int'($urandom % N), int'($urandom % 2), st);
    end

    // ---- Shift mode: a strike on a lower loop upsets the bit ----
    cycle(SHIFT, 1'b1);
    for (int c = 0; c < N; c++) cycle(SHIFT, 1'b0, c, 1, '{fl1: 1'b1, default: 1'b0});
    for (int i = 0; i < N + 1; i++) cycle(SHIFT, 1'b0);

    // ---- Every mechanism must have happened ----
    $display("flush bits seen %0d, functional toggles during shift %0d", n_flush_ok, n_func_during_shift);
    $display("standard captures %0d, fast captures %0d (differing from standard %0d)",
             n_std_cap, n_fast_cap, n_fast_differs);
    $display("mode switches %0d, function cycles %0d, strikes masked %0d, shift-mode upsets %0d",
             n_mode_switch, n_func_cycles, n_seu_masked, n_seu_shift_upset);
    $display("output-node glitches recovered %0d", n_out_glitch);
    checks++; if (n_flush_ok == 0)          fail("no scan flush");
    checks++; if (n_func_during_shift == 0) fail("no functional cycle during shift");
    checks++; if (n_std_cap == 0)           fail("no standard capture");
    checks++; if (n_fast_cap == 0)          fail("no fast capture");
    checks++; if (n_fast_differs == 0)      fail("no fast capture that differs from a standard one");
    checks++; if (n_mode_switch == 0)       fail("no mode switch");
    checks++; if (n_func_cycles == 0)       fail("no function-mode cycle");
    checks++; if (n_seu_masked == 0)        fail("no masked strike");
    checks++; if (n_seu_shift_upset == 0)   fail("no shift-mode upset");
    checks++; if (n_out_glitch == 0)        fail("no output-node glitch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
