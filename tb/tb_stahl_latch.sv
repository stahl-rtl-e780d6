// tb_stahl_latch: self-checking test of one STAHL latch.
//   1. random operation in both modes against a reference model that keeps
//      the two loop values and the two C-element states;
//   2. function mode: strikes on each loop, on N5/N6 and on Q0/Q1 during the
//      latching phase, checking that the outputs never change (loops, muxes)
//      or glitch only while the strike lasts (outputs), and that the struck
//      loop is restored (seen by switching to shift mode afterwards);
//   3. shift mode: a strike on a loop upsets that latch for good and leaves
//      the other one alone;
//   4. function mode with D0 != D1: the C-elements refuse and hold.
`timescale 1ps/1ps
module tb_stahl_latch;
  import stahl_pkg::*;

  logic ck, ckb, en, enb, d0, d1, q0, q1;
  seu_t seu;
  int checks = 0, failures = 0;

  assign ckb = ~ck;
  assign enb = ~en;

  stahl_latch dut (.ck, .ckb, .en, .enb, .d0, .d1, .seu, .q0, .q1);

  // Reference model.
  logic r_l0, r_l1, r_c0, r_c1;

  task automatic ref_eval();
    logic a0, b0, a1, b1;
    if (!ck) begin
      r_l0 = d0;
      r_l1 = d1;
    end
    a0 = ~r_l0;
    b0 = en ? ~r_l0 : ~r_l1;
    a1 = en ? ~r_l1 : ~r_l0;
    b1 = ~r_l1;
    if (a0 == b0) r_c0 = ~a0;
    if (a1 == b1) r_c1 = ~b1;
  endtask

  task automatic expect2(input logic e0, input logic e1, input string what);
    checks++;
    if (q0 !== e0 || q1 !== e1) begin
      failures++;
      $display("FAIL %s: q0=%0b q1=%0b expected %0b %0b (t=%0t)", what, q0, q1, e0, e1, $time);
    end
  endtask

  // Apply one set of inputs, let it settle, update and check the reference.
  task automatic drive(input logic nck, input logic nen, input logic nd0, input logic nd1);
    ck = nck; en = nen; d0 = nd0; d1 = nd1;
    #10;
    ref_eval();
    expect2(r_c0, r_c1, "reference");
  endtask

  task automatic strike(input seu_t s);
    seu = s;
    #10;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seu = SEU_NONE;
    // Initialise both loops and both C-elements: transparent, equal data.
    ck = 0; en = 0; d0 = 0; d1 = 0;
    #10;
    r_l0 = 0; r_l1 = 0; r_c0 = 0; r_c1 = 0;
    expect2(1'b0, 1'b0, "init");

    // ---- 1. Function mode: transparent, then latching ----
    drive(0, 0, 1, 1); expect2(1, 1, "func transparent 1");
    drive(1, 0, 1, 1);
    drive(1, 0, 0, 0); expect2(1, 1, "func hold against new D");
    drive(0, 0, 0, 0); expect2(0, 0, "func transparent 0");
    // ---- Shift mode: two independent latches ----
    drive(0, 1, 1, 0); expect2(1, 0, "shift D0=1 D1=0");
    drive(0, 1, 0, 1); expect2(0, 1, "shift D0=0 D1=1");
    drive(1, 1, 0, 1);
    drive(1, 1, 1, 0); expect2(0, 1, "shift hold");
    // Random operation in both modes (function mode keeps D0 == D1).
    repeat (2000) begin
      logic m, a, b;
      m = 1'($urandom);
      a = 1'($urandom);
      b = m ? 1'($urandom) : a;
      drive(1'($urandom), m, a, b);
    end

    // ---- 2. Function mode strikes while latching ----
    for (int v = 0; v < 2; v++) begin
      drive(0, 0, v[0], v[0]);
      drive(1, 0, v[0], v[0]);
      drive(1, 0, ~v[0], ~v[0]);            // input changes while latched
      // loop FL0
      strike('{fl0: 1'b1, default: 1'b0}); expect2(v[0], v[0], "func FL0 strike, during");
      strike(SEU_NONE);                     expect2(v[0], v[0], "func FL0 strike, after");
      // loop FL1
      strike('{fl1: 1'b1, default: 1'b0}); expect2(v[0], v[0], "func FL1 strike, during");
      strike(SEU_NONE);                     expect2(v[0], v[0], "func FL1 strike, after");
      // mux outputs
      strike('{n5: 1'b1, default: 1'b0});  expect2(v[0], v[0], "func N5 strike");
      strike('{n6: 1'b1, default: 1'b0});  expect2(v[0], v[0], "func N6 strike");
      strike(SEU_NONE);                     expect2(v[0], v[0], "func N5/N6 after");
      // outputs: glitch while struck, restored afterwards
      strike('{q0: 1'b1, default: 1'b0});  expect2(~v[0], v[0], "func Q0 strike, glitch");
      strike(SEU_NONE);                     expect2(v[0], v[0], "func Q0 strike, restored");
      strike('{q1: 1'b1, default: 1'b0});  expect2(v[0], ~v[0], "func Q1 strike, glitch");
      strike(SEU_NONE);                     expect2(v[0], v[0], "func Q1 strike, restored");
      // Both loops still hold the value: switch to shift mode while latching.
      en = 1; #10; expect2(v[0], v[0], "loops restored (seen in shift mode)");
      en = 0; #10;
    end

    // ---- 3. Shift mode strikes while latching: plain latch behaviour ----
    drive(0, 1, 1, 0);
    drive(1, 1, 1, 0);
    strike('{fl0: 1'b1, default: 1'b0}); expect2(0, 0, "shift FL0 strike, during");
    strike(SEU_NONE);                     expect2(0, 0, "shift FL0 strike, upset stays");
    strike('{fl1: 1'b1, default: 1'b0}); expect2(0, 1, "shift FL1 strike, during");
    strike(SEU_NONE);                     expect2(0, 1, "shift FL1 strike, upset stays");
    strike('{n5: 1'b1, default: 1'b0});  expect2(0, 1, "shift N5 strike, CE0 holds");
    strike(SEU_NONE);                     expect2(0, 1, "shift N5 after");
    // Transparent phase rewrites the loops from the inputs.
    drive(0, 1, 1, 0); expect2(1, 0, "shift reload after upset");
    // Strike during the transparent phase: D wins once the strike ends.
    strike('{fl1: 1'b1, default: 1'b0}); expect2(1, 1, "shift transparent strike, during");
    strike(SEU_NONE);                     expect2(1, 0, "shift transparent strike, after");

    // ---- Mode switch with different loop values while latching ----
    drive(1, 1, 1, 0);
    en = 0; #10; expect2(1, 0, "EN falls: C-elements hold");
    en = 1; #10; expect2(1, 0, "EN rises: loops drive again");

    // ---- 4. Function mode with D0 != D1: outputs hold ----
    drive(0, 0, 1, 1); expect2(1, 1, "func load 1");
    drive(0, 0, 0, 1); expect2(1, 1, "func D0 != D1 holds");
    drive(0, 0, 1, 0); expect2(1, 1, "func D1 != D0 holds");
    drive(0, 0, 0, 0); expect2(0, 0, "func load 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
