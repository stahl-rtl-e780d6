// stahl_latch: scan-test-aware hardened latch (STAHL), logic-level model.
//
// The latch has two data inputs D0/D1, two outputs Q0/Q1, a clock pair CK/CKB
// and a mode pair EN/ENB. It is transparent while CK = 0 and latches while
// CK = 1. Inside are two feedback loops, FL0 (node N1 -> I2 -> N3 -> I1 -> N8
// -> TG3 -> N1) and FL1 (N2 -> I3 -> N4 -> I4 -> N7 -> TG4 -> N2), loaded
// from D0 and D1 through TG1 and TG2. Two inverting C-elements drive the
// outputs: CE0 gets N3 on A and MUX0's output N5 on B, CE1 gets MUX1's output
// N6 on A and N4 on B. Inverters I5 and I6 feed Q0 and Q1 back into the loops.
//
//   EN = 0, function mode: MUX0 passes N4 and MUX1 passes N3, so each
//     C-element compares both loops. D0 and D1 must carry the same value; the
//     latch then behaves as one latch D -> Q0 = Q1. A transient on one loop
//     makes the C-element inputs disagree, both outputs float and keep their
//     value, and the feedback from Q0/Q1 restores the struck loop.
//   EN = 1, shift mode: MUX0 passes N3 and MUX1 passes N4, so each C-element
//     sees one loop twice and acts as an inverter: two independent plain
//     latches D0 -> Q0 and D1 -> Q1, each testable like an unhardened latch.
//
// Logic model. Each loop holds one bit, the value of N1 (N2); N3 (N4) is its
// inverse and N8 (N7) equals it. The loop's input transmission gate conducts
// when CK = 0 and CKB = 1, which keeps latches clocked by CK and by CKB from
// ever being transparent together in a zero-delay simulation. The restoring
// path through I5/I6 and the keeper I1/TG3 (I4/TG4) are not drawn as gates:
// their effect is modelled directly:
//   - a strike on a loop (seu.fl0 / seu.fl1) inverts the loop's nodes while
//     the strike input is high;
//   - when the strike ends during the latching phase in function mode, the
//     loop is back to its old value (restored from the held output);
//   - when it ends during the latching phase in shift mode, the flipped value
//     stays, as in any unhardened latch (a toggle flop clocked by the end of
//     the strike records that flip);
//   - strikes on N5, N6, Q0 and Q1 invert that node only while the input is
//     high; the driving C-element restores the output afterwards.
// The strike inputs are this model's own addition (see stahl_pkg); tie them
// to stahl_pkg::SEU_NONE in a design. The loops, muxes, C-elements and both
// modes follow the published circuit; the gate-level timing does not exist
// here: every path has zero delay.
//
// Circuit notes: the loop bits and the C-element states are level-sensitive
// latches, which is what this cell is. The flip-record flops are clocked by
// the strike inputs and exist only for fault injection.
module stahl_latch
  import stahl_pkg::*;
(
  input  logic ck,    // clock, latch transparent while low
  input  logic ckb,   // complement of ck
  input  logic en,    // 1 = shift mode, 0 = function (hardened) mode
  input  logic enb,   // complement of en
  input  logic d0,
  input  logic d1,
  input  seu_t seu,   // strike injection, all zero in normal use
  output logic q0,
  output logic q1
);

  logic tg_in_on;     // TG1/TG2 conduct
  logic shift_sel;    // MUX0/MUX1 pass their "1" input

  assign tg_in_on  = ~ck & ckb;
  assign shift_sel = en & ~enb;

  // Flip records: toggled when a strike ends on a closed loop in shift mode.
  logic flip0, flip1;

  always_ff @(negedge seu.fl0) begin
    if (!tg_in_on && shift_sel) flip0 <= ~flip0;
  end

  always_ff @(negedge seu.fl1) begin
    if (!tg_in_on && shift_sel) flip1 <= ~flip1;
  end

  // Loop storage, written through TG1/TG2 while transparent. The stored word
  // is pre-compensated by the flip record so that the loop value equals D.
  logic fl0_st, fl1_st;

  always_latch begin
    if (tg_in_on) fl0_st = d0 ^ flip0;
  end

  always_latch begin
    if (tg_in_on) fl1_st = d1 ^ flip1;
  end

  // Loop nodes.
  logic n1, n2, n3, n4, n5, n6;

  assign n1 = fl0_st ^ flip0 ^ seu.fl0;
  assign n2 = fl1_st ^ flip1 ^ seu.fl1;
  assign n3 = ~n1;    // I2
  assign n4 = ~n2;    // I3

  // Mode multiplexers.
  assign n5 = (shift_sel ? n3 : n4) ^ seu.n5;   // MUX0: 1 = N3, 0 = N4
  assign n6 = (shift_sel ? n4 : n3) ^ seu.n6;   // MUX1: 0 = N3, 1 = N4

  // Output C-elements.
  logic ce0_z, ce1_z;

  c_element u_ce0 (.a(n3), .b(n5), .z(ce0_z));
  c_element u_ce1 (.a(n6), .b(n4), .z(ce1_z));

  assign q0 = ce0_z ^ seu.q0;
  assign q1 = ce1_z ^ seu.q1;

endmodule
