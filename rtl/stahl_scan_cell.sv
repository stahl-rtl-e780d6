// stahl_scan_cell: scan flip-flop built from two STAHL latches.
//
// STAHL-A is the master (transparent while CK = 0) and STAHL-B the slave: it
// gets CK and CKB swapped, so it is transparent while CK = 1 and the pair
// takes its data on the rising edge of CK. A's outputs Q0/Q1 feed B's inputs
// D2/D3; B's outputs are Q2/Q3.
//   input mux : A.D0 = D always; A.D1 = SI when EN = 1, D when EN = 0
//   output mux: Q = Q2 when EN = 1, Q3 when EN = 0;  SO = Q3 always
//
// EN = 0, function mode: both halves of both latches carry D, the cell is one
// hardened D flip-flop D -> Q.
// EN = 1, scan mode: the cell is two independent flip-flops. The upper one,
// D -> Q2 -> Q, keeps serving the combinational logic, so the design goes on
// running functional clock cycles during shifting; the lower one, SI -> Q3 ->
// SO, is a link of the scan chain. When EN falls, Q switches from Q2 to Q3,
// the value just shifted in.
// The structure and both muxes follow the published cell; the mux select
// polarities are the ones printed on the muxes. The strike inputs seu_a and
// seu_b reach the two latches for fault injection only (see stahl_pkg).
// No reset: like the latches it is built from, the cell holds whatever was
// last clocked in.
module stahl_scan_cell
  import stahl_pkg::*;
(
  input  logic ck,
  input  logic ckb,
  input  logic en,      // 1 = scan mode, 0 = function mode
  input  logic enb,
  input  logic d,       // functional data from the combinational logic
  input  logic si,      // scan in
  input  seu_t seu_a,   // strike injection into STAHL-A
  input  seu_t seu_b,   // strike injection into STAHL-B
  output logic q,       // functional output to the combinational logic
  output logic so       // scan out
);

  logic a_d1;
  logic a_q0, a_q1;     // STAHL-A outputs Q0, Q1
  logic b_q2, b_q3;     // STAHL-B outputs Q2, Q3

  assign a_d1 = en ? si : d;

  stahl_latch u_stahl_a (
    .ck (ck),  .ckb(ckb), .en(en), .enb(enb),
    .d0 (d),   .d1 (a_d1),
    .seu(seu_a),
    .q0 (a_q0), .q1(a_q1)
  );

  stahl_latch u_stahl_b (
    .ck (ckb), .ckb(ck),  .en(en), .enb(enb),
    .d0 (a_q0), .d1(a_q1),
    .seu(seu_b),
    .q0 (b_q2), .q1(b_q3)
  );

  assign q  = en ? b_q2 : b_q3;
  assign so = b_q3;

endmodule
