// stahl_pkg: types shared by the STAHL latch, scan cell and scan chain.
//
// seu_t bundles the single-event-upset strike inputs of one STAHL latch.
// These inputs are a modelling hook of this RTL, not pins of the real cell:
// raising a bit injects a particle strike on that node for as long as the bit
// stays high, so that a logic simulation can show which strikes the latch
// masks. A cell in a real design ties them all to zero.
//   fl0 : a node of feedback loop FL0 (N1, N3 or N8; in logic they carry one
//         stored bit, so one strike input stands for all three)
//   fl1 : a node of feedback loop FL1 (N2, N4 or N7)
//   n5  : output of MUX0, the B input of CE0
//   n6  : output of MUX1, the A input of CE1
//   q0  : output node Q0 (driven by CE0)
//   q1  : output node Q1 (driven by CE1)
package stahl_pkg;

  typedef struct packed {
    logic q1;
    logic q0;
    logic n6;
    logic n5;
    logic fl1;
    logic fl0;
  } seu_t;

  localparam seu_t SEU_NONE = '0;

endpackage
