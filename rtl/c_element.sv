// c_element: inverting Muller C-element, CE0 and CE1 of the STAHL latch.
//
// The cell is a stack of two PMOS and two NMOS transistors, both gated by A
// and B: when A and B are equal the stack pulls Z to the inverse of that
// value; when they differ neither half conducts and Z floats, keeping the
// charge it had. In logic that is a transparent-when-equal storage element:
//   A == B : Z = ~A   (combinational, no delay)
//   A != B : Z holds its previous value
// When both inputs come from one loop the cell is a plain inverter; when they
// come from two redundant loops it blocks a transient on either loop from
// reaching Z. The inverting function and the transistor stack follow the
// cell drawing; the initial value is not given: the holding state starts at
// whatever the first equal inputs drive.
//
// Circuit note: the held state is a level-sensitive latch (enable = A == B).
// That is the cell's purpose, not an accidental latch.
module c_element (
  input  logic a,
  input  logic b,
  output logic z
);

  always_latch begin
    if (a == b) z = ~a;
  end

endmodule
