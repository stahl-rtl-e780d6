// tb_c_element: self-checking test of the inverting C-element.
// Drives random input sequences and compares Z with a reference that keeps
// its own copy of the held value: Z = ~A when A == B, unchanged otherwise.
// Also checks the two states explicitly (inverter when A == B, hold when the
// inputs split in either direction).
`timescale 1ps/1ps
module tb_c_element;
  logic a, b, z;
  int checks = 0, failures = 0;
  logic ref_z;

  c_element dut (.a(a), .b(b), .z(z));

  task automatic apply(input logic na, input logic nb);
    a = na; b = nb;
    #10;
    if (na == nb) ref_z = ~na;
    checks++;
    if (z !== ref_z) begin
      failures++;
      $display("FAIL a=%0b b=%0b z=%0b expected %0b", na, nb, z, ref_z);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1'b0, 1'b0);            // z = 1
    apply(1'b1, 1'b0);            // hold 1
    apply(1'b0, 1'b1);            // hold 1
    apply(1'b1, 1'b1);            // z = 0
    apply(1'b0, 1'b1);            // hold 0
    apply(1'b1, 1'b0);            // hold 0
    apply(1'b0, 1'b0);            // z = 1
    repeat (400) apply(1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
