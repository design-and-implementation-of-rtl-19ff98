// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
// P = A, Q = A'B xor AC, R = A'C xor AB: when the control A is 0 the inputs B
// and C pass straight through, when it is 1 they are swapped. Used in this
// design as a reversible 2:1 multiplexer: Q selects C when A is 1 and B when A
// is 0. Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = (~a & b) ^ (a & c);
    r = (~a & c) ^ (a & b);
  end
endmodule
