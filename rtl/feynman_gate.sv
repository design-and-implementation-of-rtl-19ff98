// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
// P passes A through and Q = A xor B. With B tied to 0 the gate copies A onto
// both outputs, which is how reversible circuits fan a signal out (a plain wire
// branch is not allowed there). Purely combinational; the equations are the
// standard ones of the gate.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  always_comb begin
    p = a;
    q = a ^ b;
  end
endmodule
