// tr_full_subtractor: a reversible full subtractor built from two TR gates.
// Computes x - y - bin: the first gate (third input 0) gives x xor y and the
// borrow x'y; the second gives the difference x xor y xor bin and the borrow
// out bin(x xor y)' xor x'y. Purely combinational.
module tr_full_subtractor (
  input  logic x,
  input  logic y,
  input  logic bin,
  output logic diff,
  output logic bout
);
  logic g0, g1;        // garbage outputs
  logic d0, b0;

  tr_gate u_tr0 (.a(y),   .b(x),  .c(1'b0), .p(g0), .q(d0),   .r(b0));
  tr_gate u_tr1 (.a(bin), .b(d0), .c(b0),   .p(g1), .q(diff), .r(bout));
endmodule
