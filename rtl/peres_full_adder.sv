// peres_full_adder: a reversible full adder built from two Peres gates.
// The first gate, with its third input tied to 0, gives x xor y and xy; the
// second takes x xor y, the carry in and xy and gives the sum
// x xor y xor cin and the carry (x xor y)cin xor xy. Two garbage outputs (the
// P outputs) stay unused. Purely combinational.
module peres_full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g0, g1;        // garbage outputs
  logic xy_xor, xy_and;

  peres_gate u_pg0 (.a(x),      .b(y),   .c(1'b0),   .p(g0), .q(xy_xor), .r(xy_and));
  peres_gate u_pg1 (.a(xy_xor), .b(cin), .c(xy_and), .p(g1), .q(sum),    .r(cout));
endmodule
