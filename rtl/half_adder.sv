// half_adder: one-bit 2:2 counter. The reduced-complexity Wallace reduction
// uses it only where a column would otherwise leave more bits than the
// stage's row-count target allows. Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic co
);
  assign s  = x ^ y;
  assign co = x & y;
endmodule
