// full_adder: one-bit 3:2 counter used by the Wallace reduction stages.
// Takes three bits of equal weight and returns their sum bit (same weight)
// and carry bit (next weight up). Purely combinational.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic co
);
  assign s  = x ^ y ^ z;
  assign co = (x & y) | (x & z) | (y & z);
endmodule
