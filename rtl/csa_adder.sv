// csa_adder: the MAC's W-bit "carry save adder" (W = 128 by default).
//
// It adds two W-bit operands and a carry-in and returns W sum bits plus the
// carry-out, i.e. a W+1 = 129-bit result as the MAC description requires
// (128 bits plus one carry bit). The same block serves twice in the design:
// as the accumulate adder between the multiplier and the accumulator
// register, and as the final adder that merges the two rows left by the
// Wallace reduction into the product.
//
// The description gives this adder's role and widths but not its internal
// carry structure, so it is written as a single word-level addition and the
// carry chain is left to synthesis. Purely combinational.
module csa_adder #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] total;

  assign total   = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, cin};
  assign s       = total[W-1:0];
  assign cout    = total[W];
endmodule
