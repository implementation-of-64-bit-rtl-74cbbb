// mac_unit: 64-bit multiply-accumulate unit, F = sum over i of P_i * Q_i.
//
// Datapath (one multiply-accumulate per clock):
//   a, b (N = 64 bits) -> modified_wallace_mult -> 128-bit product
//   product + accumulator -> csa_adder -> 129-bit sum (128 bits + carry)
//   sum -> mac_accumulator (129-bit PIPO register) -> p, and back to the adder
// The multiplier and the adder are combinational, so the only state is the
// accumulator: operands applied before a rising clock edge are multiplied
// and added to the running sum at that edge, and p shows the new sum right
// after it (latency one clock, throughput one operand pair per clock).
//
// The adder is 128 bits wide, as described; the accumulator's top bit (bit
// 128, the stored carry) is added to the adder's carry-out, so the running
// sum is kept modulo 2^129 and wraps past 2^129 - 1. The operands are taken
// as unsigned. rst (synchronous, active high) clears the sum; the next
// operand pair is then accumulated from zero. These three points, like the
// reset style, are this design's choices; the structure of multiplier,
// carry save adder and PIPO accumulator with feedback follows the MAC's
// description.
//
// Ports: clk, rst, a[N-1:0], b[N-1:0] in; p[2N:0] (the accumulator) out.
module mac_unit #(
  parameter int unsigned N = mac_pkg::OPERAND_W
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N:0]   p
);
  localparam int unsigned PW = 2 * N;   // product width
  localparam int unsigned AW = PW + 1;  // accumulator width

  logic [PW-1:0] product;
  logic [PW-1:0] sum_lo;
  logic          sum_carry;
  logic [AW-1:0] acc_d;
  logic [AW-1:0] acc_q;

  modified_wallace_mult #(.N(N)) u_mult (
    .a (a),
    .b (b),
    .p (product)
  );

  csa_adder #(.W(PW)) u_add (
    .x    (product),
    .y    (acc_q[PW-1:0]),
    .cin  (1'b0),
    .s    (sum_lo),
    .cout (sum_carry)
  );

  // Bit 128 of the new sum: the adder's carry plus the stored carry bit.
  assign acc_d = {sum_carry ^ acc_q[PW], sum_lo};

  mac_accumulator #(.W(AW)) u_acc (
    .clk (clk),
    .rst (rst),
    .d   (acc_d),
    .q   (acc_q)
  );

  assign p = acc_q;

endmodule
