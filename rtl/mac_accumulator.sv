// mac_accumulator: W-bit parallel-in parallel-out (PIPO) accumulator register
// of the MAC (W = 129 by default: 128 sum bits plus the adder's carry).
//
// All W bits are loaded in parallel on every rising clock edge and presented
// in parallel at q, which goes both to the MAC output and back to the adder.
// rst is synchronous and active high and clears the register; the reset
// style and polarity are this design's choice, the description only shows a
// reset input. Timing: q follows d one clock after d is applied.
module mac_accumulator #(
  parameter int unsigned W = 129
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= d;
  end
endmodule
