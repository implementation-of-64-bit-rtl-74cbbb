// tb_mac_unit: end-to-end test of the 64-bit MAC at its default sizes.
//
// Runs several dot products F = sum P_i * Q_i through the unit, one operand
// pair per clock, and compares p after every clock edge with a running sum
// kept by the testbench in 129-bit arithmetic. Each series starts with a
// reset. The sequence is built so that each mechanism of the datapath occurs
// and is counted:
//   - accumulation of a product onto a non-zero sum,
//   - synchronous reset clearing the sum (also in the middle of a series),
//   - a carry out of the 128-bit adder landing in bit 128 of the sum,
//   - wrap-around of the 129-bit sum past 2^129 - 1,
//   - the one-clock latency (p must not change before the clock edge).
// A mechanism that never occurred counts as a failure.
module tb_mac_unit;
  localparam int unsigned N  = 64;
  localparam int unsigned AW = 2 * N + 1;

  logic          clk = 1'b0;
  logic          rst;
  logic [N-1:0]  a, b;
  logic [AW-1:0] p;
  logic [AW-1:0] model;
  int checks   = 0;
  int failures = 0;
  int n_accumulate = 0;
  int n_reset      = 0;
  int n_carry128   = 0;
  int n_wrap       = 0;
  int n_latency    = 0;

  mac_unit dut (.clk(clk), .rst(rst), .a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  task automatic check(input string what);
    checks++;
    if (p !== model) begin
      failures++;
      $display("FAIL %s: p=%h expected %h", what, p, model);
    end
  endtask

  // One multiply-accumulate: apply operands, check p has not moved before
  // the edge, then check the new sum after it.
  task automatic mac(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [AW-1:0] prev_sum, prod, new_sum;
    @(negedge clk);
    a = av; b = bv;
    prev_sum = model;
    prod   = AW'((2*N)'(av) * (2*N)'(bv));
    new_sum   = model + prod;                        // wraps modulo 2^129
    #1;
    checks++;
    if (p !== prev_sum) begin
      failures++;
      $display("FAIL latency: p changed before the clock edge");
    end
    @(posedge clk); #1;
    if (prev_sum != '0 && prod != '0) n_accumulate++;
    if (prod != '0) n_latency++;
    if ({1'b0, prev_sum[AW-2:0]} + {1'b0, prod[AW-2:0]} >= (AW)'(1) << (AW-1)) n_carry128++;
    if (new_sum < prev_sum) n_wrap++;
    model = new_sum;
    check("accumulate");
  endtask

  task automatic do_reset(input logic [N-1:0] av, input logic [N-1:0] bv);
    @(negedge clk);
    rst = 1'b1; a = av; b = bv;
    @(posedge clk); #1;
    rst = 1'b0;
    if (model != '0) n_reset++;
    model = '0;
    check("reset");
  endtask

  function automatic logic [N-1:0] rand_op();
    return {$urandom, $urandom};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; a = '0; b = '0;
    model = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    check("initial reset");

    // A small dot product with known values: 3*4 + 5*6 + 7*8 = 98.
    mac(64'd3, 64'd4);
    mac(64'd5, 64'd6);
    mac(64'd7, 64'd8);
    checks++;
    if (p != AW'(98)) begin
      failures++;
      $display("FAIL small dot product: %0d, expected 98", p);
    end

    // Maximal products: carries into bit 128, then wrap past 2^129 - 1.
    do_reset('1, '1);
    for (int i = 0; i < 6; i++) mac('1, '1);

    // Random dot products of varying length, reset between them.
    for (int s = 0; s < 20; s++) begin
      do_reset(rand_op(), rand_op());
      for (int i = 0; i < 8 + s * 4; i++) mac(rand_op(), rand_op());
    end

    // Reset in the middle of a series, with operands present.
    for (int i = 0; i < 5; i++) mac(rand_op(), rand_op());
    do_reset(rand_op(), rand_op());
    for (int i = 0; i < 5; i++) mac(rand_op(), rand_op());

    // Zero operands leave the sum unchanged.
    mac('0, rand_op());
    mac(rand_op(), '0);

    $display("mechanisms: accumulate=%0d reset=%0d carry_into_bit128=%0d wrap=%0d latency=%0d",
             n_accumulate, n_reset, n_carry128, n_wrap, n_latency);
    if (n_accumulate == 0) begin failures++; $display("FAIL accumulate never happened"); end
    if (n_reset      == 0) begin failures++; $display("FAIL reset never cleared a sum"); end
    if (n_carry128   == 0) begin failures++; $display("FAIL no carry into bit 128"); end
    if (n_wrap       == 0) begin failures++; $display("FAIL no wrap-around"); end
    if (n_latency    == 0) begin failures++; $display("FAIL latency never observed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
