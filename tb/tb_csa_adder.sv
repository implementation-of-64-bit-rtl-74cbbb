// tb_csa_adder: self-checking test of csa_adder at its 128-bit default.
// Applies corner cases (zeros, all ones, a carry rippling the full width,
// carry-in only) and random operands, and compares {cout, s} with a 129-bit
// sum worked out in the testbench.
module tb_csa_adder;
  localparam int unsigned W = 128;

  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int checks   = 0;
  int failures = 0;

  csa_adder #(.W(W)) dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout));

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic apply(input logic [W-1:0] xv, input logic [W-1:0] yv, input logic cv);
    logic [W:0] expected;
    x = xv; y = yv; cin = cv;
    #1;
    expected = {1'b0, xv} + {1'b0, yv} + (W+1)'(cv);
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      $display("FAIL x=%h y=%h cin=%0d got %h expected %h", xv, yv, cv, {cout, s}, expected);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0, 1'b0);
    apply('1, '0, 1'b1);                    // carry through all 128 bits
    apply('1, '1, 1'b1);
    apply('1, 128'd1, 1'b0);
    apply({1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}}, 1'b0);
    apply('0, '0, 1'b1);
    for (int i = 0; i < 2000; i++) apply(rand_word(), rand_word(), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
