// tb_modified_wallace_mult: self-checking test of the modified Wallace
// multiplier at its 64-bit default, plus a 10 x 10 instance (the size of the
// illustrated reduction example). Products of corner-case and random
// operands are compared with products computed by the testbench. It also
// checks the structure against the multiplier's specification: 10 reduction
// stages for 64 bits and 5 for 10 bits (from the row-count rule), and half
// adders only in the last stage.
module tb_modified_wallace_mult;
  localparam int unsigned N  = 64;
  localparam int unsigned NS = 10;

  logic [N-1:0]    a, b;
  logic [2*N-1:0]  p;
  logic [NS-1:0]   as, bs;
  logic [2*NS-1:0] ps;
  int checks   = 0;
  int failures = 0;

  modified_wallace_mult dut (.a(a), .b(b), .p(p));
  modified_wallace_mult #(.N(NS)) dut10 (.a(as), .b(bs), .p(ps));

  function automatic logic [N-1:0] rand_op();
    logic [N-1:0] v;
    v = {$urandom, $urandom};
    case ($urandom % 8)
      0: v = v >> ($urandom % N);          // short operands
      1: v = ~(v >> ($urandom % N));       // long runs of ones
      default: ;
    endcase
    return v;
  endfunction

  task automatic apply64(input logic [N-1:0] av, input logic [N-1:0] bv);
    logic [2*N-1:0] expected;
    a = av; b = bv;
    #1;
    expected = (2*N)'(av) * (2*N)'(bv);
    checks++;
    if (p !== expected) begin
      failures++;
      $display("FAIL 64: %h * %h = %h, expected %h", av, bv, p, expected);
    end
  endtask

  task automatic apply10(input logic [NS-1:0] av, input logic [NS-1:0] bv);
    logic [2*NS-1:0] expected;
    as = av; bs = bv;
    #1;
    expected = (2*NS)'(av) * (2*NS)'(bv);
    checks++;
    if (ps !== expected) begin
      failures++;
      $display("FAIL 10: %0d * %0d = %0d, expected %0d", av, bv, ps, expected);
    end
  endtask

  task automatic expect_int(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expect_int("stages for 64 bits", dut.STAGES, 10);
    expect_int("stages for 10 bits", dut10.STAGES, 5);
    expect_int("half adders before the last stage (64)", dut.HA_BEFORE_LAST, 0);
    expect_int("half adders before the last stage (10)", dut10.HA_BEFORE_LAST, 0);
    $display("64-bit tree: %0d full adders, %0d half adders", dut.TOTAL_FA, dut.TOTAL_HA);

    apply64('0, '0);
    apply64('1, '1);
    apply64('1, 64'd1);
    apply64(64'd1, '1);
    apply64({1'b1, 63'd0}, {1'b1, 63'd0});
    apply64(64'hAAAA_AAAA_AAAA_AAAA, 64'h5555_5555_5555_5555);
    for (int i = 0; i < N; i++) apply64(64'd1 << i, '1);
    for (int i = 0; i < 3000; i++) apply64(rand_op(), rand_op());

    for (int i = 0; i < 1024; i += 31)
      for (int k = 0; k < 1024; k += 17) apply10(NS'(i), NS'(k));
    apply10('1, '1);
    for (int i = 0; i < 2000; i++) apply10(NS'($urandom), NS'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
