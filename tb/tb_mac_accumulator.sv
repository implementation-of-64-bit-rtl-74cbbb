// tb_mac_accumulator: self-checking test of the 129-bit PIPO accumulator
// register. Loads random words (all 129 bits, top bit included), checks that
// q shows each word one clock after it was applied and holds it between
// edges, and that a synchronous reset clears it.
module tb_mac_accumulator;
  localparam int unsigned W = 129;

  logic         clk = 1'b0;
  logic         rst;
  logic [W-1:0] d, q, expected;
  int checks   = 0;
  int failures = 0;

  mac_accumulator #(.W(W)) dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int i = 0; i < 5; i++) v[i*32 +: 32] = $urandom;
    v[W-1] = 1'($urandom);
    return v;
  endfunction

  task automatic check(input string what);
    checks++;
    if (q !== expected) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, expected);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1;
    d   = rand_word();
    @(posedge clk); #1;
    expected = '0;
    check("reset");
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = rand_word();
      if (i % 2 == 0) d[W-1] = 1'b1;
      expected = d;
      @(posedge clk); #1;
      check("load");
      d = ~d;                               // must not show before the edge
      #2;
      check("hold");
      if (i % 37 == 36) begin
        rst = 1'b1;
        @(posedge clk); #1;
        expected = '0;
        check("reset");
        rst = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
