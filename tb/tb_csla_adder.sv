// tb_csla_adder: self-checking test of csla_adder at its default width.
// Drives corner operands (zero, all ones, alternating bits, carry chains that cross
// every block boundary) and random operands with both carry-in values, and compares
// {cout, s} with the integer sum a + b + cin computed here. A watchdog ends the run.
module tb_csla_adder;
  localparam int unsigned W = symfir_pkg::ACC_W;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int           checks = 0;
  int           failures = 0;

  csla_adder u_dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic tc);
    logic [W:0] expect_sum;
    a   = ta;
    b   = tb;
    cin = tc;
    @(posedge clk);
    expect_sum = {1'b0, ta} + {1'b0, tb} + (W+1)'(tc);
    checks++;
    if ({cout, s} !== expect_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0d got %h expected %h", ta, tb, tc, {cout, s}, expect_sum);
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++) begin
      check('0, '0, c[0]);
      check('1, '0, c[0]);
      check('1, '1, c[0]);
      check({(W/2){2'b10}}, {(W/2){2'b01}}, c[0]);
      check({(W/2){2'b10}}, {(W/2){2'b10}}, c[0]);
      // a single carry generated at bit i runs through all ones above it
      for (int i = 0; i < W; i++) check(W'(1) << i, ~(W'(0)) << i, c[0]);
      for (int i = 0; i < W; i++) check(~(W'(0)) >> i, W'(1), c[0]);
    end
    for (int n = 0; n < 3000; n++) check({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
