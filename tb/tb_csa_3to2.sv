// tb_csa_3to2: self-checking test of the 3:2 carry-save adder.
// For corner and random operands it checks that the sum and carry vectors add up to
// a + b + c + cin modulo 2^W, and that the sum vector alone is the bitwise parity
// (no carry propagates inside the compressor). A watchdog ends the run.
module tb_csa_3to2;
  localparam int unsigned W = symfir_pkg::ACC_W;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, c, s, cy;
  logic         cin;
  int           checks = 0;
  int           failures = 0;

  csa_3to2 u_dut (.a(a), .b(b), .c(c), .cin(cin), .s(s), .cy(cy));

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] ta, tb_, tc, input logic tci);
    logic [W-1:0] expect_sum;
    a   = ta;
    b   = tb_;
    c   = tc;
    cin = tci;
    @(posedge clk);
    expect_sum = ta + tb_ + tc + W'(tci);
    checks++;
    if (W'(s + cy) !== expect_sum || s !== (ta ^ tb_ ^ tc)) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h cin=%0d s=%h cy=%h", ta, tb_, tc, tci, s, cy);
    end
  endtask

  initial begin
    check('0, '0, '0, 1'b0);
    check('1, '1, '1, 1'b1);
    check('1, '1, '0, 1'b0);
    check({(W/2){2'b10}}, {(W/2){2'b01}}, {(W/2){2'b11}}, 1'b1);
    for (int i = 0; i < W; i++) check(W'(1) << i, W'(1) << i, W'(1) << i, 1'b0);
    for (int n = 0; n < 3000; n++)
      check({$urandom, $urandom}, {$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
