// Self-checking testbench of S-MUL.
//
// Streams Fig.-1(b)-style operands through the multiplier (a column of
// U^T with its diagonal element of D held for N clocks), plus random and
// extreme signed values, and checks that each product appears exactly one
// clock after its operands.
module tb_smul;

  localparam int W = 16;
  localparam int W2 = 2 * W;

  logic clk = 1'b0;
  logic rst_n;
  logic signed [W-1:0] u, d;
  logic signed [2*W-1:0] y;

  int checks = 0;
  int failures = 0;

  smul dut (.clk, .rst_n, .u, .d, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint expect_q;
  bit have_expect = 1'b0;

  task automatic drive(input logic signed [W-1:0] uu, input logic signed [W-1:0] dd);
    u = uu;
    d = dd;
    @(negedge clk);
    checks++;
    if (y != W2'(longint'(uu) * longint'(dd))) begin
      failures++;
      $display("FAIL %0d * %0d gave %0d", uu, dd, y);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    u = '0; d = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (y != 0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    // operands of a 4 x 4 Y = U^T D: column k of U^T scaled by d(k)
    for (int k = 0; k < 4; k++)
      for (int r = 0; r < 4; r++)
        drive(W'(10 * k + r - 20), W'(k * 7 - 9));
    drive(16'sh8000, 16'sh8000);
    drive(16'sh7fff, 16'sh8000);
    drive(16'sh7fff, 16'sh7fff);
    drive(-16'sd1, 16'sd1);
    for (int t = 0; t < 1000; t++) drive(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
