// Self-checking testbench of the feeder and sequencer (N = 4 and N = 3).
//
// Loads random samples and windows, then checks every output clock by
// clock against a schedule worked out here from the operand formats:
//   u_o, d_o  element e = (row k, column c) during clock e+2 after RUN is
//             entered: u = U(k,c), d = v(k);
//   b_o, ct_o element e one clock later; ct_o with column 0;
//   j_o       one pulse, one clock before the first b_o element;
//   i_o       with column N-1 of every row;
//   cap_o     exactly once, 3N^2 - N + 3 clocks after RUN is entered;
//   shift_o, c_valid  N^2 clocks of unload, c_last on the last one.
module tb_tvc_feeder;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  feeder_check #(.N(4)) u_n4 (.clk);
  feeder_check #(.N(3)) u_n3 (.clk);

  initial begin
    wait (u_n4.done && u_n3.done);
    checks   = u_n4.checks + u_n3.checks;
    failures += u_n4.failures + u_n3.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
