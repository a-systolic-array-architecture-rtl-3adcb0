// End-to-end testbench of the TVC linear system at sizes other than the
// default: N = 2, 3, 6 and 8 (4, 9, 36 and 64 PEs). Each size runs the same checks
// as tb_tvc_top (results, clock counts, mechanisms) in its own checker.
module tb_tvc_top_sizes;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  top_check #(.N(2)) u_n2 (.clk);
  top_check #(.N(3)) u_n3 (.clk);
  top_check #(.N(6)) u_n6 (.clk);
  top_check #(.N(8)) u_n8 (.clk);

  initial begin
    wait (u_n2.done && u_n3.done && u_n6.done && u_n8.done);
    checks   = u_n2.checks + u_n3.checks + u_n6.checks + u_n8.checks;
    failures += u_n2.failures + u_n3.failures + u_n6.failures + u_n8.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
