// Runs the filter at the other two orders at which the protection scheme was
// evaluated, 5 and 10 (order 15, the default, is covered by tb_iir_seu_top):
// each build filters random data under random single-bit delay-line upsets
// and must match its integer model exactly (see iir_order_run).
module tb_iir_seu_orders;
  logic clk = 0, rst_n = 0, start = 0;
  logic done5, done10;
  int c5, f5, x5, c10, f10, x10;
  int checks, failures;

  always #5 clk = ~clk;

  iir_order_run #(.ORDER(5))  run5  (.clk, .rst_n, .start, .done(done5),  .checks(c5),  .failures(f5),  .fixes(x5));
  iir_order_run #(.ORDER(10)) run10 (.clk, .rst_n, .start, .done(done10), .checks(c10), .failures(f10), .fixes(x10));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c10, f5 + f10 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start = 1;
    wait (done5 && done10);
    checks   = c5 + c10 + 2;
    failures = f5 + f10 + ((x5 == 0) ? 1 : 0) + ((x10 == 0) ? 1 : 0);
    $display("order 5: %0d checks, %0d corrections; order 10: %0d checks, %0d corrections", c5, x5, c10, x10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
