// Testbench for hamming_corrector: random data and one-hot error vectors with
// the enable on and off.
module tb_hamming_corrector;
  logic [15:0] data_in, err_vec, data_out;
  logic        enable;
  int checks = 0, failures = 0;

  hamming_corrector #(.DATA_W(16)) dut (.data_in, .err_vec, .enable, .data_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [15:0] exp;
      int b;
      b       = int'($urandom_range(0, 15));
      data_in = 16'($urandom);
      err_vec = 16'(1 << b);
      enable  = 1'($urandom);
      #1;
      exp = data_in;
      if (enable) exp[b] = ~exp[b];
      checks++;
      if (data_out !== exp) begin
        failures++;
        $display("FAIL data %h bit %0d en %0d: got %h expected %h", data_in, b, enable, data_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
