// Testbench for hamming_locator: every syndrome value from 0 to 31 for 16 data
// bits, against the data-bit positions of the reference model (zero vector
// for zero, for parity positions and for positions beyond the codeword).
module tb_hamming_locator;
  import hamming_ref_pkg::*;

  logic [4:0]  syndrome;
  logic [15:0] err_vec;
  int checks = 0, failures = 0;

  hamming_locator #(.DATA_W(16)) dut (.syndrome, .err_vec);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 32; s++) begin
      logic [15:0] exp;
      exp = '0;
      for (int i = 0; i < 16; i++) if (ref_pos(16, i) == s) exp[i] = 1'b1;
      syndrome = 5'(s); #1;
      checks++;
      if (err_vec !== exp) begin
        failures++;
        $display("FAIL syndrome %0d: got %h expected %h", s, err_vec, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
