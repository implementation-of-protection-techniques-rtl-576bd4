// Testbench for hamming_syndrome: valid codewords give a zero syndrome; a
// codeword with one flipped bit (data or parity) gives that bit's position.
module tb_hamming_syndrome;
  import hamming_ref_pkg::*;

  logic [15:0] data;
  logic [4:0]  parity, syndrome;
  logic        nonzero;
  int checks = 0, failures = 0;

  hamming_syndrome #(.DATA_W(16)) dut (.data, .parity, .syndrome, .nonzero);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [15:0] d;
      logic [4:0]  p;
      int          bitpos;
      d = 16'($urandom);
      p = 5'(ref_parity(64'(d), 16));
      data = d; parity = p; #1;
      check(int'(syndrome), 0, "clean syndrome");
      check(int'(nonzero), 0, "clean nonzero");
      bitpos = int'($urandom_range(0, 20));
      if (bitpos < 16) begin
        data = d ^ 16'(1 << bitpos); parity = p; #1;
        check(int'(syndrome), ref_pos(16, bitpos), $sformatf("data bit %0d", bitpos));
      end else begin
        data = d; parity = p ^ 5'(1 << (bitpos - 16)); #1;
        check(int'(syndrome), 1 << (bitpos - 16), $sformatf("parity bit %0d", bitpos - 16));
      end
      check(int'(nonzero), 1, "flagged nonzero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
