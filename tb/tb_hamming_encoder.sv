// Testbench for hamming_encoder: known vectors for 16 data bits (data bit 0
// sits at codeword position 3, bit 15 at position 21), then random words
// against the reference model, for 16 and 8 data bits.
module tb_hamming_encoder;
  import hamming_ref_pkg::*;

  logic [15:0] d16;
  logic [4:0]  p16;
  logic [7:0]  d8;
  logic [3:0]  p8;
  int checks = 0, failures = 0;

  hamming_encoder #(.DATA_W(16)) dut16 (.data(d16), .parity(p16));
  hamming_encoder #(.DATA_W(8))  dut8  (.data(d8),  .parity(p8));

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    d16 = 16'h0001; d8 = 8'h01; #1;
    check(8'(p16), 8'h03, "d16=0001");
    check(8'(p8),  8'h03, "d8=01");
    d16 = 16'h8000; #1;
    check(8'(p16), 8'h15, "d16=8000");
    d16 = 16'h0000; #1;
    check(8'(p16), 8'h00, "d16=0000");
    d16 = 16'hFFFF; #1;
    check(8'(p16), 8'(ref_parity(64'hFFFF, 16)), "d16=FFFF");
    for (int i = 0; i < 16; i++) begin
      d16 = 16'(1 << i); #1;
      check(8'(p16), 8'(ref_pos(16, i)), $sformatf("single bit %0d", i));
    end
    for (int n = 0; n < 500; n++) begin
      d16 = 16'($urandom);
      d8  = 8'($urandom);
      #1;
      check(8'(p16), 8'(ref_parity(64'(d16), 16)), $sformatf("random d16=%h", d16));
      check(8'(p8),  8'(ref_parity(64'(d8), 8)),   $sformatf("random d8=%h", d8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
