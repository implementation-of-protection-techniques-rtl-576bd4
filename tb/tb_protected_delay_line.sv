// Testbench for protected_delay_line (order 5, 16-bit data, Hamming(21,16)).
//
// A shadow array models the delay line without upsets; after every clock the
// corrected tap outputs must equal it. Phases:
//   A  random stream with random stalls and one random single-bit upset
//      (data or parity bit, any tap) whenever the line is clean;
//   B  one word hit in a different data bit in every tap it passes through,
//      which the forwarding of corrected data must absorb;
//   C  two taps upset in the same cycle: the conflict flag rises, only the
//      lower tap is corrected, and the other is corrected after one shift;
//   D  an upset held in a stalled line stays corrected cycle after cycle.
module tb_protected_delay_line;
  localparam int ORDER  = 5;
  localparam int DATA_W = 16;
  localparam int CODE_W = 21;

  logic clk = 0, rst_n = 0, shift = 0;
  logic [DATA_W-1:0]          w_in = '0;
  logic [ORDER:1][CODE_W-1:0] seu_inject = '0;
  logic [ORDER:1][DATA_W-1:0] taps;
  logic err_detected, err_corrected, err_conflict;

  logic [DATA_W-1:0] model [ORDER:1];
  int checks = 0, failures = 0;
  int n_data_fix = 0, n_parity_det = 0, n_multi_hit = 0, n_conflict = 0, n_stall = 0;

  protected_delay_line #(.DATA_W(DATA_W), .ORDER(ORDER)) dut (
    .clk, .rst_n, .shift, .w_in, .seu_inject, .taps,
    .err_detected, .err_corrected, .err_conflict
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_taps(input string what);
    for (int k = 1; k <= ORDER; k++)
      check(taps[k] == model[k], $sformatf("%s: tap %0d got %h expected %h", what, k, taps[k], model[k]));
  endtask

  // One clock: drive at the falling edge, update the model at the rising edge.
  task automatic step(input bit sh, input logic [DATA_W-1:0] w,
                      input logic [ORDER:1][CODE_W-1:0] inj);
    @(negedge clk);
    shift = sh; w_in = w; seu_inject = inj;
    @(posedge clk);
    if (sh) begin
      for (int k = ORDER; k >= 2; k--) model[k] = model[k-1];
      model[1] = w;
    end else n_stall++;
    @(negedge clk);
    shift = 0; seu_inject = '0;
    #1;
    if (err_corrected) n_data_fix++;
    if (err_detected && !err_corrected) n_parity_det++;
  endtask

  initial begin
    for (int k = 1; k <= ORDER; k++) model[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_taps("after reset");
    check(!err_detected, "no error after reset");

    // Phase A
    for (int n = 0; n < 3000; n++) begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      if (!err_detected && ($urandom_range(0, 3) == 0))
        inj[$urandom_range(1, ORDER)][$urandom_range(0, CODE_W - 1)] = 1'b1;
      step($urandom_range(0, 4) != 0, DATA_W'($urandom), inj);
      check_taps("phase A");
    end

    // Flush so the line is clean.
    for (int n = 0; n < ORDER + 1; n++) begin
      step(1, DATA_W'($urandom), '0);
      check_taps("flush");
    end
    check(!err_detected, "clean after flush");

    // Phase B: the word entering now is hit once in every tap.
    for (int k = 1; k <= ORDER; k++) begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      inj[k][k] = 1'b1;  // data bit k of the word as it enters tap k
      step(1, DATA_W'($urandom), inj);
      check_taps($sformatf("phase B tap %0d", k));
      check(err_corrected, "phase B correction active");
    end
    n_multi_hit++;
    step(1, DATA_W'($urandom), '0);
    check_taps("phase B exit");
    check(!err_detected, "phase B clean after exit");

    // Phase C: two taps upset in one cycle, line stalled.
    begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      inj[2][3] = 1'b1;
      inj[4][9] = 1'b1;
      step(0, '0, inj);
      check(err_conflict, "phase C conflict flagged");
      if (err_conflict) n_conflict++;
      check(taps[2] == model[2], "phase C lower tap corrected");
      check(taps[4] == (model[4] ^ DATA_W'(1 << 9)), "phase C upper tap left alone");
      step(1, DATA_W'($urandom), '0);
      check(!err_conflict, "phase C conflict gone after shift");
      check_taps("phase C after shift");
      step(1, DATA_W'($urandom), '0);
      check_taps("phase C second shift");
      check(!err_detected, "phase C clean");
    end

    // Phase D: upset held in a stalled line.
    begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      inj[3][15] = 1'b1;
      step(0, '0, inj);
      for (int n = 0; n < 5; n++) begin
        check_taps("phase D stall");
        check(err_corrected, "phase D correction held");
        step(0, '0, '0);
      end
      for (int n = 0; n < ORDER; n++) begin
        step(1, DATA_W'($urandom), '0);
        check_taps("phase D drain");
      end
      check(!err_detected, "phase D clean");
    end

    $display("events: data corrections=%0d parity detections=%0d multi-hit words=%0d conflicts=%0d stalls=%0d",
             n_data_fix, n_parity_det, n_multi_hit, n_conflict, n_stall);
    check(n_data_fix > 0 && n_parity_det > 0 && n_stall > 0, "all event kinds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
