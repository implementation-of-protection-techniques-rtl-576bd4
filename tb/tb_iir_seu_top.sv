// End-to-end testbench for iir_seu_top at its default parameters (order 15,
// 16-bit samples, Q2.14 coefficients, Hamming(21,16) delay line).
//
// A behavioural model of the filter without upsets predicts every output; the
// design must match it exactly, one cycle after each accepted sample, while
// upsets are injected into the delay line. Phases:
//   1  impulse response of w[n] = x[n] + 0.5 w[n-1], y[n] = w[n], against
//      hand-computed values 8192, 4096, 2048, ...
//   2  random coefficients, random samples, random input stalls, one random
//      single-bit upset (data or parity bit, any tap) whenever the line is
//      clean;
//   3  one word hit in a different data bit in each of the 15 taps;
//   4  large gains that saturate w[n] and y[n];
//   5  two taps upset in the same cycle: the conflict flag must rise; the
//      filter is then reset and must restart cleanly.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_iir_seu_top;
  localparam int ORDER  = 15;
  localparam int CODE_W = 21;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] x_in = '0;
  logic [ORDER:1][15:0] a_coef = '0;
  logic [ORDER:0][15:0] b_coef = '0;
  logic [ORDER:1][CODE_W-1:0] seu_inject = '0;
  logic out_valid, err_detected, err_corrected, err_conflict, sat;
  logic [15:0] y_out;

  iir_seu_top dut (
    .clk, .rst_n, .in_valid, .x_in, .a_coef, .b_coef, .seu_inject,
    .out_valid, .y_out, .err_detected, .err_corrected, .err_conflict, .sat
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_samples = 0, n_stall = 0, n_data_fix = 0, n_parity_det = 0;
  int n_multi_hit = 0, n_sat = 0, n_conflict = 0, n_reset = 0;

  longint wh [ORDER:1];
  longint exp_y;
  bit     exp_sat;
  bit     exp_valid;

  function automatic longint sat16(input longint v, inout bit s);
    if (v > 32767)  begin s = 1; return 32767;  end
    if (v < -32768) begin s = 1; return -32768; end
    return v;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic model_reset();
    for (int k = 1; k <= ORDER; k++) wh[k] = 0;
    exp_valid = 0;
  endtask

  // Model of one accepted sample.
  task automatic model_step(input logic [15:0] x);
    longint acc, w;
    bit s;
    s   = 0;
    acc = longint'($signed(x)) * 16384;
    for (int k = 1; k <= ORDER; k++) acc -= longint'($signed(a_coef[k])) * wh[k];
    w   = sat16(acc >>> 14, s);
    acc = longint'($signed(b_coef[0])) * w;
    for (int k = 1; k <= ORDER; k++) acc += longint'($signed(b_coef[k])) * wh[k];
    exp_y   = sat16(acc >>> 14, s);
    exp_sat = s;
    for (int k = ORDER; k >= 2; k--) wh[k] = wh[k-1];
    wh[1] = w;
  endtask

  // One clock: drive at the falling edge; after the rising edge check the
  // registered output against the model.
  task automatic cycle(input bit v, input logic [15:0] x,
                       input logic [ORDER:1][CODE_W-1:0] inj);
    @(negedge clk);
    in_valid = v; x_in = x; seu_inject = inj;
    if (v) begin
      model_step(x);
      n_samples++;
    end else n_stall++;
    @(posedge clk);
    #1;
    in_valid = 0; seu_inject = '0;
    check(out_valid == v, "out_valid one cycle after in_valid");
    if (v) begin
      check($signed(y_out) == exp_y,
            $sformatf("y: got %0d expected %0d", $signed(y_out), exp_y));
      check(sat == exp_sat, "sat flag");
      if (sat) n_sat++;
    end
    if (err_corrected) n_data_fix++;
    if (err_detected && !err_corrected) n_parity_det++;
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    model_reset();
    n_reset++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model_reset();
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Phase 1: impulse response, values worked out by hand.
    a_coef    = '0;
    b_coef    = '0;
    a_coef[1] = 16'hE000;     // -0.5
    b_coef[0] = 16'h4000;     // 1.0
    for (int n = 0; n < 12; n++) begin
      cycle(1, (n == 0) ? 16'd8192 : 16'd0, '0);
      check(y_out == 16'(8192 >> n), $sformatf("impulse response n=%0d got %0d", n, y_out));
    end

    // Phase 2: random filter, stalls and single upsets.
    do_reset();
    for (int k = 1; k <= ORDER; k++) a_coef[k] = 16'($urandom_range(0, 1600) - 800);
    for (int k = 0; k <= ORDER; k++) b_coef[k] = 16'($urandom_range(0, 6000) - 3000);
    for (int n = 0; n < 4000; n++) begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      if (!err_detected && $urandom_range(0, 4) == 0)
        inj[$urandom_range(1, ORDER)][$urandom_range(0, CODE_W - 1)] = 1'b1;
      cycle($urandom_range(0, 5) != 0, 16'($urandom_range(0, 16000) - 8000), inj);
    end

    // Let any parity upset leave the line.
    for (int n = 0; n < ORDER + 1; n++) cycle(1, 16'($urandom_range(0, 2000) - 1000), '0);
    check(!err_detected, "line clean before phase 3");

    // Phase 3: one word hit once in every tap on its way down the line.
    for (int k = 1; k <= ORDER; k++) begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      inj[k][k] = 1'b1;
      cycle(1, 16'($urandom_range(0, 2000) - 1000), inj);
      check(err_corrected, $sformatf("phase 3 correction in tap %0d", k));
    end
    n_multi_hit++;
    cycle(1, 16'd0, '0);
    check(!err_detected, "line clean after phase 3");

    // Phase 4: saturation.
    b_coef[0] = 16'h7FFF;
    a_coef[1] = 16'hC200;
    for (int n = 0; n < 200; n++) cycle(1, 16'($urandom), '0);

    // Phase 5: two upsets in one cycle, then reset.
    begin
      logic [ORDER:1][CODE_W-1:0] inj;
      inj = '0;
      inj[3][2]  = 1'b1;
      inj[11][7] = 1'b1;
      cycle(0, '0, inj);
      check(err_conflict, "conflict flagged");
      if (err_conflict) n_conflict++;
    end
    do_reset();
    check(!err_detected && !err_conflict, "clean after reset");
    for (int n = 0; n < 100; n++) cycle(1, 16'($urandom), '0);

    $display("samples=%0d stalls=%0d data corrections=%0d parity detections=%0d multi-hit words=%0d saturations=%0d conflicts=%0d resets=%0d",
             n_samples, n_stall, n_data_fix, n_parity_det, n_multi_hit, n_sat, n_conflict, n_reset);
    check(n_stall > 0,      "stall seen");
    check(n_data_fix > 0,   "data correction seen");
    check(n_parity_det > 0, "parity upset seen");
    check(n_multi_hit > 0,  "multi-hit word seen");
    check(n_sat > 0,        "saturation seen");
    check(n_conflict > 0,   "conflict seen");
    check(n_reset > 0,      "reset seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
