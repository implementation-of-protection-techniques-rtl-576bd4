// Test harness for one iir_seu_top build of a given ORDER, used by
// tb_iir_seu_orders. After `start` it applies NSAMP samples with random
// coefficients (sum of |a_k| below 1, so the filter is stable), random input
// stalls and one random single-bit delay-line upset whenever the line is
// clean, and compares every output with an integer model of the filter.
// Results come out on `checks`, `failures`, `fixes` (cycles with a data-bit
// correction) and `done`.
module iir_order_run #(
  parameter int ORDER = 5,
  parameter int NSAMP = 2000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   fixes
);
  localparam int CODE_W = 21;

  logic in_valid = 0;
  logic [15:0] x_in = '0;
  logic [ORDER:1][15:0] a_coef = '0;
  logic [ORDER:0][15:0] b_coef = '0;
  logic [ORDER:1][CODE_W-1:0] seu_inject = '0;
  logic out_valid, err_detected, err_corrected, err_conflict, sat;
  logic [15:0] y_out;

  iir_seu_top #(.ORDER(ORDER)) dut (
    .clk, .rst_n, .in_valid, .x_in, .a_coef, .b_coef, .seu_inject,
    .out_valid, .y_out, .err_detected, .err_corrected, .err_conflict, .sat
  );

  longint wh [ORDER:1];

  function automatic longint sat16(input longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  initial begin
    longint acc, w, exp_y;
    bit v;
    done = 0; checks = 0; failures = 0; fixes = 0;
    for (int k = 1; k <= ORDER; k++) wh[k] = 0;
    for (int k = 1; k <= ORDER; k++) a_coef[k] = 16'($urandom_range(0, 2 * (12000 / ORDER)) - 12000 / ORDER);
    for (int k = 0; k <= ORDER; k++) b_coef[k] = 16'($urandom_range(0, 6000) - 3000);
    wait (start);
    for (int n = 0; n < NSAMP; n++) begin
      @(negedge clk);
      v        = $urandom_range(0, 5) != 0;
      in_valid = v;
      x_in     = 16'($urandom_range(0, 16000) - 8000);
      seu_inject = '0;
      if (!err_detected && $urandom_range(0, 3) == 0)
        seu_inject[$urandom_range(1, ORDER)][$urandom_range(0, CODE_W - 1)] = 1'b1;
      if (v) begin
        acc = longint'($signed(x_in)) * 16384;
        for (int k = 1; k <= ORDER; k++) acc -= longint'($signed(a_coef[k])) * wh[k];
        w   = sat16(acc >>> 14);
        acc = longint'($signed(b_coef[0])) * w;
        for (int k = 1; k <= ORDER; k++) acc += longint'($signed(b_coef[k])) * wh[k];
        exp_y = sat16(acc >>> 14);
        for (int k = ORDER; k >= 2; k--) wh[k] = wh[k-1];
        wh[1] = w;
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != v) failures++;
      if (v) begin
        checks++;
        if ($signed(y_out) != exp_y) begin
          failures++;
          if (failures < 10)
            $display("FAIL order %0d: y got %0d expected %0d", ORDER, $signed(y_out), exp_y);
        end
      end
      if (err_corrected) fixes++;
    end
    done = 1;
  end
endmodule
