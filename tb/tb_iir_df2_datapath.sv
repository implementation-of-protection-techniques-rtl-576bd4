// Testbench for iir_df2_datapath (order 4): random states and coefficients
// against an integer model of w[n] = x[n] - sum a_k w[n-k] and
// y[n] = sum b_k w[n-k], each scaled by 2**-14 (floor) and saturated to 16
// bits. Small coefficients exercise the unsaturated path, large ones force
// saturation of w and y; both kinds are counted.
module tb_iir_df2_datapath;
  localparam int ORDER = 4;

  logic [15:0]             x_in;
  logic [ORDER:1][15:0]    taps;
  logic [ORDER:1][15:0]    a_coef;
  logic [ORDER:0][15:0]    b_coef;
  logic [15:0]             w_out, y_out;
  logic                    w_sat, y_sat;
  int checks = 0, failures = 0, n_sat = 0, n_plain = 0;

  iir_df2_datapath #(.DATA_W(16), .COEF_W(16), .COEF_FRAC(14), .ORDER(ORDER)) dut (
    .x_in, .taps, .a_coef, .b_coef, .w_out, .y_out, .w_sat, .y_sat
  );

  function automatic longint sat16(input longint v, output bit s);
    s = 0;
    if (v > 32767)  begin s = 1; return 32767;  end
    if (v < -32768) begin s = 1; return -32768; end
    return v;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint acc, w, y;
      bit ws, ys;
      int lim;
      lim = (n % 2 == 0) ? 2000 : 32767;
      x_in = 16'($urandom);
      for (int k = 1; k <= ORDER; k++) begin
        taps[k]   = 16'($urandom);
        a_coef[k] = 16'($urandom_range(0, 2 * lim) - lim);
      end
      for (int k = 0; k <= ORDER; k++) b_coef[k] = 16'($urandom_range(0, 2 * lim) - lim);
      #1;
      acc = longint'($signed(x_in)) * 16384;
      for (int k = 1; k <= ORDER; k++) acc -= longint'($signed(a_coef[k])) * longint'($signed(taps[k]));
      w = sat16(acc >>> 14, ws);
      acc = longint'($signed(b_coef[0])) * w;
      for (int k = 1; k <= ORDER; k++) acc += longint'($signed(b_coef[k])) * longint'($signed(taps[k]));
      y = sat16(acc >>> 14, ys);
      checks++;
      if ($signed(w_out) != w || w_sat != ws) begin
        failures++;
        $display("FAIL w: got %0d/%0d expected %0d/%0d", $signed(w_out), w_sat, w, ws);
      end
      checks++;
      if ($signed(y_out) != y || y_sat != ys) begin
        failures++;
        $display("FAIL y: got %0d/%0d expected %0d/%0d", $signed(y_out), y_sat, y, ys);
      end
      if (ws || ys) n_sat++; else n_plain++;
    end
    $display("saturated=%0d unsaturated=%0d", n_sat, n_plain);
    checks++;
    if (n_sat == 0 || n_plain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
