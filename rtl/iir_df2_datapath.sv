// Arithmetic of a direct form II IIR filter of order ORDER (M = N).
//
//   w[n] = x[n] - sum_{k=1..N} a_k * w[n-k]
//   y[n] =        sum_{k=0..N} b_k * w[n-k]
//
// The delay-line states w[n-1] .. w[n-N] come in on `taps`; the new state
// w[n] goes out on `w_out` (to be written into the delay line) and is also
// used for the b_0 term of y[n]. Combinational.
//
// Number format (this design's choice): samples and states are signed
// DATA_W-bit integers; coefficients are signed COEF_W-bit fixed point with
// COEF_FRAC fraction bits (Q2.14 by default, so |coefficient| < 2). Products
// are summed at full precision, shifted right by COEF_FRAC (an arithmetic
// shift, so rounding is toward minus infinity) and saturated to DATA_W bits.
// `w_sat` and `y_sat` report that saturation happened.
module iir_df2_datapath #(
  parameter  int unsigned DATA_W    = 16,
  parameter  int unsigned COEF_W    = 16,
  parameter  int unsigned COEF_FRAC = 14,
  parameter  int unsigned ORDER     = 15,
  localparam int unsigned ACC_W     = DATA_W + COEF_W + $clog2(ORDER + 2) + 1
) (
  input  logic [DATA_W-1:0]           x_in,
  input  logic [ORDER:1][DATA_W-1:0]  taps,
  input  logic [ORDER:1][COEF_W-1:0]  a_coef,
  input  logic [ORDER:0][COEF_W-1:0]  b_coef,
  output logic [DATA_W-1:0]           w_out,
  output logic [DATA_W-1:0]           y_out,
  output logic                        w_sat,
  output logic                        y_sat
);

  localparam logic signed [ACC_W-1:0] MAX_V = ACC_W'(  (64'sd1 <<< (DATA_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MIN_V = ACC_W'(-(64'sd1 <<< (DATA_W - 1)));

  logic signed [ACC_W-1:0] acc_a, w_full, w_q;
  logic signed [ACC_W-1:0] acc_b, y_q;

  always_comb begin
    acc_a = '0;
    for (int k = 1; k <= ORDER; k++) begin
      acc_a = acc_a + ACC_W'($signed(a_coef[k]) * $signed(taps[k]));
    end
    w_full = (ACC_W'($signed(x_in)) <<< COEF_FRAC) - acc_a;
    w_q    = w_full >>> COEF_FRAC;
    w_sat  = (w_q > MAX_V) || (w_q < MIN_V);
    if (w_q > MAX_V)      w_out = MAX_V[DATA_W-1:0];
    else if (w_q < MIN_V) w_out = MIN_V[DATA_W-1:0];
    else                  w_out = w_q[DATA_W-1:0];

    acc_b = ACC_W'($signed(b_coef[0]) * $signed(w_out));
    for (int k = 1; k <= ORDER; k++) begin
      acc_b = acc_b + ACC_W'($signed(b_coef[k]) * $signed(taps[k]));
    end
    y_q   = acc_b >>> COEF_FRAC;
    y_sat = (y_q > MAX_V) || (y_q < MIN_V);
    if (y_q > MAX_V)      y_out = MAX_V[DATA_W-1:0];
    else if (y_q < MIN_V) y_out = MIN_V[DATA_W-1:0];
    else                  y_out = y_q[DATA_W-1:0];
  end

endmodule
