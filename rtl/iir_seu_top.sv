// Direct form II IIR filter with an SEU-protected delay line.
//
// The filter computes w[n] = x[n] - sum a_k w[n-k] and y[n] = sum b_k w[n-k]
// (k up to ORDER). Its only long-lived state, the delay line of w values, is
// guarded against single event upsets with a Hamming single-error-correcting
// code arranged for low area: one encoder at the head of the line, a syndrome
// calculator and corrector per tap, and one error locator shared by all taps
// (see protected_delay_line). The multipliers always see corrected values, so
// an upset in a tap never reaches the output or the feedback.
//
// Timing: when `in_valid` is high at a rising clock edge, x_in is consumed,
// the delay line shifts in w[n], and y[n] appears on `y_out` with `out_valid`
// high in the following cycle (one cycle latency, one sample per cycle at
// most). With `in_valid` low the filter holds. `sat` (registered with y_out)
// reports that w[n] or y[n] was saturated. The error flags are combinational
// views of the delay line's current contents: `err_detected` (some tap has a
// nonzero syndrome), `err_corrected` (a data bit is being corrected) and
// `err_conflict` (more than one tap flagged, outside the one-upset-at-a-time
// assumption). `seu_inject` flips stored delay-line bits for test; tie it to
// zero in use.
//
// The protection scheme and the filter structure follow the published method;
// the number format, register placement, reset, handshake and SEU-injection
// port are this design's own choices. Default order 15 is the largest order
// the method was evaluated at; orders 5 and 10 are ORDER settings.
module iir_seu_top #(
  parameter  int unsigned DATA_W    = 16,
  parameter  int unsigned COEF_W    = 16,
  parameter  int unsigned COEF_FRAC = 14,
  parameter  int unsigned ORDER     = 15,
  localparam int unsigned CODE_W    = DATA_W + iir_seu_pkg::hamming_p(DATA_W)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [DATA_W-1:0]           x_in,
  input  logic [ORDER:1][COEF_W-1:0]  a_coef,
  input  logic [ORDER:0][COEF_W-1:0]  b_coef,
  input  logic [ORDER:1][CODE_W-1:0]  seu_inject,
  output logic                        out_valid,
  output logic [DATA_W-1:0]           y_out,
  output logic                        err_detected,
  output logic                        err_corrected,
  output logic                        err_conflict,
  output logic                        sat
);

  logic [ORDER:1][DATA_W-1:0] taps;
  logic [DATA_W-1:0]          w_n, y_n;
  logic                       w_sat, y_sat;

  iir_df2_datapath #(
    .DATA_W    (DATA_W),
    .COEF_W    (COEF_W),
    .COEF_FRAC (COEF_FRAC),
    .ORDER     (ORDER)
  ) u_dp (
    .x_in   (x_in),
    .taps   (taps),
    .a_coef (a_coef),
    .b_coef (b_coef),
    .w_out  (w_n),
    .y_out  (y_n),
    .w_sat  (w_sat),
    .y_sat  (y_sat)
  );

  protected_delay_line #(
    .DATA_W (DATA_W),
    .ORDER  (ORDER)
  ) u_dl (
    .clk           (clk),
    .rst_n         (rst_n),
    .shift         (in_valid),
    .w_in          (w_n),
    .seu_inject    (seu_inject),
    .taps          (taps),
    .err_detected  (err_detected),
    .err_corrected (err_corrected),
    .err_conflict  (err_conflict)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_out     <= '0;
      sat       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_out <= y_n;
        sat   <= w_sat | y_sat;
      end
    end
  end

endmodule
