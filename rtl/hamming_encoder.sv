// Hamming SEC encoder: computes the parity bits of one data word.
//
// In the protected filter there is a single instance of this encoder, at the
// head of the delay line, where the new state w[n] enters the first tap. The
// later taps inherit their parity bits from the tap before them instead of
// re-encoding, which is what saves the per-tap encoders of the conventional
// scheme. Parity bit j is the XOR of the data bits whose codeword position
// (see iir_seu_pkg) has bit j set.
//
// Interface: `data` in, `parity` out, purely combinational (no clock).
// The number of parity bits follows the Hamming rule d + p + 1 <= 2**p; the
// 16-bit default data width is this design's choice.
module hamming_encoder #(
  parameter  int unsigned DATA_W = 16,
  localparam int unsigned P_W    = iir_seu_pkg::hamming_p(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [P_W-1:0]    parity
);

  typedef logic [P_W-1:0][DATA_W-1:0] mask_t;

  // MASK[j] selects the data bits covered by parity bit j.
  function automatic mask_t parity_masks();
    mask_t m;
    m = '0;
    for (int unsigned i = 0; i < DATA_W; i++)
      for (int unsigned j = 0; j < P_W; j++)
        m[j][i] = ((iir_seu_pkg::data_pos(i) >> j) & 1) != 0;
    return m;
  endfunction

  localparam mask_t MASK = parity_masks();

  always_comb begin
    for (int unsigned j = 0; j < P_W; j++) parity[j] = ^(data & MASK[j]);
  end

endmodule
