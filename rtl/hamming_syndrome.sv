// Hamming syndrome calculator, one per delay-line tap.
//
// Recomputes the parity of the stored data bits and XORs it with the stored
// parity bits. With no upset the syndrome is all zeros; with one flipped bit
// it equals the codeword position of that bit (a power of two when a parity
// bit flipped, any other value when a data bit flipped). `nonzero` is the OR
// of the syndrome bits and serves as the enable of the tap's error corrector.
// The error locator that turns a syndrome into a bit position is not here: it
// is shared among all taps (hamming_locator).
//
// Interface: `data`, `parity` in; `syndrome`, `nonzero` out; combinational.
module hamming_syndrome #(
  parameter  int unsigned DATA_W = 16,
  localparam int unsigned P_W    = iir_seu_pkg::hamming_p(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  input  logic [P_W-1:0]    parity,
  output logic [P_W-1:0]    syndrome,
  output logic              nonzero
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
    for (int unsigned j = 0; j < P_W; j++) syndrome[j] = parity[j] ^ (^(data & MASK[j]));
    nonzero = |syndrome;
  end

endmodule
