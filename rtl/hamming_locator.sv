// Hamming error locator, shared by all taps of the delay line.
//
// Decodes one syndrome into an error vector over the data bits: bit i of
// `err_vec` is set when the syndrome equals the codeword position of data
// bit i. A zero syndrome, or one that points at a parity bit, gives an all-zero
// vector, since parity bits are never corrected (they are passed from tap to
// tap unchanged). Sharing one locator among all taps relies on at most one
// tap holding an upset at a time.
//
// Interface: `syndrome` in, `err_vec` out; combinational.
module hamming_locator #(
  parameter  int unsigned DATA_W = 16,
  localparam int unsigned P_W    = iir_seu_pkg::hamming_p(DATA_W)
) (
  input  logic [P_W-1:0]    syndrome,
  output logic [DATA_W-1:0] err_vec
);

  typedef logic [DATA_W-1:0][P_W-1:0] pos_t;

  // POS[i] is the codeword position of data bit i.
  function automatic pos_t data_positions();
    pos_t p;
    for (int unsigned i = 0; i < DATA_W; i++) p[i] = P_W'(iir_seu_pkg::data_pos(i));
    return p;
  endfunction

  localparam pos_t POS = data_positions();

  always_comb begin
    for (int unsigned i = 0; i < DATA_W; i++) err_vec[i] = (syndrome == POS[i]);
  end

endmodule
