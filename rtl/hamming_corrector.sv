// Hamming error corrector, one per delay-line tap.
//
// Flips the data bits marked in the error vector from the shared locator when
// `enable` is high, and passes the data through unchanged otherwise. The
// enable is the tap's OR-combined syndrome, gated in the delay line by the
// grant of the shared locator.
//
// Interface: `data_in`, `err_vec`, `enable` in; `data_out` out; combinational.
module hamming_corrector #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] data_in,
  input  logic [DATA_W-1:0] err_vec,
  input  logic              enable,
  output logic [DATA_W-1:0] data_out
);

  assign data_out = enable ? (data_in ^ err_vec) : data_in;

endmodule
