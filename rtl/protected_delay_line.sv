// Hamming-protected delay line of a direct form II IIR filter.
//
// The line holds the filter states w[n-1] .. w[n-ORDER]. Each tap register
// stores a codeword: the data word and its Hamming parity bits. Protection
// uses three ideas:
//   * One encoder only. The new state w[n] is encoded once, on its way into
//     tap 1. No other tap re-encodes.
//   * Corrected data moves on. Tap k+1 takes the corrected data of tap k and
//     the parity bits of tap k unchanged. A word can therefore pick up one
//     data-bit upset per tap it passes through and still arrive corrected,
//     as long as the upsets happen in different cycles.
//   * One shared locator. Every tap has its own syndrome calculator and
//     corrector, but the logic that turns a syndrome into an error vector
//     exists once. The lowest-numbered tap with a nonzero syndrome is granted
//     the locator; its corrector applies the error vector. The one-locator
//     scheme assumes at most one tap is upset at a time. When several taps
//     are flagged, `err_conflict` rises and only the granted tap is corrected.
//     The others keep their upset. An ungranted upset in the data bits is
//     corrected one shift later, once it is the only flagged tap, because its
//     parity bits travel with it. Gating each corrector by the grant, so a
//     second tap is left alone rather than miscorrected, is this design's
//     choice.
// A parity-bit upset is detected but not repaired. It travels to the end of
// the line with its word and does no harm there, because the data bits are
// intact. It does occupy the shared locator until it leaves the line.
//
// Timing: on a rising clock edge with `shift` high every tap advances by one;
// with `shift` low the registers hold. `taps` and the error flags are
// combinational from the registers. Reset (asynchronous, active low) clears
// every tap to the all-zero codeword, which is valid.
// `seu_inject` emulates upsets for test: the mask is XORed into the tap
// registers on every clock edge, so a set bit flips that stored bit. Tie it to
// zero in use. Bit layout per tap: data in [DATA_W-1:0], parity above it.
module protected_delay_line #(
  parameter  int unsigned DATA_W = 16,
  parameter  int unsigned ORDER  = 15,
  localparam int unsigned P_W    = iir_seu_pkg::hamming_p(DATA_W),
  localparam int unsigned CODE_W = DATA_W + P_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          shift,
  input  logic [DATA_W-1:0]             w_in,
  input  logic [ORDER:1][CODE_W-1:0]    seu_inject,
  output logic [ORDER:1][DATA_W-1:0]    taps,
  output logic                          err_detected,
  output logic                          err_corrected,
  output logic                          err_conflict
);

  typedef struct packed {
    logic [P_W-1:0]    parity;
    logic [DATA_W-1:0] data;
  } code_t;

  code_t                 q        [ORDER:1];
  code_t                 nxt      [ORDER:1];
  logic [P_W-1:0]        parity_in;
  logic [P_W-1:0]        syn      [ORDER:1];
  logic [ORDER:1]        nz;
  logic [ORDER:1]        grant;
  logic [P_W-1:0]        syn_sel;
  logic [DATA_W-1:0]     err_vec;

  // The single encoder, at the head of the line.
  hamming_encoder #(.DATA_W(DATA_W)) u_enc (
    .data   (w_in),
    .parity (parity_in)
  );

  for (genvar k = 1; k <= ORDER; k++) begin : g_tap
    hamming_syndrome #(.DATA_W(DATA_W)) u_syn (
      .data     (q[k].data),
      .parity   (q[k].parity),
      .syndrome (syn[k]),
      .nonzero  (nz[k])
    );

    hamming_corrector #(.DATA_W(DATA_W)) u_cor (
      .data_in  (q[k].data),
      .err_vec  (err_vec),
      .enable   (grant[k]),
      .data_out (taps[k])
    );
  end

  // Grant the shared locator to the lowest-numbered flagged tap.
  always_comb begin
    grant   = '0;
    syn_sel = '0;
    for (int k = ORDER; k >= 1; k--) begin
      if (nz[k]) begin
        grant   = '0;
        grant[k] = 1'b1;
        syn_sel = syn[k];
      end
    end
  end

  // The shared locator serves at most one tap, and only a flagged one.
  always_comb begin
    if (rst_n) begin
      assert ((grant & (grant - 1'b1)) == '0) else $error("locator granted to more than one tap");
      assert ((grant & ~nz) == '0) else $error("locator granted to an unflagged tap");
    end
  end

  hamming_locator #(.DATA_W(DATA_W)) u_loc (
    .syndrome (syn_sel),
    .err_vec  (err_vec)
  );

  assign err_detected  = |nz;
  assign err_corrected = |err_vec;
  assign err_conflict  = (nz & (nz - 1'b1)) != '0;

  // Next codewords: tap 1 from the encoder, tap k from the corrected data and
  // the unchanged parity of tap k-1.
  always_comb begin
    nxt[1] = '{parity: parity_in, data: w_in};
    for (int k = 2; k <= ORDER; k++) begin
      nxt[k] = '{parity: q[k-1].parity, data: taps[k-1]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k <= ORDER; k++) q[k] <= '0;
    end else begin
      for (int k = 1; k <= ORDER; k++) begin
        q[k] <= (shift ? nxt[k] : q[k]) ^ code_t'(seu_inject[k]);
      end
    end
  end

endmodule
