// Shared constants and helper functions for the SEU-protected IIR filter.
//
// The delay line of the filter stores every state word together with the
// parity bits of a single-error-correcting Hamming code. The code follows the
// classic layout: codeword positions are numbered from 1, parity bit j sits at
// position 2**j, and the data bits fill the remaining positions in increasing
// order. Parity bit j is the XOR of all data bits whose position has bit j
// set, so the syndrome of a word with one flipped bit equals the position of
// that bit. The number of parity bits p is the smallest one satisfying the
// Hamming rule d + p + 1 <= 2**p for d data bits.
package iir_seu_pkg;

  // Number of Hamming parity bits for `d` data bits.
  function automatic int unsigned hamming_p(input int unsigned d);
    int unsigned p;
    p = 1;
    while (d + p + 1 > (32'd1 << p)) p++;
    return p;
  endfunction

  // Codeword position (1-based) of data bit `i` (0-based). Start from i+1 and
  // step over every parity position (power of two) at or below the result.
  function automatic int unsigned data_pos(input int unsigned i);
    int unsigned pos;
    pos = i + 1;
    for (int j = 0; j < 31; j++) begin
      if ((32'd1 << j) <= pos) pos++;
    end
    return pos;
  endfunction

endpackage
