// Reference model of the Hamming SEC code used by the testbenches.
//
// Builds the codeword explicitly: positions 1..d+p, parity bits at the powers
// of two, data bits filling the other positions in order. Parity bit j is then
// the XOR of every codeword bit whose position has bit j set. Works for up to
// 57 data bits.
package hamming_ref_pkg;

  function automatic int ref_p(input int d);
    int p;
    for (p = 1; p < 8; p++) if ((1 << p) >= d + p + 1) break;
    return p;
  endfunction

  // Position of data bit i in the codeword.
  function automatic int ref_pos(input int d, input int i);
    int idx;
    idx = 0;
    for (int pos = 1; pos <= d + ref_p(d); pos++) begin
      if ($countones(pos) != 1) begin
        if (idx == i) return pos;
        idx++;
      end
    end
    return -1;
  endfunction

  function automatic longint unsigned ref_parity(input longint unsigned data, input int d);
    bit cw [1:127];
    int idx, n, p;
    longint unsigned par;
    p   = ref_p(d);
    n   = d + p;
    idx = 0;
    for (int pos = 1; pos <= n; pos++) begin
      if ($countones(pos) == 1) cw[pos] = 1'b0;
      else begin
        cw[pos] = data[idx];
        idx++;
      end
    end
    par = 0;
    for (int j = 0; j < p; j++)
      for (int pos = 1; pos <= n; pos++)
        if (pos[j] && cw[pos]) par[j] = ~par[j];
    return par;
  endfunction

endpackage
