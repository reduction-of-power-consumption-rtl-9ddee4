// Reference model used by the testbenches (not synthesizable, not part of
// the design). Words are held in 32 bits; `w` gives the width in use.
// The model works directly on transmitted words: it classifies each adjacent
// line pair by the direction of its transitions and adds up the coupling cost
// (Type I = 1, Type II = 2) of every candidate word, so it shares no formula
// with the count-based decision blocks it checks.
package coding_ref_pkg;

  typedef logic [31:0] word_t;

  function automatic word_t ref_gray(word_t b, int w);
    word_t g = '0;
    for (int i = 0; i < w; i++) g[i] = (i == 0) ? b[0] : (b[i] ^ b[i-1]);
    return g;
  endfunction

  function automatic word_t ref_bin(word_t g, int w);
    word_t b = '0;
    for (int i = 0; i < w; i++) begin
      b[i] = 1'b0;
      for (int k = 0; k <= i; k++) b[i] ^= g[k];
    end
    return b;
  endfunction

  function automatic word_t ref_inv(word_t g, bit odd, bit even, int w);
    word_t r = g;
    for (int i = 0; i < w; i++)
      if ((i % 2 == 1 && odd) || (i % 2 == 0 && even)) r[i] = ~r[i];
    return r;
  endfunction

  // Transition type of pair (j+1, j): 1, 2, 3 or 4.
  function automatic int ref_type(word_t prev, word_t cur, int j);
    bit a_sw = prev[j+1] != cur[j+1];
    bit b_sw = prev[j]   != cur[j];
    if (!a_sw && !b_sw) return 4;
    if (a_sw != b_sw)   return 1;
    // both switch: same direction if they end at the same value
    return (cur[j+1] == cur[j]) ? 3 : 2;
  endfunction

  function automatic int ref_cost(word_t prev, word_t cur, int w);
    int c = 0;
    for (int j = 0; j < w - 1; j++) begin
      int t = ref_type(prev, cur, j);
      if (t == 1) c += 1;
      if (t == 2) c += 2;
    end
    return c;
  endfunction

  function automatic int ref_count(word_t prev, word_t cur, int w, int typ);
    int c = 0;
    for (int j = 0; j < w - 1; j++) if (ref_type(prev, cur, j) == typ) c++;
    return c;
  endfunction

  // Pairs that are of type `from` before and of type `to` after inversion.
  function automatic int ref_count_change(word_t prev, word_t cur, int w,
                                          bit odd, bit even, int from, int to);
    word_t ci = ref_inv(cur, odd, even, w);
    int c = 0;
    for (int j = 0; j < w - 1; j++)
      if (ref_type(prev, cur, j) == from && ref_type(prev, ci, j) == to) c++;
    return c;
  endfunction

  // Chosen inversion {even, odd} for a Gray word g against link word prev.
  function automatic logic [1:0] ref_choice(word_t prev, word_t g, int w, int scheme);
    logic [1:0] best = 2'b00;
    int bc = ref_cost(prev, g, w);
    if (scheme == 1) begin
      int nsw = $countones((prev ^ g) & ((word_t'(1) << w) - 1));
      int gain = 0;
      word_t gi = ref_inv(g, 1'b1, 1'b0, w);
      for (int j = 0; j < w - 1; j++)
        if (ref_type(prev, g, j) == 1 && ref_type(prev, gi, j) != 2) gain++;
      if (2 * nsw > w)            return 2'b11;
      else if (2 * gain > w - 1)  return 2'b01;
      else                        return 2'b00;
    end
    for (int k = 1; k < 4; k++) begin
      int c;
      if (scheme == 2 && k == 2) continue;
      c = ref_cost(prev, ref_inv(g, k[0], k[1], w), w);
      if (c < bc) begin bc = c; best = k[1:0]; end
    end
    return best;
  endfunction

endpackage
