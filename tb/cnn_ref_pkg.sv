// cnn_ref_pkg: reference model of the CNN for the testbenches, written
// separately from the RTL with plain integers. It follows the arithmetic the
// design specifies: 16-bit signed words, 3x3 kernel rows packed as three
// words (leftmost column in bits [47:32]), exact dot products shifted right
// by 14 bits (rounding toward minus infinity) and saturated to 16 bits,
// 16-bit wrapping bias addition followed by clamping of negatives, saturating
// channel sums, 2x2 max pooling, and an FC layer summing 98 exact products
// before the same scaling and a saturating bias addition.
package cnn_ref_pkg;

  localparam int FR = 14;

  typedef int map_t [4][28][28];

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int wrap16(longint v);
    longint m;
    m = v & 64'hFFFF;
    return (m >= 32768) ? int'(m - 65536) : int'(m);
  endfunction

  function automatic int relu(int x, int b);
    int s;
    s = wrap16(longint'(x) + longint'(b));
    return (s < 0) ? 0 : s;
  endfunction

  // Column j (0..2) of a packed 48-bit row, as a signed integer.
  function automatic int col_of(logic [47:0] line, int j);
    logic [15:0] w;
    w = line >> (16 * (2 - j));
    return int'($signed(w));
  endfunction

  // Exact floor(v / 2^FR), then saturation.
  function automatic int scale(longint v);
    longint q;
    q = v / (longint'(1) << FR);
    if (v < 0 && q * (longint'(1) << FR) != v) q = q - 1;
    return sat16(q);
  endfunction

  // 3x3 window at (r, c) of channel ch of map m against a packed kernel.
  function automatic int conv9(const ref map_t m, input int ch, int r, int c,
                               logic [47:0] k0, logic [47:0] k1, logic [47:0] k2);
    longint s;
    logic [47:0] k [3];
    k[0] = k0; k[1] = k1; k[2] = k2;
    s = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        s += longint'(m[ch][r+i][c+j]) * longint'(col_of(k[i], j));
    return scale(s);
  endfunction

endpackage
