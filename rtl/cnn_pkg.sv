// cnn_pkg: types, fixed-point rules and constant coefficients shared by the
// MNIST CNN (28x28 input, conv 3x3x2, max pool 2x2, conv 3x3x4, conv 3x3x4,
// conv 3x3x2, fully connected 98->10, argmax).
//
// Every feature-map value and every coefficient is a signed 16-bit word. A
// 3x3 kernel row is packed as one 48-bit word holding three 16-bit
// coefficients, the leftmost column in bits [47:32]; pixel rows use the same
// packing. Products are summed in an accumulator of 2*16+9 = 41 bits, the
// width the design's resource notes give, and brought back to 16 bits by an
// arithmetic right shift of FRAC_W bits with saturation (the shift and the
// saturation are this design's choice: the coefficients are read as signed
// values with 14 fractional bits).
//
// The first-layer coefficients are the trained values of the original
// design. The trained values of layers 2-4 and the FC biases are not
// available, so this package generates placeholder values from a fixed
// formula (a 32-bit integer hash of the coefficient's position, reduced to
// the range -8192..8191, i.e. -0.5..0.5). Replace the functions below with a
// trained set.
package cnn_pkg;

  localparam int DATA_W = 16;
  localparam int LINE_W = 3 * DATA_W;       // one kernel/pixel row
  localparam int ACC_W  = 2 * DATA_W + 9;   // accumulator width
  localparam int FRAC_W = 14;               // coefficient fractional bits
  localparam int ADDR_W = 10;               // 1K x 16 RAM blocks

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic [LINE_W-1:0]        line_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // One 3x3 kernel: three packed rows.
  typedef line_t kernel_t [3];

  // Shift an accumulator down by FRAC_W bits and saturate it to 16 bits.
  function automatic data_t scale_sat(acc_t acc);
    acc_t sh;
    sh = acc >>> FRAC_W;
    if (sh > acc_t'(32767))       return data_t'(16'sh7fff);
    else if (sh < -acc_t'(32768)) return data_t'(16'sh8000);
    else                          return data_t'(sh[DATA_W-1:0]);
  endfunction

  // Saturating 16-bit addition.
  function automatic data_t add_sat(data_t a, data_t b);
    logic signed [DATA_W:0] s;
    s = {a[DATA_W-1], a} + {b[DATA_W-1], b};
    if (s > 17'sd32767)       return data_t'(16'sh7fff);
    else if (s < -17'sd32768) return data_t'(16'sh8000);
    else                      return data_t'(s[DATA_W-1:0]);
  endfunction

  // ---------------------------------------------------------------- layer 1
  // Trained coefficients of convolution 1 (2 filters, 1 input channel).
  localparam line_t CONV1_W [2][3] = '{
    '{48'hE8B40AA227C9, 48'hE8C51ED91D50, 48'hFAFA1F111C0D},
    '{48'h23460FDF05DD, 48'hF345202C1CA9, 48'hD9E0D613F0EF}};
  localparam data_t CONV1_B [2] = '{16'sh0002, 16'shFFFD};

  // ---------------------------------------------------- placeholder values
  // Hash of (layer, filter, channel, row, column) -> -2048..2047.
  function automatic data_t gen_coef(int layer, int filt, int ch, int row, int col);
    int unsigned h;
    h = 32'h9E3779B9 ^ (layer * 32'h01000193);
    h = (h ^ filt) * 32'h85EBCA6B;
    h = (h ^ ch)   * 32'hC2B2AE35;
    h = (h ^ row)  * 32'h27D4EB2F;
    h = (h ^ col)  * 32'h165667B1;
    h = h ^ (h >> 15);
    return data_t'(int'(h[13:0]) - 8192);
  endfunction

  function automatic line_t gen_line(int layer, int filt, int ch, int row);
    return {gen_coef(layer, filt, ch, row, 0),
            gen_coef(layer, filt, ch, row, 1),
            gen_coef(layer, filt, ch, row, 2)};
  endfunction

  // Bias of a filter of layers 2..4: small values in the output scale.
  function automatic data_t gen_bias(int layer, int filt);
    return data_t'(int'(gen_coef(layer, filt, 7, 7, 7)) >>> 6);
  endfunction

  // FC bias of digit d, 8 bits as in the FC bias block.
  function automatic logic signed [7:0] fc_bias(int d);
    return 8'(int'(gen_coef(5, d, 0, 0, 0)) >>> 5);
  endfunction

endpackage
