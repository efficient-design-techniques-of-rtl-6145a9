// cnn_pkg: number formats and constant tables of the vessel-detection CNN.
// Pixels are 8-bit unsigned integers. Weights and biases are Q2.6 (8-bit
// signed: sign, one integer bit, six fractional bits). Activations and sums
// are Q11.6 (17-bit signed) and wrap on overflow. A product of an activation
// and a weight is shifted right by FRAC bits (truncation), so the six
// fractional bits are kept throughout; a pixel times a weight needs no shift.
// The trained weights are not published, so every ROM of the design is filled
// from cnn_weight(), a fixed integer hash that yields values in [-4/64, 4/64].
// Any other table can be substituted by changing this one function.
package cnn_pkg;
  localparam int PIX_W = 8;
  localparam int W_W   = 8;
  localparam int FRAC  = 6;
  localparam int ACT_W = 17;

  typedef logic signed [ACT_W-1:0] act_t;
  typedef logic signed [W_W-1:0]   wgt_t;

  // Table identifiers for cnn_weight().
  localparam int T_CONV1 = 1;
  localparam int T_BIAS1 = 2;
  localparam int T_CONV2 = 3;
  localparam int T_BIAS2 = 4;
  localparam int T_FC    = 5;
  localparam int T_FCB   = 6;
  localparam int T_OUT   = 7;
  localparam int T_OUTB  = 8;

  // Weight of table t at indices (a, b, c): a small signed Q2.6 value.
  function automatic wgt_t cnn_weight(int t, int a, int b, int c);
    logic [31:0] h;
    h = 32'h9E37_79B9 * (t + 1);
    h = h ^ (a * 32'd73856093);
    h = h ^ (b * 32'd19349663);
    h = h ^ (c * 32'd83492791);
    h = h ^ (h >> 13);
    h = h * 32'h5BD1_E995;
    h = h ^ (h >> 15);
    return wgt_t'(int'(h % 32'd9) - 4);
  endfunction
endpackage
