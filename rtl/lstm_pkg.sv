// lstm_pkg: widths, scales and shared types of the quantized LSTM layer with
// lookupx activations.
//
// Number formats (all two's complement unless noted):
//   x_t      4-bit input vector element, real value * 16
//   W        5-bit weight, real value * 16
//   b        10-bit bias, real value * 256 (scale squared)
//   preact   gate pre-activation, real value * 256, saturated to 10 bits
//            ([-512, 511], i.e. the [-2, 2) range the activation sees)
//   sigma    sigmoid output, real value * 256, in [0, 256]
//   tanh     tanh output, real value * 256, in [-256, 256]
//   c_t      cell state, real value * 256, saturated to C_W bits
//   h_t      hidden output, real value * 16, in [-16, 16]
// The 4/5/10-bit widths, the scale of 16 and the [-512, 512] activation range
// follow the reference design; the widths of c_t and h_t are this design's choice.
package lstm_pkg;

  localparam int X_W      = 4;   // input element width
  localparam int W_W      = 5;   // weight width
  localparam int B_W      = 10;  // bias width
  localparam int ACT_IN_W = 10;  // activation input width
  localparam int ACT_O_W  = 10;  // activation output width (holds -256..256)
  localparam int C_W      = 12;  // cell state width
  localparam int H_W      = 6;   // hidden output width (holds -16..16)
  localparam int SCALE_SH = 4;   // log2 of the quantization scale (16)

  localparam int LX_ENTRIES = 8;  // lookupx offset registers per unit
  localparam int LX_ADDR_W  = 3;
  localparam int LX_OFF_W   = 10;

  // Default offsets: offset_k = round(mean over the 128 inputs x of segment k
  // of (f(x) - (x >>> SHIFT))), with f the activation scaled by 256 on both
  // axes and segment k covering x in [-512 + 128k, -385 + 128k].
  // Sigmoid: f(x) = 256 / (1 + exp(-x/256)), SHIFT = 2 (x/4, as in eq. (9)).
  localparam logic [LX_ENTRIES*LX_OFF_W-1:0] SIG_OFFSETS = {
    10'sd106, 10'sd119, 10'sd126, 10'sd128,
    10'sd129, 10'sd131, 10'sd138, 10'sd151};
  // Tanh: f(x) = 256 * tanh(x/256), SHIFT = 1 (x/2).
  localparam logic [LX_ENTRIES*LX_OFF_W-1:0] TANH_OFFSETS = {
    10'sd17,  10'sd56,  10'sd65,  10'sd30,
    -10'sd29, -10'sd64, -10'sd56, -10'sd16};

  typedef enum logic [1:0] {
    GATE_I = 2'd0,  // input gate, sigmoid
    GATE_F = 2'd1,  // forget gate, sigmoid
    GATE_G = 2'd2,  // cell (candidate) gate, tanh
    GATE_O = 2'd3   // output gate, sigmoid
  } gate_e;

  typedef enum logic {
    FUNC_SIGMOID = 1'b0,
    FUNC_TANH    = 1'b1
  } act_func_e;

endpackage
