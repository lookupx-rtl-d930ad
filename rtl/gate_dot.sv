// gate_dot: pre-activation of one gate of one LSTM unit,
//   z = sum_k Wx[k]*x[k] + sum_k Wh[k]*h[k] + b,
// computed in the quantized integer domain (eqs. (1)-(3), (5) before the
// activation). With inputs and weights at scale 16 the products are at scale
// 256, the scale the bias is stored in, so the sum needs no rescaling.
//
// All N_X + N_H products and the bias are summed in one combinational tree;
// the result is clamped to the ACT_IN_W-bit activation input range
// ([-512, 511]) and sat flags that the clamp acted. The one-cycle full-width
// dot product and the clamp are this design's choices; the reference design gives
// only the arithmetic and the [-512, 512] range of the activation input.
module gate_dot
  import lstm_pkg::*;
#(
  parameter int N_X = 8,
  parameter int N_H = 8
) (
  input  logic signed [X_W-1:0]      x    [N_X],
  input  logic signed [H_W-1:0]      h    [N_H],
  input  logic signed [W_W-1:0]      wx   [N_X],
  input  logic signed [W_W-1:0]      wh   [N_H],
  input  logic signed [B_W-1:0]      bias,
  output logic signed [ACT_IN_W-1:0] z,
  output logic                       sat
);

  localparam int ACC_W = W_W + H_W + $clog2(N_X + N_H + 1) + 2;
  localparam logic signed [ACC_W-1:0] ZMAX = ACC_W'(2**(ACT_IN_W-1) - 1);
  localparam logic signed [ACC_W-1:0] ZMIN = -ACC_W'(2**(ACT_IN_W-1));

  logic signed [ACC_W-1:0] acc;

  always_comb begin
    acc = ACC_W'(bias);
    for (int k = 0; k < N_X; k++) acc += ACC_W'(wx[k] * x[k]);
    for (int k = 0; k < N_H; k++) acc += ACC_W'(wh[k] * h[k]);
    sat = 1'b0;
    if (acc > ZMAX) begin
      z   = ZMAX[ACT_IN_W-1:0];
      sat = 1'b1;
    end else if (acc < ZMIN) begin
      z   = ZMIN[ACT_IN_W-1:0];
      sat = 1'b1;
    end else begin
      z = acc[ACT_IN_W-1:0];
    end
  end

endmodule
