// lstm_elementwise: the pointwise part of one LSTM unit, eqs. (4) and (6):
//   c_t = f * c_{t-1} + i * g          (cell state)
//   h_t = o * tanh(c_t)                (hidden output)
// in the integer domain. Gate values i, f, o (sigmoid, 0..256) and g (tanh,
// -256..256) are at scale 256; c is kept at scale 256 in C_W bits, so the
// products are at scale 65536 and are brought back with a rounding shift by 8.
// tanh(c_t) is a lookupx unit (SHIFT = 1, tanh offset table) fed with c_t
// clamped to the 10-bit activation range; h_t = o * tanh(c_t) is at scale
// 65536 and is rounded by a shift of 12 to the scale-16 format of the inputs,
// so it can be fed back to the gates. The equations are the standard LSTM ones; the
// formats, the rounding (add half, shift) and the clamps are this design's.
//
// Timing: purely combinational apart from the tanh offset registers, which
// are written through off_we/off_addr/off_wdata. c_sat flags that c_t was
// clamped to C_W bits.
module lstm_elementwise
  import lstm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        off_we,
  input  logic [LX_ADDR_W-1:0]        off_addr,
  input  logic signed [LX_OFF_W-1:0]  off_wdata,
  input  logic signed [ACT_O_W-1:0]   i_g,
  input  logic signed [ACT_O_W-1:0]   f_g,
  input  logic signed [ACT_O_W-1:0]   g_g,
  input  logic signed [ACT_O_W-1:0]   o_g,
  input  logic signed [C_W-1:0]       c_prev,
  output logic signed [C_W-1:0]       c_new,
  output logic signed [H_W-1:0]       h_new,
  output logic                        c_sat
);

  localparam int P_W = ACT_O_W + C_W + 2;
  localparam logic signed [P_W-1:0] CMAX = P_W'(2**(C_W-1) - 1);
  localparam logic signed [P_W-1:0] CMIN = -P_W'(2**(C_W-1));
  localparam logic signed [C_W-1:0] AMAX = C_W'(2**(ACT_IN_W-1) - 1);
  localparam logic signed [C_W-1:0] AMIN = -C_W'(2**(ACT_IN_W-1));

  logic signed [P_W-1:0]         c_full;
  logic signed [ACT_IN_W-1:0]    tanh_in;
  logic signed [ACT_O_W-1:0]     tanh_c;

  always_comb begin
    c_full = (P_W'(f_g) * P_W'(c_prev) + P_W'(i_g) * P_W'(g_g) + P_W'(128)) >>> 8;
    c_sat  = 1'b0;
    if (c_full > CMAX) begin
      c_new = CMAX[C_W-1:0];
      c_sat = 1'b1;
    end else if (c_full < CMIN) begin
      c_new = CMIN[C_W-1:0];
      c_sat = 1'b1;
    end else begin
      c_new = c_full[C_W-1:0];
    end
    if (c_new > AMAX)      tanh_in = AMAX[ACT_IN_W-1:0];
    else if (c_new < AMIN) tanh_in = AMIN[ACT_IN_W-1:0];
    else                   tanh_in = c_new[ACT_IN_W-1:0];
  end

  lookupx_act #(
    .SHIFT      (1),
    .OUT_MIN    (-256),
    .OUT_MAX    (256),
    .OFFSET_INIT(TANH_OFFSETS)
  ) u_tanh_c (
    .clk, .rst_n, .off_we, .off_addr, .off_wdata,
    .x(tanh_in), .y(tanh_c)
  );

  always_comb begin
    // |o * tanh(c)| <= 65536, so the rounded quotient fits in -16..16
    h_new = H_W'(((2*ACT_O_W+1)'(o_g) * (2*ACT_O_W+1)'(tanh_c) + (2*ACT_O_W+1)'(2048)) >>> 12);
  end

endmodule
