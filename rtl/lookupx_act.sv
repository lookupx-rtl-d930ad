// lookupx_act: integer-domain activation function, y = (x >>> SHIFT) + offset[k].
//
// The input x is a signed ACT_IN_W-bit pre-activation. Its top LX_ADDR_W bits,
// read as an offset-binary segment number (sign bit inverted), select one of
// LX_ENTRIES offset registers; segment 0 holds the most negative inputs. The
// shifted input and the selected offset are added and the sum is clamped to
// [OUT_MIN, OUT_MAX]. With SHIFT = 2 and the sigmoid offsets this is the
// reference design's lookupx sigmoid, x/4 + offset_x, on the [-512, 512) domain with
// 8 registers addressed by the input MSBs. The same unit with SHIFT = 1 and a
// tanh offset table serves as the tanh activation; that tanh variant and the
// output clamp are this design's choices.
//
// Interface: the offset registers reset to OFFSET_INIT and can be rewritten
// through off_we/off_addr/off_wdata (one register per clock), so offsets fitted
// to another data set can be loaded. The function path x -> y is
// combinational: y is valid in the same cycle as x.
module lookupx_act
  import lstm_pkg::*;
#(
  parameter int unsigned SHIFT = 2,
  parameter int signed   OUT_MIN = 0,
  parameter int signed   OUT_MAX = 256,
  parameter logic [LX_ENTRIES*LX_OFF_W-1:0] OFFSET_INIT = SIG_OFFSETS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        off_we,
  input  logic [LX_ADDR_W-1:0]        off_addr,
  input  logic signed [LX_OFF_W-1:0]  off_wdata,
  input  logic signed [ACT_IN_W-1:0]  x,
  output logic signed [ACT_O_W-1:0]   y
);

  logic signed [LX_OFF_W-1:0] offset_q [LX_ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LX_ENTRIES; k++)
        offset_q[k] <= OFFSET_INIT[k*LX_OFF_W +: LX_OFF_W];
    end else if (off_we) begin
      offset_q[off_addr] <= off_wdata;
    end
  end

  logic [LX_ADDR_W-1:0]        seg;
  logic signed [ACT_IN_W:0]    sum;   // one guard bit

  always_comb begin
    seg = {~x[ACT_IN_W-1], x[ACT_IN_W-2 -: LX_ADDR_W-1]};
    sum = (ACT_IN_W+1)'(x >>> SHIFT) + (ACT_IN_W+1)'(offset_q[seg]);
    if (sum < (ACT_IN_W+1)'(OUT_MIN))      y = ACT_O_W'(OUT_MIN);
    else if (sum > (ACT_IN_W+1)'(OUT_MAX)) y = ACT_O_W'(OUT_MAX);
    else                                   y = ACT_O_W'(sum);
  end

endmodule
