// lstm_weight_mem: register storage for the quantized weights and biases of
// the four gates of an N_H-unit LSTM layer with N_X inputs.
//
// Weights are 5-bit and biases 10-bit, as the reference design's scale-16
// quantization gives. Storage: Wx[gate][row][N_X], Wh[gate][row][N_H],
// b[gate][row]. Write port: one weight per clock through w_we, addressed by
// gate, row (hidden unit) and column, where columns 0..N_X-1 are the input
// weights and N_X..N_X+N_H-1 the recurrent weights; one bias per clock
// through b_we. Out-of-range columns are ignored. Read port: rd_row selects a
// hidden unit and the row of all four gates appears combinationally on the
// outputs. Everything resets to zero. Register storage, the write-port layout
// and the reset value are this design's choices.
module lstm_weight_mem
  import lstm_pkg::*;
#(
  parameter int N_X = 8,
  parameter int N_H = 8,
  localparam int ROW_W = (N_H > 1) ? $clog2(N_H) : 1,
  localparam int COL_W = $clog2(N_X + N_H),
  localparam int XC_W  = (N_X > 1) ? $clog2(N_X) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    w_we,
  input  gate_e                   w_gate,
  input  logic [ROW_W-1:0]        w_row,
  input  logic [COL_W-1:0]        w_col,
  input  logic signed [W_W-1:0]   w_data,
  input  logic                    b_we,
  input  gate_e                   b_gate,
  input  logic [ROW_W-1:0]        b_row,
  input  logic signed [B_W-1:0]   b_data,
  input  logic [ROW_W-1:0]        rd_row,
  output logic signed [W_W-1:0]   rd_wx [4][N_X],
  output logic signed [W_W-1:0]   rd_wh [4][N_H],
  output logic signed [B_W-1:0]   rd_b  [4]
);

  logic signed [W_W-1:0] wx_q [4][N_H][N_X];
  logic signed [W_W-1:0] wh_q [4][N_H][N_H];
  logic signed [B_W-1:0] b_q  [4][N_H];
  logic [ROW_W-1:0]      wh_col;   // recurrent column index

  assign wh_col = ROW_W'(w_col - COL_W'(N_X));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int g = 0; g < 4; g++)
        for (int r = 0; r < N_H; r++) begin
          for (int c = 0; c < N_X; c++) wx_q[g][r][c] <= '0;
          for (int c = 0; c < N_H; c++) wh_q[g][r][c] <= '0;
          b_q[g][r] <= '0;
        end
    end else begin
      if (w_we && int'(w_row) < N_H) begin
        if (int'(w_col) < N_X)
          wx_q[w_gate][w_row][w_col[XC_W-1:0]] <= w_data;
        else if (int'(w_col) < N_X + N_H)
          wh_q[w_gate][w_row][wh_col] <= w_data;
      end
      if (b_we && int'(b_row) < N_H)
        b_q[b_gate][b_row] <= b_data;
    end
  end

  always_comb begin
    for (int g = 0; g < 4; g++) begin
      for (int c = 0; c < N_X; c++) rd_wx[g][c] = wx_q[g][rd_row][c];
      for (int c = 0; c < N_H; c++) rd_wh[g][c] = wh_q[g][rd_row][c];
      rd_b[g] = b_q[g][rd_row];
    end
  end

endmodule
