// lstm_lookupx_top: one quantized LSTM layer (N_X inputs, N_H cells) whose
// sigmoid and tanh activations are lookupx units.
//
// Per time step the layer evaluates eqs. (1)-(6) for every hidden unit j:
// four gate_dot units form the pre-activations of gates i, f, g, o from the
// stored x_t, the previous hidden vector h_{t-1} and row j of the weight
// memory; three sigmoid lookupx units (x/4 + offset) and one tanh lookupx unit
// (x/2 + offset) turn them into gate values; lstm_elementwise updates c_j and
// forms h_j. All arithmetic stays in the quantized integer domain, so no
// dequantize/quantize step sits between the matrix part and the activations.
//
// Schedule (this design's choice): one hidden unit per clock. A step is
// accepted when x_valid and x_ready are both high (x_ready is high only when
// idle); x_first marks the first step of a sequence and clears h and c. The
// N_H units are computed in the next N_H clocks, the new hidden vector is
// committed to h_vec at the last of them and h_valid is high for one clock
// right after, together with x_ready. A step therefore takes N_H + 1 clocks
// from one accept to the next and h_valid follows the accept by N_H clocks.
//
// Configuration: weights (w_*), biases (b_*) and lookupx offsets (off_*; the
// write goes to all sigmoid units when off_func is FUNC_SIGMOID and to both
// tanh units when it is FUNC_TANH) should be written only while idle.
module lstm_lookupx_top
  import lstm_pkg::*;
#(
  parameter int N_X = 8,
  parameter int N_H = 8,
  localparam int ROW_W = (N_H > 1) ? $clog2(N_H) : 1,
  localparam int COL_W = $clog2(N_X + N_H)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // weight and bias load
  input  logic                        w_we,
  input  gate_e                       w_gate,
  input  logic [ROW_W-1:0]            w_row,
  input  logic [COL_W-1:0]            w_col,
  input  logic signed [W_W-1:0]       w_data,
  input  logic                        b_we,
  input  gate_e                       b_gate,
  input  logic [ROW_W-1:0]            b_row,
  input  logic signed [B_W-1:0]       b_data,
  // lookupx offset load
  input  logic                        off_we,
  input  act_func_e                   off_func,
  input  logic [LX_ADDR_W-1:0]        off_addr,
  input  logic signed [LX_OFF_W-1:0]  off_data,
  // input stream
  input  logic                        x_valid,
  output logic                        x_ready,
  input  logic                        x_first,
  input  logic signed [X_W-1:0]       x_vec [N_X],
  // output stream
  output logic                        h_valid,
  output logic signed [H_W-1:0]       h_vec [N_H],
  // status: a pre-activation or the cell state was clamped in this step
  output logic                        sat_seen
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e                      state_q;
  logic [ROW_W-1:0]            j_q;
  logic signed [X_W-1:0]       x_q     [N_X];
  logic signed [H_W-1:0]       h_q     [N_H];
  logic signed [H_W-1:0]       h_nxt_q [N_H];
  logic signed [C_W-1:0]       c_q     [N_H];
  logic                        h_valid_q;
  logic                        sat_q;

  // weight memory, read by the current unit
  logic signed [W_W-1:0]       rd_wx [4][N_X];
  logic signed [W_W-1:0]       rd_wh [4][N_H];
  logic signed [B_W-1:0]       rd_b  [4];

  lstm_weight_mem #(.N_X(N_X), .N_H(N_H)) u_wmem (
    .clk, .rst_n,
    .w_we, .w_gate, .w_row, .w_col, .w_data,
    .b_we, .b_gate, .b_row, .b_data,
    .rd_row(j_q), .rd_wx, .rd_wh, .rd_b
  );

  // gate pre-activations
  logic signed [ACT_IN_W-1:0]  z     [4];
  logic [3:0]                  z_sat;

  for (genvar g = 0; g < 4; g++) begin : g_gate
    gate_dot #(.N_X(N_X), .N_H(N_H)) u_dot (
      .x(x_q), .h(h_q), .wx(rd_wx[g]), .wh(rd_wh[g]), .bias(rd_b[g]),
      .z(z[g]), .sat(z_sat[g])
    );
  end

  // activations
  logic                        sig_we, tanh_we;
  logic signed [ACT_O_W-1:0]   a     [4];

  assign sig_we  = off_we && (off_func == FUNC_SIGMOID);
  assign tanh_we = off_we && (off_func == FUNC_TANH);

  for (genvar g = 0; g < 4; g++) begin : g_act
    if (g == int'(GATE_G)) begin : g_tanh
      lookupx_act #(.SHIFT(1), .OUT_MIN(-256), .OUT_MAX(256),
                    .OFFSET_INIT(TANH_OFFSETS)) u_act (
        .clk, .rst_n, .off_we(tanh_we), .off_addr, .off_wdata(off_data),
        .x(z[g]), .y(a[g])
      );
    end else begin : g_sig
      lookupx_act #(.SHIFT(2), .OUT_MIN(0), .OUT_MAX(256),
                    .OFFSET_INIT(SIG_OFFSETS)) u_act (
        .clk, .rst_n, .off_we(sig_we), .off_addr, .off_wdata(off_data),
        .x(z[g]), .y(a[g])
      );
    end
  end

  // pointwise cell update
  logic signed [C_W-1:0]       c_new;
  logic signed [H_W-1:0]       h_new;
  logic                        c_sat;

  lstm_elementwise u_elem (
    .clk, .rst_n, .off_we(tanh_we), .off_addr, .off_wdata(off_data),
    .i_g(a[GATE_I]), .f_g(a[GATE_F]), .g_g(a[GATE_G]), .o_g(a[GATE_O]),
    .c_prev(c_q[j_q]), .c_new, .h_new, .c_sat
  );

  // sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      j_q       <= '0;
      h_valid_q <= 1'b0;
      sat_q     <= 1'b0;
      for (int k = 0; k < N_X; k++) x_q[k] <= '0;
      for (int k = 0; k < N_H; k++) begin
        h_q[k]     <= '0;
        h_nxt_q[k] <= '0;
        c_q[k]     <= '0;
      end
    end else begin
      h_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (x_valid) begin
            x_q     <= x_vec;
            j_q     <= '0;
            sat_q   <= 1'b0;
            state_q <= S_RUN;
            if (x_first) begin
              for (int k = 0; k < N_H; k++) begin
                h_q[k] <= '0;
                c_q[k] <= '0;
              end
            end
          end
        end
        S_RUN: begin
          c_q[j_q]     <= c_new;
          h_nxt_q[j_q] <= h_new;
          if (|z_sat || c_sat) sat_q <= 1'b1;
          if (int'(j_q) == N_H - 1) begin
            for (int k = 0; k < N_H; k++) h_q[k] <= h_nxt_q[k];
            h_q[j_q]  <= h_new;
            h_valid_q <= 1'b1;
            state_q   <= S_IDLE;
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign x_ready  = (state_q == S_IDLE);
  assign h_valid  = h_valid_q;
  assign h_vec    = h_q;
  assign sat_seen = sat_q;

`ifndef SYNTHESIS
  // configuration writes belong between steps
  a_cfg_idle: assert property (@(posedge clk) disable iff (!rst_n)
      (w_we || b_we || off_we) |-> state_q == S_IDLE)
    else $error("weight/offset write while a step is running");
`endif

endmodule
