// tb_lstm_long_sequence: one review-length sequence through the LSTM layer
// at its default size (8 inputs, 8 cells), streamed with x_valid held high.
//
// A movie review of a sentiment data set is a sequence of a few hundred word
// vectors; this test feeds SEQ_LEN = 250 random 4-bit input vectors as one
// sequence with fixed random weights. It checks:
//   * every hidden vector against a bit-exact integer model of the layer;
//   * the throughput: with the input always valid, the sequence must take
//     exactly SEQ_LEN * (N_H + 1) clocks from the first accept to the last
//     h_valid;
//   * the approximation quality: a real-valued LSTM with exact sigmoid and
//     tanh runs on the same quantized weights and inputs, and the mean
//     absolute difference of the hidden outputs must stay below 0.1 (1.6
//     steps of the 1/16 output grid).
module tb_lstm_long_sequence;
  import lstm_pkg::*;

  localparam int N_X = 8;
  localparam int N_H = 8;
  localparam int SEQ_LEN = 250;
  localparam int ROW_W = $clog2(N_H);
  localparam int COL_W = $clog2(N_X + N_H);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                       w_we, b_we, off_we;
  gate_e                      w_gate, b_gate;
  logic [ROW_W-1:0]           w_row, b_row;
  logic [COL_W-1:0]           w_col;
  logic signed [W_W-1:0]      w_data;
  logic signed [B_W-1:0]      b_data;
  act_func_e                  off_func;
  logic [LX_ADDR_W-1:0]       off_addr;
  logic signed [LX_OFF_W-1:0] off_data;
  logic                       x_valid, x_ready, x_first, h_valid, sat_seen;
  logic signed [X_W-1:0]      x_vec [N_X];
  logic signed [H_W-1:0]      h_vec [N_H];

  lstm_lookupx_top dut (.*);

  // ---------------- models ----------------
  int  m_wx [4][N_H][N_X];
  int  m_wh [4][N_H][N_H];
  int  m_b  [4][N_H];
  int  m_off_s [8], m_off_t [8];
  int  m_h [N_H], m_c [N_H];
  real r_h [N_H], r_c [N_H];
  int  xs [SEQ_LEN][N_X];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic real sigm(real v);
    return 1.0 / (1.0 + $exp(-v));
  endfunction

  task automatic default_offsets();
    for (int k = 0; k < 8; k++) begin
      real as_ = 0.0, at = 0.0;
      for (int v = -512 + 128*k; v < -512 + 128*(k+1); v++) begin
        as_ += 256.0 * sigm(real'(v) / 256.0) - real'(v >>> 2);
        at  += 256.0 * $tanh(real'(v) / 256.0) - real'(v >>> 1);
      end
      m_off_s[k] = int'($floor(as_ / 128.0 + 0.5));
      m_off_t[k] = int'($floor(at / 128.0 + 0.5));
    end
  endtask

  function automatic int m_sig(int z);
    return clampi((z >>> 2) + m_off_s[(z + 512) / 128], 0, 256);
  endfunction
  function automatic int m_tanh(int z);
    return clampi((z >>> 1) + m_off_t[(z + 512) / 128], -256, 256);
  endfunction

  // bit-exact integer step
  task automatic model_step(int t);
    int hn [N_H];
    for (int j = 0; j < N_H; j++) begin
      int z [4];
      int cf;
      for (int g = 0; g < 4; g++) begin
        int acc = m_b[g][j];
        for (int k = 0; k < N_X; k++) acc += m_wx[g][j][k] * xs[t][k];
        for (int k = 0; k < N_H; k++) acc += m_wh[g][j][k] * m_h[k];
        z[g] = clampi(acc, -512, 511);
      end
      cf = (m_sig(z[1]) * m_c[j] + m_sig(z[0]) * m_tanh(z[2]) + 128) >>> 8;
      m_c[j] = clampi(cf, -2048, 2047);
      hn[j] = (m_sig(z[3]) * m_tanh(clampi(m_c[j], -512, 511)) + 2048) >>> 12;
    end
    for (int j = 0; j < N_H; j++) m_h[j] = hn[j];
  endtask

  // real-valued step with exact activations
  task automatic real_step(int t);
    real hn [N_H];
    for (int j = 0; j < N_H; j++) begin
      real z [4];
      for (int g = 0; g < 4; g++) begin
        z[g] = real'(m_b[g][j]) / 256.0;
        for (int k = 0; k < N_X; k++) z[g] += real'(m_wx[g][j][k] * xs[t][k]) / 256.0;
        for (int k = 0; k < N_H; k++) z[g] += real'(m_wh[g][j][k]) / 16.0 * r_h[k];
      end
      r_c[j] = sigm(z[1]) * r_c[j] + sigm(z[0]) * $tanh(z[2]);
      hn[j] = sigm(z[3]) * $tanh(r_c[j]);
    end
    for (int j = 0; j < N_H; j++) r_h[j] = hn[j];
  endtask

  // ---------------- stimulus ----------------
  int  t_in = 0, t_out = 0;
  longint cyc = 0, first_accept = -1, last_valid = -1;
  real err_sum = 0.0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    w_we = 0; b_we = 0; off_we = 0; w_gate = GATE_I; b_gate = GATE_I;
    w_row = '0; b_row = '0; w_col = '0; w_data = '0; b_data = '0;
    off_func = FUNC_SIGMOID; off_addr = '0; off_data = '0;
    x_valid = 0; x_first = 0;
    for (int k = 0; k < N_X; k++) x_vec[k] = '0;
    default_offsets();
    for (int t = 0; t < SEQ_LEN; t++)
      for (int k = 0; k < N_X; k++) xs[t][k] = int'($urandom_range(0, 15)) - 8;
    for (int j = 0; j < N_H; j++) begin m_h[j] = 0; m_c[j] = 0; r_h[j] = 0.0; r_c[j] = 0.0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int g = 0; g < 4; g++)
      for (int r = 0; r < N_H; r++) begin
        for (int c = 0; c < N_X + N_H; c++) begin
          automatic int v = int'($urandom_range(0, 8)) - 4;
          if (c < N_X) m_wx[g][r][c] = v; else m_wh[g][r][c-N_X] = v;
          @(negedge clk);
          w_we = 1; w_gate = gate_e'(g); w_row = ROW_W'(r); w_col = COL_W'(c); w_data = W_W'(v);
        end
        m_b[g][r] = int'($urandom_range(0, 256)) - 128;
        @(negedge clk);
        w_we = 0; b_we = 1; b_gate = gate_e'(g); b_row = ROW_W'(r); b_data = B_W'(m_b[g][r]);
      end
    @(negedge clk);
    w_we = 0; b_we = 0;

    // stream the sequence: x_valid stays high, a new vector follows each accept
    x_valid = 1;
    while (t_in < SEQ_LEN) begin
      for (int k = 0; k < N_X; k++) x_vec[k] = X_W'(xs[t_in][k]);
      x_first = (t_in == 0);
      @(posedge clk);
      if (x_ready) begin
        if (t_in == 0) first_accept = cyc;
        t_in++;
      end
      @(negedge clk);
    end
    x_valid = 0;
    x_first = 0;
  end

  // output side
  always @(posedge clk) begin
    if (rst_n && h_valid) begin
      model_step(t_out);
      real_step(t_out);
      for (int j = 0; j < N_H; j++) begin
        checks++;
        if (int'(h_vec[j]) != m_h[j]) begin
          failures++;
          if (failures < 20) $display("t=%0d h[%0d] got %0d exp %0d", t_out, j, h_vec[j], m_h[j]);
        end
        err_sum += (real'(h_vec[j]) / 16.0 > r_h[j]) ? real'(h_vec[j]) / 16.0 - r_h[j]
                                                      : r_h[j] - real'(h_vec[j]) / 16.0;
      end
      t_out++;
      if (t_out == SEQ_LEN) begin
        real mae;
        last_valid = cyc;
        mae = err_sum / real'(SEQ_LEN * N_H);
        $display("%0d steps in %0d clocks (expected %0d); mean |h_rtl - h_exact| = %0.4f",
                 SEQ_LEN, last_valid - first_accept, SEQ_LEN * (N_H + 1), mae);
        checks += 2;
        // from the first accept edge to the edge that samples the last h_valid
        // (the edge a following step would be accepted on): SEQ_LEN * (N_H + 1)
        if (int'(last_valid - first_accept) != SEQ_LEN * (N_H + 1)) begin
          failures++;
          $display("throughput mismatch");
        end
        if (mae > 0.1) begin
          failures++;
          $display("approximation error too large");
        end
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    repeat (SEQ_LEN * (N_H + 1) + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
