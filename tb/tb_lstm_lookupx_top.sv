// tb_lstm_lookupx_top: end-to-end test of the quantized LSTM layer at its
// default size (8 inputs, 8 cells).
//
// The testbench loads random 5-bit weights and 10-bit biases, feeds several
// sequences of 4-bit input vectors and compares every hidden vector with an
// integer model of eqs. (1)-(6) written here; the model's lookupx offsets are
// recomputed from the offset rule with $exp/$tanh. It checks the step timing
// (h_valid N_H clocks after the accept, x_ready low in between) and counts the
// mechanisms of the design: start of a sequence (state clear), pre-activation
// clamp, cell-state clamp, offset reload, back-to-back steps and idle gaps.
// A mechanism that never occurs counts as a failure.
module tb_lstm_lookupx_top;
  import lstm_pkg::*;

  localparam int N_X = 8;
  localparam int N_H = 8;
  localparam int ROW_W = $clog2(N_H);
  localparam int COL_W = $clog2(N_X + N_H);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_first = 0, n_zsat = 0, n_csat = 0, n_reload = 0, n_b2b = 0, n_gap = 0, n_steps = 0;

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

  // ---------------- reference model ----------------
  int m_wx [4][N_H][N_X];
  int m_wh [4][N_H][N_H];
  int m_b  [4][N_H];
  int m_off_s [8], m_off_t [8];
  int m_h [N_H], m_c [N_H];
  int m_x [N_X];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic default_offsets();
    for (int k = 0; k < 8; k++) begin
      real as_ = 0.0, at = 0.0;
      for (int v = -512 + 128*k; v < -512 + 128*(k+1); v++) begin
        as_ += 256.0 / (1.0 + $exp(-real'(v) / 256.0)) - real'(v >>> 2);
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

  // one time step of the model; returns whether anything was clamped
  task automatic model_step(output bit zs, output bit cs);
    int hn [N_H];
    zs = 0; cs = 0;
    for (int j = 0; j < N_H; j++) begin
      int z [4];
      int a [4];
      int cf;
      for (int g = 0; g < 4; g++) begin
        int acc = m_b[g][j];
        for (int k = 0; k < N_X; k++) acc += m_wx[g][j][k] * m_x[k];
        for (int k = 0; k < N_H; k++) acc += m_wh[g][j][k] * m_h[k];
        if (acc > 511 || acc < -512) zs = 1;
        z[g] = clampi(acc, -512, 511);
      end
      a[0] = m_sig(z[0]); a[1] = m_sig(z[1]); a[2] = m_tanh(z[2]); a[3] = m_sig(z[3]);
      cf = (a[1] * m_c[j] + a[0] * a[2] + 128) >>> 8;
      if (cf > 2047 || cf < -2048) cs = 1;
      m_c[j] = clampi(cf, -2048, 2047);
      hn[j] = (a[3] * m_tanh(clampi(m_c[j], -512, 511)) + 2048) >>> 12;
    end
    for (int j = 0; j < N_H; j++) m_h[j] = hn[j];
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic load_weights(int wmax, int bias_lo, int bias_hi);
    for (int g = 0; g < 4; g++)
      for (int r = 0; r < N_H; r++) begin
        for (int c = 0; c < N_X + N_H; c++) begin
          int v = int'($urandom_range(0, 2*wmax)) - wmax;
          if (c < N_X) m_wx[g][r][c] = v; else m_wh[g][r][c-N_X] = v;
          @(negedge clk);
          w_we = 1; w_gate = gate_e'(g); w_row = ROW_W'(r); w_col = COL_W'(c); w_data = W_W'(v);
        end
        m_b[g][r] = int'($urandom_range(0, bias_hi - bias_lo)) + bias_lo;
        @(negedge clk);
        w_we = 0; b_we = 1; b_gate = gate_e'(g); b_row = ROW_W'(r); b_data = B_W'(m_b[g][r]);
      end
    @(negedge clk);
    w_we = 0; b_we = 0;
  endtask

  task automatic force_bias(gate_e g, int v);
    for (int r = 0; r < N_H; r++) begin
      m_b[g][r] = v;
      @(negedge clk);
      b_we = 1; b_gate = g; b_row = ROW_W'(r); b_data = B_W'(v);
    end
    @(negedge clk);
    b_we = 0;
  endtask

  task automatic reload_sigmoid_offsets();
    for (int k = 0; k < 8; k++) begin
      m_off_s[k] = m_off_s[k] + int'($urandom_range(0, 20)) - 10;
      @(negedge clk);
      off_we = 1; off_func = FUNC_SIGMOID; off_addr = 3'(k); off_data = LX_OFF_W'(m_off_s[k]);
    end
    @(negedge clk);
    off_we = 0;
    n_reload++;
  endtask

  // run one time step; the clock is at a negedge on entry and on exit
  task automatic run_step(bit first, bit back_to_back);
    bit zs, cs;
    int lat;
    if (!back_to_back) begin
      @(negedge clk);
      n_gap++;
    end else begin
      n_b2b++;
    end
    for (int k = 0; k < N_X; k++) begin
      m_x[k] = int'($urandom_range(0, 15)) - 8;
      x_vec[k] = X_W'(m_x[k]);
    end
    x_valid = 1; x_first = first;
    checks++;
    if (!x_ready) begin failures++; $display("x_ready low when idle"); end
    @(negedge clk);
    x_valid = 0; x_first = 0;
    if (first) begin
      for (int j = 0; j < N_H; j++) begin m_h[j] = 0; m_c[j] = 0; end
      n_first++;
    end
    model_step(zs, cs);
    lat = 0;
    while (!h_valid && lat < 100) begin
      checks++;
      if (x_ready) begin failures++; $display("x_ready high while busy"); end
      @(negedge clk);
      lat++;
    end
    checks += 2;
    if (lat != N_H) begin
      failures++;
      $display("step latency %0d clocks, expected %0d", lat, N_H);
    end
    if (!x_ready) begin failures++; $display("x_ready low with h_valid"); end
    for (int j = 0; j < N_H; j++) begin
      checks++;
      if (int'(h_vec[j]) != m_h[j]) begin
        failures++;
        if (failures < 20) $display("step %0d h[%0d] got %0d exp %0d", n_steps, j, h_vec[j], m_h[j]);
      end
    end
    checks++;
    if (sat_seen != (zs | cs)) begin failures++; $display("sat_seen mismatch"); end
    if (zs) n_zsat++;
    if (cs) n_csat++;
    n_steps++;
  endtask

  task automatic run_sequence(int len, bit b2b);
    for (int t = 0; t < len; t++) run_step(t == 0, b2b && t != 0);
  endtask

  initial begin
    w_we = 0; b_we = 0; off_we = 0; w_gate = GATE_I; b_gate = GATE_I;
    w_row = '0; b_row = '0; w_col = '0; w_data = '0; b_data = '0;
    off_func = FUNC_SIGMOID; off_addr = '0; off_data = '0;
    x_valid = 0; x_first = 0;
    for (int k = 0; k < N_X; k++) x_vec[k] = '0;
    default_offsets();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // moderate weights: mostly unclamped pre-activations
    load_weights(3, -100, 100);
    run_sequence(12, 1'b0);
    run_sequence(12, 1'b1);
    // full-range weights: pre-activations clamp
    load_weights(15, -512, 511);
    run_sequence(10, 1'b1);
    // large positive forget/input/cell biases: the cell state grows to the clamp
    load_weights(1, -20, 20);
    force_bias(GATE_I, 511);
    force_bias(GATE_F, 511);
    force_bias(GATE_G, 511);
    run_sequence(20, 1'b1);
    // reload the sigmoid offsets and continue
    load_weights(4, -200, 200);
    reload_sigmoid_offsets();
    run_sequence(15, 1'b1);

    $display("steps=%0d first=%0d zsat=%0d csat=%0d reload=%0d b2b=%0d gap=%0d",
             n_steps, n_first, n_zsat, n_csat, n_reload, n_b2b, n_gap);
    checks += 6;
    if (n_first == 0)  begin failures++; $display("sequence start never happened"); end
    if (n_zsat == 0)   begin failures++; $display("pre-activation clamp never happened"); end
    if (n_csat == 0)   begin failures++; $display("cell clamp never happened"); end
    if (n_reload == 0) begin failures++; $display("offset reload never happened"); end
    if (n_b2b == 0)    begin failures++; $display("back-to-back step never happened"); end
    if (n_gap == 0)    begin failures++; $display("idle gap never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
