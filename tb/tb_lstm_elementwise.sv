// tb_lstm_elementwise: random check of the cell-state update and hidden
// output, c_t = f*c_{t-1} + i*g and h_t = o*tanh(c_t), against an integer
// model written here. The tanh offsets of the model are recomputed from the
// lookupx rule with $tanh. Saturation of c_t and a rewritten tanh offset
// table are exercised as well.
module tb_lstm_elementwise;
  import lstm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sat = 0;

  logic                       off_we;
  logic [LX_ADDR_W-1:0]       off_addr;
  logic signed [LX_OFF_W-1:0] off_wdata;
  logic signed [ACT_O_W-1:0]  i_g, f_g, g_g, o_g;
  logic signed [C_W-1:0]      c_prev, c_new;
  logic signed [H_W-1:0]      h_new;
  logic                       c_sat;

  lstm_elementwise dut (.*);

  int off_t [8];

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic tanh_offsets();
    for (int k = 0; k < 8; k++) begin
      real acc = 0.0;
      for (int v = -512 + 128*k; v < -512 + 128*(k+1); v++)
        acc += 256.0 * $tanh(real'(v) / 256.0) - real'(v >>> 1);
      off_t[k] = int'($floor(acc / 128.0 + 0.5));
    end
  endtask

  task automatic check_one();
    int cf, ce, ti, te, he;
    bit se;
    cf = (int'(f_g) * int'(c_prev) + int'(i_g) * int'(g_g) + 128) >>> 8;
    se = (cf > 2047) || (cf < -2048);
    ce = clampi(cf, -2048, 2047);
    ti = clampi(ce, -512, 511);
    te = clampi((ti >>> 1) + off_t[(ti + 512) / 128], -256, 256);
    he = (int'(o_g) * te + 2048) >>> 12;
    #1;
    checks += 3;
    if (int'(c_new) != ce) begin
      failures++;
      if (failures < 10) $display("c got %0d exp %0d", c_new, ce);
    end
    if (int'(h_new) != he) begin
      failures++;
      if (failures < 10) $display("h got %0d exp %0d (c=%0d o=%0d)", h_new, he, ce, o_g);
    end
    if (c_sat != se) failures++;
    if (se) n_sat++;
  endtask

  task automatic random_inputs(int c_range);
    i_g = ACT_O_W'($urandom_range(0, 256));
    f_g = ACT_O_W'($urandom_range(0, 256));
    o_g = ACT_O_W'($urandom_range(0, 256));
    g_g = ACT_O_W'(int'($urandom_range(0, 512)) - 256);
    c_prev = C_W'(int'($urandom_range(0, 2*c_range)) - c_range);
  endtask

  initial begin
    off_we = 0; off_addr = '0; off_wdata = '0;
    i_g = '0; f_g = '0; g_g = '0; o_g = '0; c_prev = '0;
    tanh_offsets();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      random_inputs((t % 3 == 0) ? 2048 - 1 : 600);
      check_one();
    end
    // drive the cell state into saturation both ways
    i_g = 10'sd256; f_g = 10'sd256; g_g = 10'sd256; o_g = 10'sd256; c_prev = 12'sd2047;
    check_one();
    g_g = -10'sd256; c_prev = -12'sd2048;
    check_one();

    // new tanh offsets
    for (int k = 0; k < 8; k++) begin
      off_t[k] = int'($urandom_range(0, 200)) - 100;
      @(negedge clk);
      off_we = 1; off_addr = 3'(k); off_wdata = LX_OFF_W'(off_t[k]);
    end
    @(negedge clk);
    off_we = 0;
    for (int t = 0; t < 1000; t++) begin
      random_inputs(700);
      check_one();
    end

    checks++;
    if (n_sat == 0) begin failures++; $display("cell saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
