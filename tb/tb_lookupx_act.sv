// tb_lookupx_act: exhaustive check of the lookupx activation unit in its two
// configurations, sigmoid (x/4 + offset) and tanh (x/2 + offset).
//
// The expected offsets are recomputed here from the defining rule, the mean of
// f(x) - (x >>> SHIFT) over each 128-input segment, with f evaluated in real
// arithmetic ($exp, $tanh). Every 10-bit input is then compared against the
// expected integer result, and the approximation error against the exact
// scaled function is bounded. Finally new offsets are written through the
// register port and the whole range is checked again, followed by a reset.
module tb_lookupx_act;
  import lstm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                       s_we, t_we;
  logic [LX_ADDR_W-1:0]       off_addr;
  logic signed [LX_OFF_W-1:0] off_wdata;
  logic signed [ACT_IN_W-1:0] x;
  logic signed [ACT_O_W-1:0]  ys, yt;

  lookupx_act dut_sig (
    .clk, .rst_n, .off_we(s_we), .off_addr, .off_wdata, .x, .y(ys));

  lookupx_act #(.SHIFT(1), .OUT_MIN(-256), .OUT_MAX(256),
                .OFFSET_INIT(TANH_OFFSETS)) dut_tanh (
    .clk, .rst_n, .off_we(t_we), .off_addr, .off_wdata, .x, .y(yt));

  int off_s [8], off_t [8];

  function automatic real f_sig(int v);
    return 256.0 / (1.0 + $exp(-real'(v) / 256.0));
  endfunction
  function automatic real f_tanh(int v);
    return 256.0 * $tanh(real'(v) / 256.0);
  endfunction

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int floor_shift(int v, int sh);
    return v >>> sh;
  endfunction

  task automatic compute_offsets();
    for (int k = 0; k < 8; k++) begin
      real acc_s = 0.0, acc_t = 0.0;
      for (int v = -512 + 128*k; v < -512 + 128*(k+1); v++) begin
        acc_s += f_sig(v)  - real'(floor_shift(v, 2));
        acc_t += f_tanh(v) - real'(floor_shift(v, 1));
      end
      off_s[k] = int'($floor(acc_s / 128.0 + 0.5));
      off_t[k] = int'($floor(acc_t / 128.0 + 0.5));
    end
  endtask

  task automatic sweep(input bit check_error);
    real max_es = 0.0, max_et = 0.0;
    for (int v = -512; v < 512; v++) begin
      int k, es, et;
      x = ACT_IN_W'(v);
      #1;
      k  = (v + 512) / 128;
      es = clampi(floor_shift(v, 2) + off_s[k], 0, 256);
      et = clampi(floor_shift(v, 1) + off_t[k], -256, 256);
      checks += 2;
      if (int'(ys) != es) begin
        failures++;
        if (failures < 10) $display("sigmoid x=%0d got %0d exp %0d", v, ys, es);
      end
      if (int'(yt) != et) begin
        failures++;
        if (failures < 10) $display("tanh x=%0d got %0d exp %0d", v, yt, et);
      end
      if (rabs(real'(ys) - f_sig(v))  > max_es) max_es = rabs(real'(ys) - f_sig(v));
      if (rabs(real'(yt) - f_tanh(v)) > max_et) max_et = rabs(real'(yt) - f_tanh(v));
    end
    if (check_error) begin
      $display("max |error|: sigmoid %0.2f/256, tanh %0.2f/256", max_es, max_et);
      checks += 2;
      if (max_es > 9.0)  begin failures++; $display("sigmoid error too large"); end
      if (max_et > 31.0) begin failures++; $display("tanh error too large"); end
    end
  endtask

  initial begin
    s_we = 0; t_we = 0; off_addr = '0; off_wdata = '0; x = '0;
    compute_offsets();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    sweep(1'b1);

    // load new offsets into both tables
    for (int k = 0; k < 8; k++) begin
      off_s[k] = $urandom_range(0, 300) - 40;
      off_t[k] = $urandom_range(0, 400) - 200;
    end
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      s_we = 1; t_we = 1; off_addr = 3'(k); off_wdata = LX_OFF_W'(off_s[k]);
      @(negedge clk);
      s_we = 1; t_we = 0; off_wdata = LX_OFF_W'(off_s[k]);
      @(negedge clk);
      s_we = 0; t_we = 1; off_wdata = LX_OFF_W'(off_t[k]);
      @(negedge clk);
      s_we = 0; t_we = 0;
    end
    sweep(1'b0);

    // reset restores the default offsets
    rst_n = 1'b0;
    #2 rst_n = 1'b1;
    compute_offsets();
    @(negedge clk);
    sweep(1'b0);

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
