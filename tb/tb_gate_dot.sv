// tb_gate_dot: random and corner-case check of the gate pre-activation unit.
// The expected value is an integer dot product plus bias computed in the
// testbench, clamped to [-512, 511]; the saturation flag is checked as well.
module tb_gate_dot;
  import lstm_pkg::*;

  localparam int N_X = 8;
  localparam int N_H = 8;

  int checks = 0, failures = 0;
  int n_sat = 0;

  logic signed [X_W-1:0]      x  [N_X];
  logic signed [H_W-1:0]      h  [N_H];
  logic signed [W_W-1:0]      wx [N_X];
  logic signed [W_W-1:0]      wh [N_H];
  logic signed [B_W-1:0]      bias;
  logic signed [ACT_IN_W-1:0] z;
  logic                       sat;

  gate_dot #(.N_X(N_X), .N_H(N_H)) dut (.x, .h, .wx, .wh, .bias, .z, .sat);

  task automatic check_one();
    int acc, e;
    bit es;
    acc = int'(bias);
    for (int k = 0; k < N_X; k++) acc += int'(wx[k]) * int'(x[k]);
    for (int k = 0; k < N_H; k++) acc += int'(wh[k]) * int'(h[k]);
    es = (acc > 511) || (acc < -512);
    e  = (acc > 511) ? 511 : (acc < -512) ? -512 : acc;
    #1;
    checks++;
    if (int'(z) != e || sat != es) begin
      failures++;
      if (failures < 10) $display("acc=%0d got z=%0d sat=%0b exp %0d %0b", acc, z, sat, e, es);
    end
    if (es) n_sat++;
  endtask

  initial begin
    // random vectors, small weights (mostly in range)
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < N_X; k++) begin
        x[k]  = X_W'($urandom_range(0, 15));
        wx[k] = W_W'($urandom_range(0, 31));
      end
      for (int k = 0; k < N_H; k++) begin
        h[k]  = H_W'(int'($urandom_range(0, 32)) - 16);
        wh[k] = (t % 2 == 0) ? W_W'($urandom_range(0, 31)) : W_W'(int'($urandom_range(0, 4)) - 2);
      end
      bias = B_W'($urandom_range(0, 1023));
      check_one();
    end
    // extremes
    for (int s = 0; s < 2; s++) begin
      for (int k = 0; k < N_X; k++) begin x[k] = -4'sd8; wx[k] = s ? 5'sd15 : -5'sd16; end
      for (int k = 0; k < N_H; k++) begin h[k] = -6'sd16; wh[k] = s ? 5'sd15 : -5'sd16; end
      bias = s ? -10'sd512 : 10'sd511;
      check_one();
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated cases: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
