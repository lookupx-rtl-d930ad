// tb_lstm_weight_mem: fills the weight and bias storage with random values
// through the write ports, reads every row back through the read port and
// compares with a copy kept in the testbench. Also checks that a write to a
// column outside the row is ignored and that reset clears the storage.
module tb_lstm_weight_mem;
  import lstm_pkg::*;

  localparam int N_X = 8;
  localparam int N_H = 8;
  localparam int ROW_W = $clog2(N_H);
  localparam int COL_W = $clog2(N_X + N_H);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                  w_we, b_we;
  gate_e                 w_gate, b_gate;
  logic [ROW_W-1:0]      w_row, b_row, rd_row;
  logic [COL_W-1:0]      w_col;
  logic signed [W_W-1:0] w_data;
  logic signed [B_W-1:0] b_data;
  logic signed [W_W-1:0] rd_wx [4][N_X];
  logic signed [W_W-1:0] rd_wh [4][N_H];
  logic signed [B_W-1:0] rd_b  [4];

  lstm_weight_mem #(.N_X(N_X), .N_H(N_H)) dut (.*);

  int ref_w [4][N_H][N_X+N_H];
  int ref_b [4][N_H];

  task automatic read_all();
    for (int r = 0; r < N_H; r++) begin
      rd_row = ROW_W'(r);
      #1;
      for (int g = 0; g < 4; g++) begin
        for (int c = 0; c < N_X + N_H; c++) begin
          int got = (c < N_X) ? int'(rd_wx[g][c]) : int'(rd_wh[g][c-N_X]);
          checks++;
          if (got != ref_w[g][r][c]) begin
            failures++;
            if (failures < 10) $display("w[%0d][%0d][%0d] got %0d exp %0d", g, r, c, got, ref_w[g][r][c]);
          end
        end
        checks++;
        if (int'(rd_b[g]) != ref_b[g][r]) begin
          failures++;
          if (failures < 10) $display("b[%0d][%0d] got %0d exp %0d", g, r, rd_b[g], ref_b[g][r]);
        end
      end
    end
  endtask

  initial begin
    w_we = 0; b_we = 0; w_gate = GATE_I; b_gate = GATE_I;
    w_row = '0; b_row = '0; w_col = '0; w_data = '0; b_data = '0; rd_row = '0;
    foreach (ref_w[g, r, c]) ref_w[g][r][c] = 0;
    foreach (ref_b[g, r]) ref_b[g][r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    read_all();

    for (int g = 0; g < 4; g++)
      for (int r = 0; r < N_H; r++) begin
        for (int c = 0; c < N_X + N_H; c++) begin
          @(negedge clk);
          w_we = 1; w_gate = gate_e'(g); w_row = ROW_W'(r); w_col = COL_W'(c);
          ref_w[g][r][c] = int'($urandom_range(0, 31)) - 16;
          w_data = W_W'(ref_w[g][r][c]);
        end
        @(negedge clk);
        w_we = 0; b_we = 1; b_gate = gate_e'(g); b_row = ROW_W'(r);
        ref_b[g][r] = int'($urandom_range(0, 1023)) - 512;
        b_data = B_W'(ref_b[g][r]);
      end
    @(negedge clk);
    w_we = 0; b_we = 0;
    read_all();

    // rewrite a few entries
    for (int t = 0; t < 50; t++) begin
      int g = $urandom_range(0, 3), r = $urandom_range(0, N_H-1), c = $urandom_range(0, N_X+N_H-1);
      @(negedge clk);
      w_we = 1; w_gate = gate_e'(g); w_row = ROW_W'(r); w_col = COL_W'(c);
      ref_w[g][r][c] = int'($urandom_range(0, 31)) - 16;
      w_data = W_W'(ref_w[g][r][c]);
    end
    @(negedge clk);
    w_we = 0;
    read_all();

    rst_n = 1'b0;
    #1;
    foreach (ref_w[g, r, c]) ref_w[g][r][c] = 0;
    foreach (ref_b[g, r]) ref_b[g][r] = 0;
    read_all();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
