// fir_ru_tb: feeds the register unit random blocks with random gaps and checks
// after every accepted block that the window holds the last 2L-1 samples of
// the input stream (zeros before the first sample), that win_valid is high
// exactly once per accepted block, and that the window holds during gaps.
module fir_ru_tb;
  localparam int unsigned L   = fir_pkg::L_DEF;
  localparam int unsigned X_W = fir_pkg::X_W_DEF;

  logic clk = 1'b0, rst_n = 1'b0, x_valid = 1'b0;
  logic signed [X_W-1:0] x_blk [L];
  logic signed [X_W-1:0] win   [2*L-1];
  logic win_valid;
  logic signed [X_W-1:0] hist [$];  // every sample accepted, oldest first
  int checks = 0, failures = 0, gaps = 0;

  fir_ru dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window(input logic exp_valid);
    int n = hist.size();
    checks++;
    if (win_valid !== exp_valid) begin
      failures++;
      $display("FAIL win_valid=%0b expected %0b", win_valid, exp_valid);
    end
    for (int e = 0; e < 2 * int'(L) - 1; e++) begin
      int idx = n - (2 * int'(L) - 1) + e;
      logic signed [X_W-1:0] expv = (idx >= 0) ? hist[idx] : '0;
      checks++;
      if (win[e] !== expv) begin
        failures++;
        $display("FAIL win[%0d]=%h expected %h", e, win[e], expv);
      end
    end
  endtask

  initial begin
    for (int j = 0; j < int'(L); j++) x_blk[j] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 200; b++) begin
      x_valid <= 1'b1;
      for (int j = 0; j < int'(L); j++) begin
        x_blk[j] <= X_W'($urandom);
      end
      @(posedge clk);
      for (int j = 0; j < int'(L); j++) hist.push_back(x_blk[j]);
      x_valid <= 1'b0;
      #1 check_window(1'b1);
      if ($urandom_range(0, 2) == 0) begin
        gaps++;
        repeat ($urandom_range(1, 3)) begin
          for (int j = 0; j < int'(L); j++) x_blk[j] <= X_W'($urandom);
          @(posedge clk);
          #1 check_window(1'b0);
        end
      end
    end
    checks++;
    if (gaps == 0) begin
      failures++;
      $display("FAIL no gap was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
