// fir_pau_tb: feeds the pipelined adder unit random IPU results, with random
// gaps where en is low, and checks that each output block equals
// sum_m r[m] of the block m positions earlier (zero before the first block),
// that y_valid follows en by one clock, and that the output holds in gaps.
module fir_pau_tb;
  localparam int unsigned M   = fir_pkg::M_DEF;
  localparam int unsigned L   = fir_pkg::L_DEF;
  localparam int unsigned Y_W = fir_pkg::Y_W_DEF;

  typedef logic signed [Y_W-1:0] res_t [M][L];

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic signed [Y_W-1:0] r [M][L];
  logic signed [Y_W-1:0] y [L];
  logic y_valid;
  res_t hist [$];  // IPU results of every enabled block
  int checks = 0, failures = 0, gaps = 0;

  fir_pau dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input logic exp_valid);
    int k = hist.size() - 1;
    checks++;
    if (y_valid !== exp_valid) begin
      failures++;
      $display("FAIL y_valid=%0b expected %0b", y_valid, exp_valid);
    end
    for (int j = 0; j < int'(L); j++) begin
      logic signed [Y_W-1:0] expv = '0;
      for (int m = 0; m < int'(M); m++)
        if (k - m >= 0) expv += hist[k-m][m][j];
      checks++;
      if (y[j] !== expv) begin
        failures++;
        $display("FAIL block %0d y[%0d]=%h expected %h", k, j, y[j], expv);
      end
    end
  endtask

  task automatic randomize_r();
    for (int m = 0; m < int'(M); m++)
      for (int j = 0; j < int'(L); j++) r[m][j] <= Y_W'($urandom);
  endtask

  initial begin
    randomize_r();
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int b = 0; b < 300; b++) begin
      en <= 1'b1;
      randomize_r();
      @(posedge clk);
      hist.push_back(r);
      en <= 1'b0;
      #1 check_out(1'b1);
      if ($urandom_range(0, 2) == 0) begin
        gaps++;
        repeat ($urandom_range(1, 3)) begin
          randomize_r();
          @(posedge clk);
          #1 check_out(1'b0);
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
