// fir_ipu_tb: drives the inner product unit with random windows and
// coefficients (plus all-extreme cases) and compares each of the L results
// with r[j] = sum_i c[i] * win[j-i+L-1], worked out in 64-bit arithmetic and
// reduced to Y_W bits.
module fir_ipu_tb;
  localparam int unsigned L   = fir_pkg::L_DEF;
  localparam int unsigned X_W = fir_pkg::X_W_DEF;
  localparam int unsigned H_W = fir_pkg::H_W_DEF;
  localparam int unsigned Y_W = fir_pkg::Y_W_DEF;

  logic signed [X_W-1:0] win [2*L-1];
  logic signed [H_W-1:0] c   [L];
  logic signed [Y_W-1:0] r   [L];
  int checks = 0, failures = 0;

  fir_ipu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    #1;
    for (int j = 0; j < int'(L); j++) begin
      longint acc = 0;
      for (int i = 0; i < int'(L); i++) acc += longint'(c[i]) * longint'(win[j-i+int'(L)-1]);
      checks++;
      if (r[j] !== Y_W'(acc)) begin
        failures++;
        $display("FAIL r[%0d]=%h expected %h", j, r[j], Y_W'(acc));
      end
    end
  endtask

  initial begin
    // one-hot window: each result picks out exactly one coefficient
    for (int e = 0; e < 2 * int'(L) - 1; e++) begin
      for (int k = 0; k < 2 * int'(L) - 1; k++) win[k] = (k == e) ? X_W'(1) : '0;
      for (int i = 0; i < int'(L); i++) c[i] = H_W'(i + 1);
      compare();
    end
    // extremes
    for (int k = 0; k < 2 * int'(L) - 1; k++) win[k] = {1'b1, {(X_W-1){1'b0}}};
    for (int i = 0; i < int'(L); i++) c[i] = {1'b1, {(H_W-1){1'b0}}};
    compare();
    for (int t = 0; t < 1000; t++) begin
      for (int k = 0; k < 2 * int'(L) - 1; k++) win[k] = X_W'($urandom);
      for (int i = 0; i < int'(L); i++) c[i] = H_W'($urandom);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
