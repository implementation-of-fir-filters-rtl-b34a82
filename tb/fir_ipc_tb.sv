// fir_ipc_tb: checks the inner product cell against a 64-bit product for
// random signed operands and for the extreme values of both operands.
module fir_ipc_tb;
  localparam int unsigned X_W = fir_pkg::X_W_DEF;
  localparam int unsigned H_W = fir_pkg::H_W_DEF;

  logic signed [X_W-1:0]     x;
  logic signed [H_W-1:0]     h;
  logic signed [X_W+H_W-1:0] p;
  int checks = 0, failures = 0;

  fir_ipc dut (.x(x), .h(h), .p(p));

  task automatic check(input longint xv, input longint hv);
    longint expv;
    x = X_W'(xv);
    h = H_W'(hv);
    #1;
    expv = longint'(x) * longint'(h);
    checks++;
    if (longint'(p) != expv) begin
      failures++;
      $display("FAIL x=%0d h=%0d p=%0d expected %0d", x, h, p, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(-(64'sd1 <<< (X_W-1)), -(64'sd1 <<< (H_W-1)));
    check((64'sd1 <<< (X_W-1)) - 1, -(64'sd1 <<< (H_W-1)));
    check((64'sd1 <<< (X_W-1)) - 1, (64'sd1 <<< (H_W-1)) - 1);
    check(0, 5);
    check(32, 10);
    for (int t = 0; t < 500; t++) check(longint'($urandom), longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
