// fir_csu_tb: loads the coefficient storage unit serially, checks every stored
// coefficient and its position, checks that the store holds while h_load is
// low, that a partial reload shifts the chain by the number of loads, and
// that reset clears it.
module fir_csu_tb;
  localparam int unsigned N   = fir_pkg::N_DEF;
  localparam int unsigned H_W = fir_pkg::H_W_DEF;

  logic clk = 1'b0, rst_n = 1'b0, h_load = 1'b0;
  logic signed [H_W-1:0] h_in = '0;
  logic signed [H_W-1:0] coef [N];
  logic signed [H_W-1:0] model [$];  // the last N values loaded, oldest first
  int checks = 0, failures = 0;

  fir_csu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic signed [H_W-1:0] v);
    h_load <= 1'b1;
    h_in   <= v;
    @(posedge clk);
    model.push_back(v);

    if (model.size() > N) void'(model.pop_front());
  endtask

  task automatic compare(input string what);
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (coef[i] !== model[i]) begin
        failures++;
        $display("FAIL %s: coef[%0d]=%0d expected %0d", what, i, coef[i], model[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < int'(N); i++) model.push_back('0);
    @(posedge clk);
    #1 compare("after reset");
    for (int i = 0; i < int'(N); i++) load(H_W'($urandom));
    h_load <= 1'b0;
    #1 compare("full load");
    h_in <= H_W'($urandom);
    repeat (5) @(posedge clk);
    #1 compare("hold");
    for (int i = 0; i < 3; i++) load(H_W'($urandom));
    h_load <= 1'b0;
    #1 compare("partial reload");
    for (int i = 0; i < int'(N); i++) begin
      load(H_W'(i));
    end
    h_load <= 1'b0;
    #1 compare("ramp");
    rst_n <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < int'(N); i++) model[i] = '0;
    #1 compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
