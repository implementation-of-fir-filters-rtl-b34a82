// fir_top_tb: end-to-end test of the block FIR filter at its default size
// (N = 32 taps, M = 4 IPUs, L = 8 samples per block).
//
// A reference model keeps the whole input stream and the coefficient set and
// computes every output sample as y(n) = sum_t h(t) x(n-t) (modulo 2**Y_W),
// independently of the block structure. Phases:
//   1. reset, serial load of N random coefficients
//   2. back-to-back blocks (one block per clock)
//   3. blocks with random gaps (x_valid low, pipeline stalls)
//   4. coefficient reload between blocks; the next M-1 output blocks mix old
//      and new partial sums and are not compared, later ones are
//   5. reset in mid-stream, all coefficients 0xA and a constant input 0x20,
//      the stimulus of the reference design's simulation
//   6. random full-scale samples and coefficients, where the sums wrap
// Each output block must appear exactly two clocks after its input block.
// The test counts how often each mechanism happened and fails if one never
// did.
module fir_top_tb;
  localparam int unsigned N   = fir_pkg::N_DEF;
  localparam int unsigned M   = fir_pkg::M_DEF;
  localparam int unsigned L   = N / M;
  localparam int unsigned X_W = fir_pkg::X_W_DEF;
  localparam int unsigned H_W = fir_pkg::H_W_DEF;
  localparam int unsigned Y_W = fir_pkg::Y_W_DEF;
  localparam int unsigned LATENCY = 1;  // clock edges from taking a block to its output

  typedef logic signed [Y_W-1:0] blk_t [L];

  logic clk = 1'b0, rst_n = 1'b0, h_load = 1'b0, x_valid = 1'b0;
  logic signed [H_W-1:0] h = '0;
  logic signed [X_W-1:0] x [L];
  logic signed [Y_W-1:0] y [L];
  logic y_valid;

  longint xs [$];          // input stream since the last reset
  longint hc [N];          // coefficients as the model sees them
  blk_t   exp_y [$];       // expected output blocks, oldest first
  logic   exp_skip [$];    // block mixes two coefficient sets: not compared
  longint exp_t [$];       // time its input block was taken
  int     skip_blocks = 0;
  int checks = 0, failures = 0;
  int n_loads = 0, n_blocks = 0, n_backtoback = 0, n_stalls = 0, n_reloads = 0,
      n_resets = 0, n_skipped = 0, n_wraps = 0, n_fig2 = 0;

  fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- model
  function automatic blk_t model_block();
    blk_t   r;
    int     base, idx;
    longint acc;
    base = xs.size() - int'(L);
    for (int j = 0; j < int'(L); j++) begin
      acc = 0;
      for (int t = 0; t < int'(N); t++) begin
        idx = base + j - t;
        if (idx >= 0) acc += hc[t] * xs[idx];
      end
      r[j] = Y_W'(acc);
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- driver
  task automatic load_coefs(input int kind);  // 0 random, 1 all 0xA
    logic signed [H_W-1:0] v;
    for (int t = 0; t < int'(N); t++) begin
      v = (kind == 1) ? H_W'(4'hA) : H_W'($urandom);
      x_valid <= 1'b0;
      h_load  <= 1'b1;
      h       <= v;
      @(posedge clk);
      hc[t] = longint'(v);
    end
    n_loads++;
  endtask

  task automatic send_block(input int kind);  // 0 random, 1 constant 0x20, 2 extremes
    for (int j = 0; j < int'(L); j++) begin
      case (kind)
        1:       x[j] <= X_W'(32'h20);
        2:       x[j] <= ($urandom_range(0, 1) == 1) ? {1'b1, {(X_W-1){1'b0}}} : {1'b0, {(X_W-1){1'b1}}};
        default: x[j] <= X_W'($urandom);
      endcase
    end
    h_load  <= 1'b0;
    x_valid <= 1'b1;
    @(posedge clk);
    for (int j = 0; j < int'(L); j++) xs.push_back(longint'(x[j]));
    exp_y.push_back(model_block());
    exp_skip.push_back(skip_blocks > 0);
    exp_t.push_back(longint'($time));
    if (skip_blocks > 0) skip_blocks--;
    n_blocks++;
    if (kind == 1) n_fig2++;
  endtask

  task automatic idle(input int cycles);
    x_valid <= 1'b0;
    h_load  <= 1'b0;
    repeat (cycles) @(posedge clk);
  endtask

  task automatic drain();
    idle(LATENCY + 2);
  endtask

  // ---------------------------------------------------------------- monitor
  blk_t   ey;
  logic   eskip;
  longint et;

  always @(posedge clk) begin
    #1;
    if (y_valid) begin
      checks++;
      if (exp_y.size() == 0) begin
        failures++;
        $display("FAIL unexpected output block at %0t", $time);
      end else begin
        ey    = exp_y[0];
        exp_y.delete(0);
        eskip = exp_skip.pop_front();
        et    = exp_t.pop_front();
        if (longint'($time) - 1 != et + 10 * LATENCY) begin
          failures++;
          $display("FAIL latency: block taken at %0t, output at %0t", et, $time - 1);
        end
        if (eskip) n_skipped++;
        else begin
          for (int j = 0; j < int'(L); j++) begin
            checks++;
            if (y[j] !== ey[j]) begin
              failures++;
              $display("FAIL y[%0d]=%0d expected %0d at %0t", j, y[j], ey[j], $time);
            end
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    for (int j = 0; j < int'(L); j++) x[j] = '0;
    idle(3);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1-2: load, then back-to-back blocks
    load_coefs(0);
    for (int b = 0; b < 100; b++) begin
      send_block(0);
      if (b > 0) n_backtoback++;
    end

    // 3: gaps
    for (int b = 0; b < 100; b++) begin
      send_block(0);
      if ($urandom_range(0, 1) == 0) begin
        idle($urandom_range(1, 4));
        n_stalls++;
      end
    end

    // 4: reload in mid-stream
    for (int k = 0; k < 3; k++) begin
      idle($urandom_range(0, 3));
      load_coefs(0);
      n_reloads++;
      skip_blocks = int'(M) - 1;
      for (int b = 0; b < 30; b++) send_block(0);
    end
    drain();

    // 5: reset, then the reference design's stimulus
    rst_n <= 1'b0;
    idle(1);
    rst_n <= 1'b1;
    xs.delete();
    for (int t = 0; t < int'(N); t++) hc[t] = 0;
    skip_blocks = 0;
    n_resets++;
    load_coefs(1);
    for (int b = 0; b < 10; b++) send_block(1);
    drain();
    checks++;
    if (y[0] !== Y_W'(longint'(N) * 32 * (-6))) begin
      // 0xA as a signed 4-bit coefficient is -6
      failures++;
      $display("FAIL steady-state output %0d", y[0]);
    end

    // 6: full-scale values, the sums wrap
    for (int t = 0; t < int'(N); t++) begin
      h_load <= 1'b1;
      h      <= {1'b1, {(H_W-1){1'b0}}};
      @(posedge clk);
      hc[t] = -(longint'(1) << (H_W - 1));
    end
    n_reloads++;
    skip_blocks = int'(M) - 1;
    for (int b = 0; b < int'(M) + 20; b++) begin
      send_block(2);
      if (b >= int'(M)) n_wraps++;
    end
    drain();

    checks++;
    if (exp_y.size() != 0) begin
      failures++;
      $display("FAIL %0d output blocks never appeared", exp_y.size());
    end

    $display("mechanisms: loads=%0d blocks=%0d back_to_back=%0d stalls=%0d reloads=%0d resets=%0d skipped_mixed=%0d fig2_blocks=%0d wrap_blocks=%0d",
             n_loads, n_blocks, n_backtoback, n_stalls, n_reloads, n_resets, n_skipped, n_fig2, n_wraps);
    if (n_loads == 0 || n_backtoback == 0 || n_stalls == 0 || n_reloads == 0 ||
        n_resets == 0 || n_skipped == 0 || n_fig2 == 0 || n_wraps == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
