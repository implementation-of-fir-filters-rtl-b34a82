// fir_top: block FIR filter built from inner product units and parallel
// accumulation.
//
// Computes y(n) = sum_{t=0}^{N-1} h(t) x(n-t), taking and producing a block
// of L = N/M samples every clock. The register unit (RU) stores incoming
// blocks and broadcasts a 2L-1 sample window; the coefficient storage unit
// (CSU) holds h(0)..h(N-1); IPU m (m = 0..M-1) computes the L inner products
// of the window with taps mL..mL+L-1; the pipelined adder unit (PAU) adds the
// IPU results in parallel across L lanes, delaying IPU m's result by m blocks.
//
// Interface:
//   h_load/h     serial coefficient load, h(0) first, N cycles (see fir_csu)
//   x_valid/x    input block, x[j] = x(kL+j), j = 0 the oldest sample
//   y_valid/y    output block, y[j] = y(kL+j)
// Timing: a block taken at clock edge t (x_valid high) is stored by the RU at
// that edge and its output is registered by the PAU at edge t+1, so it appears
// on y with y_valid high for the cycle after edge t+1. One block per clock at
// full rate (L outputs per clock); x_valid may drop for any number of cycles.
// Coefficients may be reloaded at any time; output blocks that still hold
// partial sums made with the old set (the next M-1 blocks) mix the two sets.
//
// The structure (RU, CSU, M IPUs, PAU) and the sizes N = 32, M = 4 and the bus
// widths follow the reference design; the handshake, the load port, signed
// arithmetic and reset are this design's choices.
module fir_top #(
  parameter int unsigned N   = fir_pkg::N_DEF,
  parameter int unsigned M   = fir_pkg::M_DEF,
  parameter int unsigned X_W = fir_pkg::X_W_DEF,
  parameter int unsigned H_W = fir_pkg::H_W_DEF,
  parameter int unsigned Y_W = fir_pkg::Y_W_DEF,
  localparam int unsigned L  = N / M
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  h_load,
  input  logic signed [H_W-1:0] h,
  input  logic                  x_valid,
  input  logic signed [X_W-1:0] x [L],
  output logic signed [Y_W-1:0] y [L],
  output logic                  y_valid
);

  if (N % M != 0 || M == 0) begin : g_bad_size
    $error("fir_top: N must be a multiple of M");
  end

  logic signed [H_W-1:0] coef  [N];
  logic signed [H_W-1:0] c_sub [M][L];
  logic signed [X_W-1:0] win   [2*L-1];
  logic                  win_valid;
  logic signed [Y_W-1:0] r     [M][L];

  fir_csu #(.N(N), .H_W(H_W)) u_csu (
    .clk    (clk),
    .rst_n  (rst_n),
    .h_load (h_load),
    .h_in   (h),
    .coef   (coef)
  );

  fir_ru #(.L(L), .X_W(X_W)) u_ru (
    .clk       (clk),
    .rst_n     (rst_n),
    .x_valid   (x_valid),
    .x_blk     (x),
    .win       (win),
    .win_valid (win_valid)
  );

  for (genvar m = 0; m < M; m++) begin : g_ipu
    for (genvar i = 0; i < L; i++) begin : g_coef
      assign c_sub[m][i] = coef[m*L+i];
    end
    fir_ipu #(.L(L), .X_W(X_W), .H_W(H_W), .Y_W(Y_W)) u_ipu (
      .win (win),
      .c   (c_sub[m]),
      .r   (r[m])
    );
  end

  fir_pau #(.M(M), .L(L), .Y_W(Y_W)) u_pau (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (win_valid),
    .r       (r),
    .y       (y),
    .y_valid (y_valid)
  );

endmodule
