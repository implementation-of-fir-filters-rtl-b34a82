// fir_ipu: inner product unit.
//
// One IPU handles L consecutive taps, coefficients c[i] = h(mL+i), i = 0..L-1,
// for IPU number m (0-based). It receives the window of 2L-1 samples that the
// register unit broadcasts to all IPUs and computes, for each of the L outputs
// j of the block, the inner product
//   r[j] = sum_{i=0}^{L-1} c[i] * win[j - i + L - 1].
// Each product comes from an inner product cell (L x L cells in all) and each
// row of L products is summed by an adder, keeping Y_W bits (exact modulo
// 2**Y_W). The unit is combinational: its results are registered by the
// pipelined adder unit.
//
// Splitting the filter into IPUs built from inner product cells follows the
// reference design; the window indexing and the unregistered adder are this
// design's choices.
module fir_ipu #(
  parameter int unsigned L   = fir_pkg::L_DEF,
  parameter int unsigned X_W = fir_pkg::X_W_DEF,
  parameter int unsigned H_W = fir_pkg::H_W_DEF,
  parameter int unsigned Y_W = fir_pkg::Y_W_DEF
) (
  input  logic signed [X_W-1:0] win [2*L-1],
  input  logic signed [H_W-1:0] c   [L],
  output logic signed [Y_W-1:0] r   [L]
);

  logic signed [X_W+H_W-1:0] p [L][L];  // p[j][i] = c[i] * win[j-i+L-1]

  for (genvar j = 0; j < L; j++) begin : g_row
    for (genvar i = 0; i < L; i++) begin : g_cell
      fir_ipc #(.X_W(X_W), .H_W(H_W)) u_ipc (
        .x (win[j-i+L-1]),
        .h (c[i]),
        .p (p[j][i])
      );
    end
  end

  always_comb begin
    for (int j = 0; j < int'(L); j++) begin
      r[j] = '0;
      for (int i = 0; i < int'(L); i++) r[j] = r[j] + Y_W'(p[j][i]);
    end
  end

endmodule
