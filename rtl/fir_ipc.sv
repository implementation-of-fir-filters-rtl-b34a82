// fir_ipc: inner product cell.
//
// Forms one partial product of the filter: a signed input sample times its
// signed coefficient, at full precision (X_W + H_W bits). It is purely
// combinational; the inner product unit adds L of these. The cell's job
// follows the reference design; a plain signed multiplier is this design's
// choice of how to do it.
module fir_ipc #(
  parameter int unsigned X_W = fir_pkg::X_W_DEF,
  parameter int unsigned H_W = fir_pkg::H_W_DEF
) (
  input  logic signed [X_W-1:0]     x,
  input  logic signed [H_W-1:0]     h,
  output logic signed [X_W+H_W-1:0] p
);

  always_comb p = (X_W+H_W)'(x) * (X_W+H_W)'(h);

endmodule
