// fir_ru: register unit.
//
// Buffers the input in D flip-flops one block of L samples at a time. A block
// x_blk[j] = x(kL+j), j = 0..L-1 (j = 0 the oldest), is taken on every clock
// edge at which x_valid is high. The unit keeps that block and the last L-1
// samples of the block before it, and presents them as the shared window
//   win[e] = x(kL - (L-1) + e),  e = 0..2L-2,
// which is every sample any of the L outputs of block k needs from its own
// and the previous block. win_valid is high for one cycle after each accepted
// block, so the downstream units see every block exactly once. With x_valid
// low the registers hold (a stall). rst_n (active low, synchronous) clears the
// stored samples, so the filter starts from an all-zero history.
//
// Register-based buffering and shifting follow the reference design; the
// valid handshake and the window layout are choices of this design.
module fir_ru #(
  parameter int unsigned L   = fir_pkg::L_DEF,
  parameter int unsigned X_W = fir_pkg::X_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  x_valid,
  input  logic signed [X_W-1:0] x_blk [L],
  output logic signed [X_W-1:0] win   [2*L-1],
  output logic                  win_valid
);

  logic signed [X_W-1:0] cur  [L];    // current block
  logic signed [X_W-1:0] prev [L-1];  // samples 1..L-1 of the previous block

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(L); j++)     cur[j]  <= '0;
      for (int j = 0; j < int'(L) - 1; j++) prev[j] <= '0;
      win_valid <= 1'b0;
    end else begin
      win_valid <= x_valid;
      if (x_valid) begin
        for (int j = 0; j < int'(L) - 1; j++) prev[j] <= cur[j+1];
        for (int j = 0; j < int'(L); j++)     cur[j]  <= x_blk[j];
      end
    end
  end

  always_comb begin
    for (int e = 0; e < int'(L) - 1; e++) win[e]       = prev[e];
    for (int j = 0; j < int'(L); j++)     win[L-1+j]   = cur[j];
  end

endmodule
