// fir_pau: pipelined adder unit (parallel accumulation).
//
// Combines the results of the M IPUs into the filter output. IPU m works on
// taps mL..mL+L-1, so its contribution to output block k is the result it
// produced for block k-m. The unit is a chain of M registered stages, each L
// adders wide, run once per block (en high):
//   s[M-1] <= r[M-1]
//   s[m]   <= r[m] + s[m+1]        m = M-2 .. 0
// so s[0] after block k equals sum_m r[m] of block k-m: the filtered block
// y(kL+j), j = 0..L-1. All L lanes accumulate in parallel. y is s[0]; y_valid
// is high for the cycle after each enabled edge, so the output appears one
// clock after the IPU results. With en low the chain holds, so gaps between
// input blocks do not disturb the accumulation. rst_n (active low,
// synchronous) clears the partial sums. An assertion checks that y_valid
// follows en by one clock.
//
// A chain of pipelined adders passing partial sums from stage to stage follows
// the reference design; the order of the chain and the handshake are this
// design's choices. Sums are kept to Y_W bits (exact modulo 2**Y_W).
module fir_pau #(
  parameter int unsigned M   = fir_pkg::M_DEF,
  parameter int unsigned L   = fir_pkg::L_DEF,
  parameter int unsigned Y_W = fir_pkg::Y_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic signed [Y_W-1:0] r [M][L],
  output logic signed [Y_W-1:0] y [L],
  output logic                  y_valid
);

  logic signed [Y_W-1:0] s [M][L];  // partial sum registers, one stage per IPU

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int m = 0; m < int'(M); m++)
        for (int j = 0; j < int'(L); j++) s[m][j] <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        for (int j = 0; j < int'(L); j++) s[M-1][j] <= r[M-1][j];
        for (int m = 0; m < int'(M) - 1; m++)
          for (int j = 0; j < int'(L); j++) s[m][j] <= r[m][j] + s[m+1][j];
      end
    end
  end

  always_comb
    for (int j = 0; j < int'(L); j++) y[j] = s[0][j];

  // Exactly one output block per enabled clock, one clock later.
  a_valid_follows_en: assert property (@(posedge clk) disable iff (!rst_n)
                                       y_valid == $past(en))
    else $error("fir_pau: y_valid does not follow en");

endmodule
