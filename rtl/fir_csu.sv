// fir_csu: coefficient storage unit.
//
// Holds the N filter coefficients h(0)..h(N-1) in a chain of D flip-flops.
// Coefficients are loaded serially: each cycle with h_load high shifts h_in
// into position N-1 and moves every stored coefficient one position down, so
// after N loads the first value written sits in coef[0] = h(0) and the last
// in coef[N-1] = h(N-1). All coefficients are visible in parallel on coef and
// change on the clock edge that follows a load. rst_n (active low,
// synchronous) clears them to zero.
//
// Storage in flip-flops follows the reference design; the serial load port
// and its order are choices of this design.
module fir_csu #(
  parameter int unsigned N   = fir_pkg::N_DEF,
  parameter int unsigned H_W = fir_pkg::H_W_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  h_load,
  input  logic signed [H_W-1:0] h_in,
  output logic signed [H_W-1:0] coef [N]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) coef[i] <= '0;
    end else if (h_load) begin
      for (int i = 0; i < int'(N) - 1; i++) coef[i] <= coef[i+1];
      coef[N-1] <= h_in;
    end
  end

endmodule
