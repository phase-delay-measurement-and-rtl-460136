// mac -- one multiplier/accumulator pair of the output response analyzer.
//
// Every cycle with 'en' high the signed N x N-bit product a*b (2N bits) is
// sign-extended and added to an M-bit accumulator. 'clear' zeroes the
// accumulator and wins over 'en'. The accumulator cannot overflow as long
// as the sequence length K satisfies K < 2**(M-2N), the sizing rule of the
// architecture; widths N and M are parameters as in the original model.
// Single-cycle: a product presented in cycle t is part of 'acc' from t+1.
module mac #(
  parameter int unsigned N = bist_pkg::N_BITS,
  parameter int unsigned M = bist_pkg::M_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic signed [N-1:0] a,
  input  logic signed [N-1:0] b,
  output logic signed [M-1:0] acc
);

  logic signed [2*N-1:0] prod;
  assign prod = a * b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      acc <= '0;
    else if (clear)  acc <= '0;
    else if (en)     acc <= acc + M'(prod);
  end

  initial assert (M > 2 * N) else $error("mac: M must exceed 2N");

endmodule
