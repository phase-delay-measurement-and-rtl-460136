// amp_db -- tone amplitude in decibels from the two accumulator results.
//
// The amplitude A = sqrt(DC1^2 + DC2^2) is found without a square root by
// working in the log domain:
//   20*log10(A) = 10*log10(DC1^2 + DC2^2) = (10/log2 10) * log2(DC1^2 + DC2^2)
// The sum of squares S (2M+1 bits) is turned into log2 S by the linear
// approximation log2(2**e * (1+x)) ~ e + x: e is the position of the
// leading one and x the next LF bits of S. The result is scaled by
// 10/log2(10) = 3.0103. The approximation reads up to 0.086 low in log2,
// i.e. up to 0.26 dB low; it is exact at powers of two.
//
// Using the magnitude from both accumulators (so amplitude and phase do
// not depend on each other) and the log-domain evaluation follow the
// architecture; the four-stage pipeline and the number formats are this
// design's choices. 'db' is unsigned with DBF fraction bits and refers to
// an accumulated value of 1 (0 dB); it does not include the 2**(2N-2)*K/2
// gain of the correlation, which a user subtracts as a constant.
//
// Timing: fully pipelined; 'valid' follows 'start' by 4 cycles, with
// 'db' and 'zero' (S = 0, db reported as 0) alongside.
module amp_db #(
  parameter int unsigned M   = bist_pkg::M_BITS,
  parameter int unsigned DBW = bist_pkg::DB_BITS,
  parameter int unsigned DBF = bist_pkg::DB_FRAC,
  parameter int unsigned LF  = 10   // fraction bits of log2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [M-1:0] dc1,
  input  logic signed [M-1:0] dc2,
  output logic                valid,
  output logic                zero,
  output logic [DBW-1:0]      db
);

  localparam int unsigned SW = 2 * M + 1;          // sum-of-squares width
  localparam int unsigned EW = $clog2(SW);         // exponent width
  localparam int unsigned CF = 14;                 // fraction bits of C_DB
  localparam longint unsigned C_DB =
      longint'(10.0 / ($ln(10.0) / $ln(2.0)) * real'(2 ** CF) + 0.5);

  // Stage 1: squares (operands widened first, so the products are exact).
  logic signed [2*M-1:0] x1, x2;
  logic [2*M-1:0] sq1, sq2;
  assign x1 = (2*M)'(dc1);
  assign x2 = (2*M)'(dc2);
  logic           v1;
  // Stage 2: sum.
  logic [SW-1:0]  s;
  logic           v2;
  // Stage 3: log2.
  logic [EW+LF-1:0] lg;
  logic           z3, v3;

  logic [EW-1:0]  e_c;
  logic [SW-1:0]  norm_c;
  always_comb begin
    e_c = '0;
    for (int i = 0; i < SW; i++)
      if (s[i]) e_c = EW'(i);
    norm_c = s << (EW'(SW - 1) - e_c);
  end

  logic [EW+LF+CF+1:0] prod;
  assign prod = (EW+LF+CF+2)'(lg) * (EW+LF+CF+2)'(C_DB)
              + ((EW+LF+CF+2)'(1) << (LF + CF - DBF - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq1 <= '0; sq2 <= '0; v1 <= 1'b0;
      s   <= '0; v2  <= 1'b0;
      lg  <= '0; z3  <= 1'b0; v3 <= 1'b0;
      db  <= '0; zero <= 1'b0; valid <= 1'b0;
    end else begin
      v1  <= start;
      if (start) begin
        sq1 <= x1 * x1;
        sq2 <= x2 * x2;
      end
      v2 <= v1;
      if (v1) s <= SW'(sq1) + SW'(sq2);
      v3 <= v2;
      if (v2) begin
        lg <= {e_c, norm_c[SW-2 -: LF]};
        z3 <= (s == '0);
      end
      valid <= v3;
      if (v3) begin
        db   <= z3 ? '0 : DBW'(prod >> (LF + CF - DBF));
        zero <= z3;
      end
    end
  end

endmodule
