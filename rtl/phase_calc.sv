// phase_calc -- phase delay of the analyzed tone from the two accumulator
// results, dphi = atan2(DC2, DC1), without a full-range arctangent table.
//
// How it works:
//  * The sign bits of DC1 and DC2 give the quadrant; comparing |DC1| with
//    |DC2| gives the octant. Only the absolute phase offset
//      dphi_o = atan(min(|DC1|,|DC2|) / max(|DC1|,|DC2|)),  0..45 deg,
//    is evaluated, and the octant table
//      DC1>=0,DC2>=0:  dphi_o        (|DC1|>=|DC2|)   90 - dphi_o (else)
//      DC1>=0,DC2<0 :  360 - dphi_o                   270 + dphi_o
//      DC1<0, DC2>=0:  180 - dphi_o                    90 + dphi_o
//      DC1<0, DC2<0 :  180 + dphi_o                   270 - dphi_o
//    restores the full angle. A zero value counts as positive.
//  * The ratio r = min/max is formed with R fraction bits by a restoring
//    divider, one quotient bit per clock.
//  * Below r = 1/16 the arctangent is replaced by the ratio itself
//    (atan r ~ r, error under 0.005 deg there), so the table only covers
//    1/16 <= r <= 1: entries atan(i/2**L) for i = 2**(L-4) .. 2**L+1,
//    computed at elaboration, with linear interpolation between entries.
//
// The octant reduction, the table and the small-ratio shortcut follow the
// method this architecture uses for on-chip phase measurement; the divider,
// the table size, the interpolation and the output format are this
// design's choices.
//
// Interface: 'start' (while not busy) samples dc1/dc2. 'valid' pulses
// R+3 cycles later with 'phase' (binary angle, 2**AW = 360 deg) and
// 'offset' (dphi_o in the same unit); both hold until the next result.
// If DC1 = DC2 = 0 the phase is undefined and reported as 0 with 'zero'.
module phase_calc #(
  parameter int unsigned M  = bist_pkg::M_BITS,
  parameter int unsigned AW = bist_pkg::ANGLE_BITS,
  parameter int unsigned R  = 14,  // fraction bits of the ratio
  parameter int unsigned L  = 6,   // table step is 2**-L in the ratio
  parameter int unsigned G  = 4    // extra fraction bits kept in the table
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [M-1:0] dc1,
  input  logic signed [M-1:0] dc2,
  output logic                busy,
  output logic                valid,
  output logic                zero,
  output logic [AW-1:0]       phase,
  output logic [AW-1:0]       offset
);

  localparam real PI = 3.14159265358979323846;
  localparam int unsigned LUT_LO = 2 ** (L - 4);   // first stored index
  localparam int unsigned LUT_HI = 2 ** L + 1;     // last stored index
  localparam int unsigned EW     = AW + G + 1;     // entry width
  localparam int unsigned SMALL  = 2 ** (R - 4);   // ratio 1/16
  localparam int unsigned FB     = R - L;          // interpolation bits
  // 2**AW / (2*pi) with 8 fraction bits: radians -> binary angle.
  localparam longint unsigned C_RAD =
      longint'(real'(2.0 ** AW) / (2.0 * PI) * 256.0 + 0.5);

  function automatic logic [EW-1:0] atan_entry(int unsigned i);
    real v;
    v = $atan(real'(i) / real'(2 ** L)) / (2.0 * PI) * real'(2.0 ** (AW + G));
    return EW'(longint'(v + 0.5));
  endfunction

  logic [EW-1:0] atan_rom [LUT_HI - LUT_LO + 1];
  for (genvar i = LUT_LO; i <= LUT_HI; i++) begin : g_rom
    localparam logic [EW-1:0] ENTRY = atan_entry(i);
    assign atan_rom[i - LUT_LO] = ENTRY;
  end

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_MAP} state_e;
  state_e state;

  logic          neg1, neg2, swap, den_zero;
  logic [M-1:0]  den;
  logic [M:0]    rem;
  logic [R:0]    q;
  logic [$clog2(R+2)-1:0] step;

  logic [M-1:0]  mag1, mag2;
  assign mag1 = dc1[M-1] ? M'(-dc1) : M'(dc1);
  assign mag2 = dc2[M-1] ? M'(-dc2) : M'(dc2);

  // Divider step.
  logic          ge;
  logic [M:0]    rem_sub;
  assign ge      = rem >= (M+1)'(den);
  assign rem_sub = ge ? rem - (M+1)'(den) : rem;

  // Arctangent of q / 2**R, as a binary angle.
  logic [L:0]            idx;
  logic [FB-1:0]         frac;
  logic [EW-1:0]         y0, y1;
  logic [EW+FB:0]        interp;
  logic [R+40:0]         lin;
  logic [AW-1:0]         phio;

  always_comb begin
    idx    = q[R:FB];
    frac   = q[FB-1:0];
    y0     = '0;
    y1     = '0;
    interp = '0;
    lin    = (R+41)'(q) * (R+41)'(C_RAD) + ((R+41)'(1) << (R + 7));
    if (q < (R+1)'(SMALL)) begin
      phio = AW'(lin >> (R + 8));
    end else begin
      y0     = atan_rom[int'(idx) - LUT_LO];
      y1     = atan_rom[int'(idx) + 1 - LUT_LO];
      interp = ((EW+FB+1)'(y0) << FB) + (EW+FB+1)'(y1 - y0) * (EW+FB+1)'(frac)
               + ((EW+FB+1)'(1) << (FB + G - 1));
      phio   = AW'(interp >> (FB + G));
    end
  end

  // Octant table.
  localparam logic [AW-1:0] Q90  = AW'(2 ** (AW - 2));
  localparam logic [AW-1:0] Q180 = AW'(2 ** (AW - 1));
  localparam logic [AW-1:0] Q270 = Q90 + Q180;

  logic [AW-1:0] full;
  always_comb begin
    unique case ({neg1, neg2, swap})
      3'b000: full = phio;
      3'b001: full = Q90 - phio;
      3'b010: full = AW'(0) - phio;
      3'b011: full = Q270 + phio;
      3'b100: full = Q180 - phio;
      3'b101: full = Q90 + phio;
      3'b110: full = Q180 + phio;
      3'b111: full = Q270 - phio;
      default: full = phio;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      neg1     <= 1'b0;
      neg2     <= 1'b0;
      swap     <= 1'b0;
      den_zero <= 1'b0;
      den      <= '0;
      rem      <= '0;
      q        <= '0;
      step     <= '0;
      valid    <= 1'b0;
      zero     <= 1'b0;
      phase    <= '0;
      offset   <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          neg1     <= dc1[M-1];
          neg2     <= dc2[M-1];
          swap     <= mag1 < mag2;
          den      <= (mag1 < mag2) ? mag2 : mag1;
          rem      <= (M+1)'((mag1 < mag2) ? mag1 : mag2);
          den_zero <= (mag1 == '0) && (mag2 == '0);
          q        <= '0;
          step     <= '0;
          state    <= S_DIV;
        end
        S_DIV: begin
          q    <= {q[R-1:0], ge};
          rem  <= {rem_sub[M-1:0], 1'b0};
          step <= step + 1'b1;
          if (step == ($clog2(R+2))'(R)) state <= S_MAP;
        end
        S_MAP: begin
          valid  <= 1'b1;
          zero   <= den_zero;
          phase  <= den_zero ? '0 : full;
          offset <= den_zero ? '0 : phio;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
