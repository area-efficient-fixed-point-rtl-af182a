// ppg: partial product generator for radix-4 (2-bit digit) multiplication.
//
// The multiplier word (MPW bits, even) is cut into D = MPW/2 two-bit digits.
// For every digit a 2-to-3 decoder raises at most one of three select lines
// (digit value 1, 2 or 3) and an AND-OR cell gates the matching precomputed
// multiple of the multiplicand onto the partial product, so no multiplier
// array is needed: the only adder is the one that forms 3*m, shared by all
// digits. The top digit carries the sign of the two's-complement multiplier,
// so its values 2 and 3 stand for -2 and -1 and select -2*m and -m instead.
// Then  mplier * mcand = sum_j pp[j] * 4^j.  Purely combinational.
// Each partial product is MW+2 bits wide, signed.
// The use of 2-bit digit multiplication follows the filter's description;
// the decoder / AND-OR structure and the sign handling of the top digit are
// this design's own reconstruction.
module ppg #(
  parameter int unsigned MW  = 16,  // multiplicand width (signed)
  parameter int unsigned MPW = 8    // multiplier width (signed, even)
) (
  input  logic signed [MW-1:0]    mcand,
  input  logic        [MPW-1:0]   mplier,
  output logic signed [MW+1:0]    pp [MPW/2]
);

  localparam int unsigned D  = MPW / 2;
  localparam int unsigned PW = MW + 2;

  if (MPW < 2 || (MPW % 2) != 0) begin : g_bad_mpw
    $error("ppg: MPW must be even and at least 2");
  end

  logic signed [PW-1:0] m1, m2, m3, n1, n2;
  always_comb begin
    m1 = PW'(mcand);
    m2 = m1 <<< 1;
    m3 = m1 + m2;
    n1 = -m1;
    n2 = -m2;
  end

  for (genvar j = 0; j < D; j++) begin : g_digit
    logic u0, u1;
    logic r1, r2, r3;   // 2-to-3 decoder outputs
    assign u0 = mplier[2*j];
    assign u1 = mplier[2*j+1];
    assign r1 = u0 & ~u1;
    assign r2 = ~u0 & u1;
    assign r3 = u0 & u1;

    // AND-OR cell
    if (j == D - 1) begin : g_sign
      assign pp[j] = ({PW{r1}} & m1) | ({PW{r2}} & n2) | ({PW{r3}} & n1);
    end else begin : g_mag
      assign pp[j] = ({PW{r1}} & m1) | ({PW{r2}} & m2) | ({PW{r3}} & m3);
    end
  end

endmodule
