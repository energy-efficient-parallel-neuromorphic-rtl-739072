// booth_mult_approx: approximate fixed-width 16x16 radix-4 Booth multiplier
// with input-group-dependent error compensation.
//
// Same interface and number format as booth_mult_std (Q8.8 operands, 16-bit
// rounded integer part of the product), but the low-precision computing unit
// (LPCU) forms only the partial-product bits of columns 15..31. Columns 0..14,
// including every negation correction bit, are never generated. A signature
// generator classifies the operands into three groups from the Booth
// encoder's zero-digit flags and selects an error compensation of 2, 1 or 0
// output LSBs, which a 16-bit carry-propagate adder (the combine unit) adds to
// the LPCU result. The LPCU and the signature path run in parallel.
//
// The group rule is this design's own: with z = number of zero Booth digits,
// z <= 1 -> 2, 2 <= z <= 5 -> 1, z >= 6 -> 0. Each non-zero digit drops on
// average a quarter of an output LSB below column 15, so the rule picks the
// compensation closest to the mean dropped value of each group. Error against
// the exact rounded product stays within -2..+3 LSB.
// Combinational, no clock.
module booth_mult_approx (
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  output logic signed [15:0] p
);
  logic [7:0] one, two, neg, zero;

  booth_r4_encoder #(.N(16)) u_enc (.b(b), .one(one), .two(two), .neg(neg), .zero(zero));

  // LPCU: partial-product bits of columns 15..31 only, as a 17-bit sum
  logic signed [16:0] lpcu;
  always_comb begin
    lpcu = 17'sd1;                            // rounding 1 in column 15
    for (int i = 0; i < 8; i++) begin
      logic signed [16:0] mag, row;
      logic signed [31:0] placed;
      mag    = one[i] ? 17'(a) : (two[i] ? ($signed(17'(a)) <<< 1) : 17'sd0);
      row    = neg[i] ? ~mag : mag;
      placed = 32'(row) <<< (2*i);
      lpcu   = lpcu + placed[31:15];          // keep columns 15..31
    end
  end

  // Signature generator: count zero digits, map to a group
  logic [3:0] nzero;
  logic [1:0] comp;
  always_comb begin
    nzero = '0;
    for (int i = 0; i < 8; i++) nzero = nzero + 4'(zero[i]);
    if (nzero <= 4'd1)      comp = 2'd2;
    else if (nzero <= 4'd5) comp = 2'd1;
    else                    comp = 2'd0;
  end

  // Combine unit: 16-bit CPA
  assign p = lpcu[16:1] + 16'(comp);

  logic unused;
  assign unused = lpcu[0];
endmodule
