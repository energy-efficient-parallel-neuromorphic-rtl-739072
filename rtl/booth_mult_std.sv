// booth_mult_std: exact fixed-width 16x16 radix-4 Booth multiplier.
//
// Operands are two's complement Q8.8 numbers. The encoder selects 8 partial
// products from {0, +-A, +-2A}; a negative one is the inverted magnitude plus
// a correction 1 in its lowest column. All rows, the corrections and a
// rounding 1 in column 15 are summed (compression and final addition are
// written as one sum and left to the synthesis tool), and the result is
// columns 31..16: the 16-bit integer part of A*B rounded to nearest
// (ties up), i.e. (A*B + 2^15) >>> 16.
// Combinational, no clock. This is the exact variant the approximate
// multiplier is compared against.
module booth_mult_std (
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  output logic signed [15:0] p
);
  logic [7:0] one, two, neg, zero;

  booth_r4_encoder #(.N(16)) u_enc (.b(b), .one(one), .two(two), .neg(neg), .zero(zero));

  logic signed [31:0] sum;
  always_comb begin
    sum = 32'sd32768;                         // rounding constant in column 15
    for (int i = 0; i < 8; i++) begin
      logic signed [16:0] mag, row;
      mag = one[i] ? 17'(a) : (two[i] ? ($signed(17'(a)) <<< 1) : 17'sd0);
      row = neg[i] ? ~mag : mag;              // one's complement of the selection
      sum = sum + (32'(row) <<< (2*i)) + (32'(neg[i]) << (2*i));
    end
  end
  assign p = sum[31:16];

  logic unused;
  assign unused = ^{zero, sum[15:0]};
endmodule
