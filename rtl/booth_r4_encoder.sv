// booth_r4_encoder: radix-4 modified Booth encoding of a 16-bit multiplier.
//
// Each of the 8 overlapping bit triplets (b[2i+1], b[2i], b[2i-1]) selects one
// partial product from {0, +A, +2A, -A, -2A}. The encoder outputs, per digit,
// the one-hot magnitude select (one = |d|==1, two = |d|==2), the negate flag
// and a zero flag. Purely combinational. Shared by the exact and the
// approximate multipliers; the zero flags also feed the signature generator
// of the approximate one.
module booth_r4_encoder #(
  parameter int N = 16
) (
  input  logic [N-1:0]   b,
  output logic [N/2-1:0] one,
  output logic [N/2-1:0] two,
  output logic [N/2-1:0] neg,
  output logic [N/2-1:0] zero
);
  logic [N:0] bx;
  assign bx = {b, 1'b0};

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      logic [2:0] t;
      t       = bx[2*i +: 3];
      one[i]  = t[0] ^ t[1];
      two[i]  = (t == 3'b011) || (t == 3'b100);
      neg[i]  = t[2] && !(t[1] && t[0]);
      zero[i] = (t == 3'b000) || (t == 3'b111);
    end
  end
endmodule
