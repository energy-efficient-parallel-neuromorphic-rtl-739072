// snn_mult: the multiplier used inside the LIF arithmetic units and the STDP
// unit. APPROX=1 selects the approximate Booth multiplier, APPROX=0 the exact
// one; both are Q8.8 x Q8.8 -> rounded 16-bit integer part, combinational.
module snn_mult #(
  parameter bit APPROX = 1'b1
) (
  input  logic signed [15:0] a,
  input  logic signed [15:0] b,
  output logic signed [15:0] p
);
  if (APPROX) begin : g_apx
    booth_mult_approx u_mult (.a(a), .b(b), .p(p));
  end else begin : g_std
    booth_mult_std u_mult (.a(a), .b(b), .p(p));
  end
endmodule
