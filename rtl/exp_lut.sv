// exp_lut: pre-computed exponential lookup table of the STDP unit.
//
// Returns e(dt) = exp(-dt / tau) in Q8.8 (1.0 = 256) for a spike-time
// difference dt; dt >= DEPTH reads the last entry. The table is computed at
// elaboration from R = exp(-1/tau) given in Q0.24: entry d = R^d, formed by
// repeated fixed-point multiplication at 24 fractional bits and rounded to
// 8. The STDP rule has negative time constants so that small time
// differences give large changes; here tau is the magnitude. Combinational
// read.
module exp_lut #(
  parameter int          DEPTH = 256,
  parameter logic [23:0] R     = 24'd15_760_736,  // exp(-1/16) * 2^24
  parameter int          DTW   = 16
) (
  input  logic [DTW-1:0] dt,
  output logic [15:0]    e
);
  typedef logic [15:0] table_t [DEPTH];

  function automatic table_t build();
    table_t t;
    logic [47:0] x;
    x = 48'd1 << 24;
    for (int d = 0; d < DEPTH; d++) begin
      t[d] = 16'((x + (48'd1 << 15)) >> 16);
      x    = (x * 48'(R)) >> 24;
    end
    return t;
  endfunction

  localparam table_t TABLE = build();

  always_comb begin
    if (dt >= DTW'(DEPTH - 1)) e = TABLE[DEPTH-1];
    else                       e = TABLE[dt[$clog2(DEPTH)-1:0]];
  end
endmodule
