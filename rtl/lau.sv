// lau: LIF arithmetic unit, one lane of the neuron operation stage.
//
// Updates one membrane potential by the digitised leaky integrate-and-fire
// rule
//     Vnew = Vold + K_SYN * sum_j W(j,i)*S(j) + K_EXT*E(i) + Inh(i) - V_LEAK
// The weighted spike sum is built serially: each LAU_ACC cycle adds the
// weight w_in if the presynaptic flag s_in is set (one presynaptic neuron per
// cycle, as in the serial baseline). On the LAU_UPDATE cycle the unit
// presents v_new combinationally, for the neuron unit to write at the clock
// edge, and clears the accumulator.
//
// K_SYN scaling uses the unit's one multiplier (approximate or exact Booth,
// parameter APPROX): the 16-bit accumulator is read as a Q8.8 operand, so the
// synaptic term is round(K_SYN * acc / 2^16) for a Q8.8 K_SYN. The external
// spike amplitude K_EXT = KEXT_MIN + rnd[KEXT_BITS-1:0] comes from the lane's
// LFSR; the constant-weight inhibitory input inh_in is computed elsewhere and
// added here. The result saturates to the 16-bit signed range.
// The scaling and the constants are this design's own choices.
module lau
  import snn_pkg::*;
#(
  parameter bit              APPROX    = 1'b1,
  parameter logic [15:0]     K_SYN     = 16'h4000,  // Q8.8, 64.0 -> acc/4
  parameter int              KEXT_MIN  = 256,
  parameter int              KEXT_BITS = 8,
  parameter int              V_LEAK    = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  lau_op_e  op,
  input  weight_t  w_in,      // plastic weight of the current presynaptic neuron
  input  logic     s_in,      // its firing flag
  input  logic     e_in,      // external input spike of the neuron being updated
  input  logic [15:0] rnd,    // random number for the external spike amplitude
  input  vmem_t    inh_in,    // summed inhibitory input (<= 0)
  input  vmem_t    v_in,      // current membrane potential (from the neuron unit)
  output vmem_t    v_new,     // updated membrane potential (valid on LAU_UPDATE)
  output logic [15:0] acc     // weighted spike sum so far
);
  always_ff @(posedge clk) begin
    if (!rst_n) acc <= '0;
    else begin
      unique case (op)
        LAU_ACC:    if (s_in) acc <= acc + 16'(w_in);
        LAU_UPDATE: acc <= '0;
        default:    ;
      endcase
    end
  end

  logic signed [15:0] syn_term;
  snn_mult #(.APPROX(APPROX)) u_mult (.a($signed(K_SYN)), .b($signed(acc)), .p(syn_term));

  logic signed [VW+3:0] k_ext, sum;
  always_comb begin
    k_ext = (VW+4)'(KEXT_MIN) + (VW+4)'(rnd[KEXT_BITS-1:0]);
    sum   = (VW+4)'(v_in) + (VW+4)'(syn_term) + (VW+4)'(inh_in)
          - (VW+4)'(V_LEAK) + (e_in ? k_ext : '0);
    v_new = sat_v(sum);
  end
endmodule
