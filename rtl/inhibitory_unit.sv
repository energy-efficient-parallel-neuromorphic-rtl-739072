// inhibitory_unit: the inhibitory neurons of both layers with their
// constant-weight synapses.
//
// The network has N_INH_IN inhibitory neurons in the input layer, each fed by
// all input excitatory neurons and feeding all of them back, and one
// inhibitory neuron in the output layer doing the same for the output layer
// (winner-take-all). These synapses are fixed, so their weights are constants
// built into this logic instead of being stored in memory.
//
// upd (one cycle, during the neuron operation stage): each inhibitory
// neuron adds its constant excitatory weight times the number of firing
// excitatory neurons of its layer (previous step's flags), minus the leak.
// fire_chk (with the neuron unit's check): Vmem >= V_TH sets S and resets to
// V_REST, otherwise S clears. inh_to_in / inh_to_out are the (negative)
// inhibitory inputs that the arithmetic units add to every excitatory neuron
// of each layer: the sum of the constant inhibitory weights of the firing
// inhibitory neurons. clear resets all state.
// All constant values are this design's own choices.
module inhibitory_unit
  import snn_pkg::*;
#(
  parameter int N_IN       = N_IN_DEF,
  parameter int N_OUT      = N_OUT_DEF,
  parameter int W_E2I_IN   = 8,       // input exc -> input inh
  parameter int W_E2I_OUT  = 1024,    // output exc -> output inh
  parameter int W_I2E_OUT  = -2048,   // output inh -> output exc
  parameter int W_I2E_IN0  = -4,      // input inh k -> input exc: W_I2E_IN0*(k+1)
  parameter int V_TH       = 1024,
  parameter int V_REST     = 0,
  parameter int V_LEAK     = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             upd,
  input  logic             fire_chk,
  input  logic             clear,
  input  logic [N_IN-1:0]  s_in,       // firing flags of the input excitatory neurons
  input  logic [N_OUT-1:0] s_out,      // firing flags of the output excitatory neurons
  output logic [N_INH_IN-1:0] s_inh_in,
  output logic             s_inh_out,
  output vmem_t            inh_to_in,
  output vmem_t            inh_to_out
);
  vmem_t v_in [N_INH_IN];
  vmem_t v_out;

  logic [$clog2(N_IN+1)-1:0]  cnt_in;
  logic [$clog2(N_OUT+1)-1:0] cnt_out;
  always_comb begin
    cnt_in = '0;
    for (int n = 0; n < N_IN; n++) cnt_in = cnt_in + s_in[n];
    cnt_out = '0;
    for (int n = 0; n < N_OUT; n++) cnt_out = cnt_out + s_out[n];
  end

  logic signed [VW+3:0] sum_in [N_INH_IN];
  logic signed [VW+3:0] sum_out;
  logic signed [VW+3:0] drive_in, drive_out;
  always_comb begin
    drive_in  = (VW+4)'(W_E2I_IN)  * $signed({1'b0, cnt_in});
    drive_out = (VW+4)'(W_E2I_OUT) * $signed({1'b0, cnt_out});
    for (int k = 0; k < N_INH_IN; k++)
      sum_in[k] = (VW+4)'(v_in[k]) + drive_in - (VW+4)'(V_LEAK);
    sum_out = (VW+4)'(v_out) + drive_out - (VW+4)'(V_LEAK);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 0; k < N_INH_IN; k++) v_in[k] <= vmem_t'(V_REST);
      v_out     <= vmem_t'(V_REST);
      s_inh_in  <= '0;
      s_inh_out <= 1'b0;
    end else if (upd) begin
      for (int k = 0; k < N_INH_IN; k++) v_in[k] <= sat_v(sum_in[k]);
      v_out <= sat_v(sum_out);
    end else if (fire_chk) begin
      for (int k = 0; k < N_INH_IN; k++) begin
        s_inh_in[k] <= (v_in[k] >= vmem_t'(V_TH));
        if (v_in[k] >= vmem_t'(V_TH)) v_in[k] <= vmem_t'(V_REST);
      end
      s_inh_out <= (v_out >= vmem_t'(V_TH));
      if (v_out >= vmem_t'(V_TH)) v_out <= vmem_t'(V_REST);
    end
  end

  always_comb begin
    logic signed [VW+3:0] acc;
    acc = '0;
    for (int k = 0; k < N_INH_IN; k++)
      if (s_inh_in[k]) acc = acc + (VW+4)'(W_I2E_IN0 * (k + 1));
    inh_to_in  = sat_v(acc);
    inh_to_out = s_inh_out ? vmem_t'(W_I2E_OUT) : '0;
  end
endmodule
