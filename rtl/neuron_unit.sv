// neuron_unit: register files of all excitatory neurons and the fire check.
//
// Holds, for each of N neurons (input layer first, then output layer), the
// membrane potential Vmem (16-bit signed), the last firing time Tfire
// (16-bit) and the firing flag S. K independent lane ports let K LIF
// arithmetic units read (combinationally) and write (at the clock edge) K
// different membrane potentials in the same cycle, which is what the K-way
// Loop-I parallel architecture adds to the serial neuron unit. The whole
// S vector is visible at once, and one Tfire read port serves the STDP unit.
//
// fire_chk (one cycle): every neuron with Vmem >= V_TH sets S, takes Tfire =
// t_global and is reset to V_REST; every other neuron clears S. All N
// comparisons happen in parallel. clear (new input pattern) resets every
// Vmem to V_REST and every S and Tfire to 0. Reset does the same.
// Lane writes and fire_chk are never issued in the same cycle by the
// controller; if they were, fire_chk wins.
module neuron_unit
  import snn_pkg::*;
#(
  parameter int N     = N_IN_DEF + N_OUT_DEF,
  parameter int K     = K_DEF,
  parameter int IDXW  = $clog2(N),
  parameter int V_TH  = 1024,
  parameter int V_REST = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // K lane ports
  input  logic [IDXW-1:0] lane_idx [K],
  output vmem_t           lane_v_rd [K],
  input  logic            lane_we  [K],
  input  vmem_t           lane_v_wr [K],
  // firing flags and times
  output logic [N-1:0]    s_vec,
  input  logic [IDXW-1:0] tf_idx,
  output tstamp_t         tf_rd,
  // control
  input  logic            fire_chk,
  input  logic            clear,
  input  tstamp_t         t_global
);
  vmem_t   vmem  [N];
  tstamp_t tfire [N];

  always_comb begin
    for (int k = 0; k < K; k++)
      lane_v_rd[k] = (int'(lane_idx[k]) < N) ? vmem[lane_idx[k]] : vmem_t'(V_REST);
    tf_rd = (int'(tf_idx) < N) ? tfire[tf_idx] : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int n = 0; n < N; n++) begin
        vmem[n]  <= vmem_t'(V_REST);
        tfire[n] <= '0;
        s_vec[n] <= 1'b0;
      end
    end else if (fire_chk) begin
      for (int n = 0; n < N; n++) begin
        if (vmem[n] >= vmem_t'(V_TH)) begin
          s_vec[n] <= 1'b1;
          tfire[n] <= t_global;
          vmem[n]  <= vmem_t'(V_REST);
        end else begin
          s_vec[n] <= 1'b0;
        end
      end
    end else begin
      for (int k = 0; k < K; k++)
        if (lane_we[k] && int'(lane_idx[k]) < N) vmem[lane_idx[k]] <= lane_v_wr[k];
    end
  end
endmodule
