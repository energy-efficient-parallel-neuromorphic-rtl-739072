// stdp_unit: learning operation stage (LOS) of the processor.
//
// On start it scans the N_OUT excitatory output neurons in order. A neuron
// whose firing flag is clear is skipped in one cycle. For a neuron i that
// fired in the current step, every plastic synapse from input neuron j is
// updated by the STDP rule
//     dT  = t_global - Tfire(j)
//     A+  = A+ * exp(-dT/tau1) + OFFSET1
//     A-  = A- * exp(-dT/tau2) + OFFSET2
//     dW  = A+ + A- + OFFSET3
//     W   = W + dW
// with the exponentials from two pre-computed lookup tables and the two
// products from the Booth multipliers (APPROX selects the approximate one).
// The update is sequential: two cycles per synapse on the single-port
// memories (read, then compute and write back). done pulses for one cycle
// at the end; busy is high from start until then.
//
// Number formats (this design's choice): A+ and A- are signed 8-bit in
// units of 1/16 weight step (Q4.4) and saturate; W is an unsigned 4-bit
// weight that saturates at 0 and 15; W + dW is rounded to the nearest step.
// Memory map (Loop-I organisation): the weights of output neuron i are all in
// bank i mod K at addresses (i div K)*N_IN + j; A+ and A- are single
// memories at address i*N_IN + j.
module stdp_unit
  import snn_pkg::*;
#(
  parameter int N_IN   = N_IN_DEF,
  parameter int N_OUT  = N_OUT_DEF,
  parameter int K      = K_DEF,
  parameter bit APPROX = 1'b1,
  parameter int IDXW   = $clog2(N_IN + N_OUT),
  parameter int BANKW  = (K > 1) ? $clog2(K) : 1,
  parameter int WAW    = $clog2(((N_OUT + K - 1) / K) * N_IN),
  parameter int PAW    = $clog2(N_OUT * N_IN),
  parameter int OFFSET1 = 4,
  parameter int OFFSET2 = -3,
  parameter int OFFSET3 = -2,
  parameter logic [23:0] R1 = 24'd15_760_736,   // exp(-1/16)
  parameter logic [23:0] R2 = 24'd16_261_035,   // exp(-1/32)
  parameter int LUT_DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             busy,
  output logic             done,
  input  tstamp_t          t_global,
  input  logic [N_OUT-1:0] s_out,      // firing flags of the output neurons
  // Tfire read port of the neuron unit (input neuron j)
  output logic [IDXW-1:0]  tf_idx,
  input  tstamp_t          tf_rd,
  // weight memory port (through the synapse read/write interface)
  output logic [BANKW-1:0] w_bank,
  output logic [WAW-1:0]   w_addr,
  output logic             w_we,
  output weight_t          w_wdata,
  input  weight_t          w_rdata,
  // A+ and A- memories (shared address)
  output logic [PAW-1:0]   p_addr,
  output logic             p_we,
  output apar_t            ap_wdata,
  input  apar_t            ap_rdata,
  output apar_t            am_wdata,
  input  apar_t            am_rdata,
  // statistics
  output logic [31:0]      syn_updates
);
  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_READ, S_WRITE} state_e;
  state_e state;

  logic [$clog2(N_OUT+1)-1:0] i_cnt;
  logic [$clog2(N_IN+1)-1:0]  j_cnt;

  // address generation
  assign w_bank = BANKW'(int'(i_cnt) % K);
  assign w_addr = WAW'((int'(i_cnt) / K) * N_IN + int'(j_cnt));
  assign p_addr = PAW'(int'(i_cnt) * N_IN + int'(j_cnt));
  assign tf_idx = IDXW'(j_cnt);

  // arithmetic of one synapse (valid in S_WRITE, memory data present)
  tstamp_t dt;
  logic [15:0] e1, e2;
  logic signed [15:0] pa, pm;
  assign dt = t_global - tf_rd;

  exp_lut #(.DEPTH(LUT_DEPTH), .R(R1), .DTW(TW)) u_lut1 (.dt(dt), .e(e1));
  exp_lut #(.DEPTH(LUT_DEPTH), .R(R2), .DTW(TW)) u_lut2 (.dt(dt), .e(e2));

  snn_mult #(.APPROX(APPROX)) u_mul_p (.a({ap_rdata, 8'h00}), .b($signed(e1)), .p(pa));
  snn_mult #(.APPROX(APPROX)) u_mul_m (.a({am_rdata, 8'h00}), .b($signed(e2)), .p(pm));

  function automatic apar_t sat_a(input logic signed [17:0] x);
    if (x > 18'sd127)       return apar_t'(127);
    else if (x < -18'sd128) return apar_t'(-128);
    else                    return x[AW-1:0];
  endfunction

  apar_t ap_new, am_new;
  logic signed [17:0] dw, wsum;
  always_comb begin
    ap_new  = sat_a(18'(pa) + 18'(OFFSET1));
    am_new  = sat_a(18'(pm) + 18'(OFFSET2));
    dw      = 18'(ap_new) + 18'(am_new) + 18'(OFFSET3);      // Q4.4
    wsum    = (18'($signed({1'b0, w_rdata})) <<< 4) + dw + 18'sd8;
    wsum    = wsum >>> 4;                                     // round to a step
    if (wsum < 0)                   w_wdata = '0;
    else if (wsum > 18'sd15)        w_wdata = 4'd15;
    else                            w_wdata = wsum[WW-1:0];
    ap_wdata = ap_new;
    am_wdata = am_new;
  end

  assign w_we = (state == S_WRITE);
  assign p_we = (state == S_WRITE);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      i_cnt <= '0;
      j_cnt <= '0;
      done  <= 1'b0;
      syn_updates <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SCAN;
          i_cnt <= '0;
          j_cnt <= '0;
        end
        S_SCAN: begin
          if (int'(i_cnt) >= N_OUT) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else if (s_out[i_cnt]) begin
            state <= S_READ;
            j_cnt <= '0;
          end else begin
            i_cnt <= i_cnt + 1'b1;
          end
        end
        S_READ: state <= S_WRITE;
        S_WRITE: begin
          syn_updates <= syn_updates + 1;
          if (int'(j_cnt) == N_IN - 1) begin
            state <= S_SCAN;
            i_cnt <= i_cnt + 1'b1;
            j_cnt <= '0;
          end else begin
            state <= S_READ;
            j_cnt <= j_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // the memories must not be written outside a synapse update
  a_we_only_in_write: assert property (@(posedge clk) disable iff (!rst_n) w_we |-> busy);
endmodule
