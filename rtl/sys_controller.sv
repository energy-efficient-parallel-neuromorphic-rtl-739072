// sys_controller: system controller and global timer of the processor.
//
// It runs every biological time step as three stages: spike I/O, the neuron
// operation stage (NOS) and, in training mode, the learning operation stage
// (LOS). Frames from the host start with a command byte (snn_pkg CMD_*):
//   CMD_TRAIN / CMD_RECOG, then IN_BYTES bytes of input spikes: one step.
//   CMD_DUMP : stream all plastic weights back, two 4-bit weights per byte
//              (lower index in the low nibble), output neuron by output
//              neuron, input neuron order inside each.
//   CMD_CLEAR: start a new pattern (reset membrane state and the timer).
// The frame format is this design's own.
//
// One step: the input spikes are stored in the spike buffer; once they are
// complete and the previous step's LOS has finished, the timer T_global
// increments and the NOS runs with the K LIF arithmetic units in lock step:
//   input layer : ceil(N_IN/K) cycles, lane k updates neuron g*K+k from its
//                 external spike and the inhibitory input (no plastic synapse)
//   output layer: ceil(N_OUT/K) groups of N_IN+2 cycles; all K weight banks
//                 are read at address g*N_IN+j (cycle j), the weights are
//                 accumulated one cycle later against S(j), and the last
//                 cycle writes the K new potentials of neurons N_IN+g*K+k
//   inhibitory  : 1 cycle, then 1 cycle fire check of all neurons
// Then the output spikes are handed to the spike buffer for sending and, in
// training mode, the STDP unit is started. The controller immediately
// accepts the next frame, so the spike I/O of the next step overlaps the LOS
// of this one, as the two share no data.
module sys_controller
  import snn_pkg::*;
#(
  parameter int N_IN    = N_IN_DEF,
  parameter int N_OUT   = N_OUT_DEF,
  parameter int K       = K_DEF,
  parameter int IDXW    = $clog2(N_IN + N_OUT),
  parameter int BANKW   = (K > 1) ? $clog2(K) : 1,
  parameter int WAW     = $clog2(((N_OUT + K - 1) / K) * N_IN),
  parameter int T_START = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  // host byte stream
  input  logic            rx_valid,
  input  logic [7:0]      rx_data,
  output logic            dump_valid,
  output logic [7:0]      dump_byte,
  input  logic            tx_ready,
  output logic            dump_active,
  // spike I/O buffer
  output logic            sb_in_wr,
  input  logic            sb_in_full,
  output logic            sb_in_load,
  output logic            sb_out_cap,
  input  logic            sb_out_busy,
  // neuron unit and LIF arithmetic units
  output logic [IDXW-1:0] lane_idx [K],
  output logic            lane_we  [K],
  output lau_op_e         lau_op,
  output logic            in_layer,     // lanes work on the input layer
  output logic [IDXW-1:0] pre_idx,      // presynaptic neuron of the LAU_ACC cycle
  output logic            rng_en,
  output logic            fire_chk,
  output logic            clear,
  output tstamp_t         t_global,
  // inhibitory neurons
  output logic            inh_upd,
  // weight memory, neuron operation side
  output logic [WAW-1:0]  nos_addr,
  // weight memory, dump side
  output logic [BANKW-1:0] dump_bank,
  output logic [WAW-1:0]  dump_addr,
  input  weight_t         dump_rdata,
  // learning operation stage
  output logic            stdp_start,
  input  logic            stdp_busy,
  output logic            train_mode,
  // status
  output logic            nos_busy,
  output logic [31:0]     steps_done
);
  localparam int G_IN  = (N_IN + K - 1) / K;
  localparam int G_OUT = (N_OUT + K - 1) / K;

  typedef enum logic [3:0] {
    C_IDLE, C_RXSP, C_WAIT_LOS, C_NOS_IN, C_NOS_OUT, C_NOS_INH, C_FIRE, C_OUT,
    C_CLEAR, C_DUMP_WAIT, C_DUMP_RD0, C_DUMP_RD1, C_DUMP_CAP, C_DUMP_TX
  } cstate_e;
  cstate_e state;

  logic [$clog2(G_IN + G_OUT + 1)-1:0] g;
  logic [$clog2(N_IN + 3)-1:0]          c;
  logic [$clog2(N_OUT + 1)-1:0]         di;   // dump: output neuron
  logic [$clog2(N_IN + 2)-1:0]          dj;   // dump: input neuron (even)
  logic [3:0]                           lo_nib;

  // ---- combinational control outputs ----
  always_comb begin
    for (int k = 0; k < K; k++) begin
      if (state == C_NOS_IN) begin
        lane_idx[k] = IDXW'(int'(g) * K + k);
        lane_we[k]  = (int'(g) * K + k) < N_IN;
      end else begin
        lane_idx[k] = IDXW'(N_IN + int'(g) * K + k);
        lane_we[k]  = (state == C_NOS_OUT) && (int'(c) == N_IN + 1) && ((int'(g) * K + k) < N_OUT);
      end
    end
    in_layer = (state == C_NOS_IN);
    if (state == C_NOS_IN)                               lau_op = LAU_UPDATE;
    else if (state == C_NOS_OUT && int'(c) == N_IN + 1)  lau_op = LAU_UPDATE;
    else if (state == C_NOS_OUT && int'(c) >= 1)         lau_op = LAU_ACC;
    else                                                 lau_op = LAU_NOP;
    pre_idx  = (int'(c) >= 1) ? IDXW'(int'(c) - 1) : '0;
    rng_en   = (lau_op == LAU_UPDATE);
    nos_addr = WAW'(int'(g) * N_IN + ((int'(c) < N_IN) ? int'(c) : 0));
    fire_chk = (state == C_FIRE);
    inh_upd  = (state == C_NOS_INH);
    clear    = (state == C_CLEAR) && !stdp_busy;
    sb_in_wr   = (state == C_RXSP) && rx_valid;
    sb_in_load = (state == C_WAIT_LOS) && !stdp_busy;
    sb_out_cap = (state == C_OUT) && !sb_out_busy;
    stdp_start = sb_out_cap && train_mode;
    nos_busy   = (state == C_WAIT_LOS && !stdp_busy) || state == C_NOS_IN || state == C_NOS_OUT
              || state == C_NOS_INH || state == C_FIRE;
    dump_active = (state == C_DUMP_RD0) || (state == C_DUMP_RD1) || (state == C_DUMP_CAP)
               || (state == C_DUMP_TX);
    dump_bank  = BANKW'(int'(di) % K);
    dump_addr  = WAW'((int'(di) / K) * N_IN + int'(dj) + ((state == C_DUMP_RD1) ? 1 : 0));
    dump_valid = (state == C_DUMP_TX);
  end

  // ---- sequencing ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= C_IDLE;
      g          <= '0;
      c          <= '0;
      di         <= '0;
      dj         <= '0;
      lo_nib     <= '0;
      dump_byte  <= '0;
      train_mode <= 1'b0;
      t_global   <= tstamp_t'(T_START);
      steps_done <= '0;
    end else begin
      unique case (state)
        C_IDLE: if (rx_valid) begin
          unique case (rx_data)
            CMD_TRAIN: begin train_mode <= 1'b1; state <= C_RXSP; end
            CMD_RECOG: begin train_mode <= 1'b0; state <= C_RXSP; end
            CMD_DUMP:  state <= C_DUMP_WAIT;
            CMD_CLEAR: state <= C_CLEAR;
            default:   state <= C_IDLE;          // unknown command ignored
          endcase
        end
        C_RXSP: if (sb_in_full) state <= C_WAIT_LOS;
        C_WAIT_LOS: if (!stdp_busy) begin
          t_global <= t_global + 1'b1;
          g        <= '0;
          state    <= C_NOS_IN;
        end
        C_NOS_IN: begin
          if (int'(g) == G_IN - 1) begin
            g     <= '0;
            c     <= '0;
            state <= C_NOS_OUT;
          end else g <= g + 1'b1;
        end
        C_NOS_OUT: begin
          if (int'(c) == N_IN + 1) begin
            c <= '0;
            if (int'(g) == G_OUT - 1) begin
              g     <= '0;
              state <= C_NOS_INH;
            end else g <= g + 1'b1;
          end else c <= c + 1'b1;
        end
        C_NOS_INH: state <= C_FIRE;
        C_FIRE:    state <= C_OUT;
        C_OUT: if (!sb_out_busy) begin
          steps_done <= steps_done + 1;
          state      <= C_IDLE;
        end
        C_CLEAR: if (!stdp_busy) begin
          t_global <= tstamp_t'(T_START);
          state    <= C_IDLE;
        end
        C_DUMP_WAIT: if (!stdp_busy && !sb_out_busy) begin
          di    <= '0;
          dj    <= '0;
          state <= C_DUMP_RD0;
        end
        C_DUMP_RD0: state <= C_DUMP_RD1;          // read W(di, dj)
        C_DUMP_RD1: begin                          // read W(di, dj+1)
          lo_nib <= dump_rdata;
          state  <= C_DUMP_CAP;
        end
        C_DUMP_CAP: begin
          dump_byte <= {(int'(dj) + 1 < N_IN) ? dump_rdata : 4'h0, lo_nib};
          state     <= C_DUMP_TX;
        end
        C_DUMP_TX: if (tx_ready) begin
          if (int'(dj) + 2 >= N_IN) begin
            dj <= '0;
            if (int'(di) == N_OUT - 1) state <= C_IDLE;
            else begin
              di    <= di + 1'b1;
              state <= C_DUMP_RD0;
            end
          end else begin
            dj    <= dj + ($bits(dj))'(2);
            state <= C_DUMP_RD0;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  // a step's NOS never starts while the previous LOS still uses the memories
  a_nos_after_los: assert property (@(posedge clk) disable iff (!rst_n)
    (state == C_NOS_IN) |-> !stdp_busy);
endmodule
