// neuro_top: K-way Loop-I parallel spiking neural network processor with
// on-chip STDP learning.
//
// A two-layer network of leaky integrate-and-fire neurons (N_IN input
// neurons driven by external spikes, N_OUT output neurons fully connected to
// them through plastic 4-bit weights, plus inhibitory neurons with fixed
// weights for winner-take-all) is stepped in biological time under control
// of a host on a UART line. Each step's neuron operation stage updates K
// membrane potentials at once: K weight banks, one per LIF arithmetic unit,
// hold the weights of output neurons k, k+K, k+2K, ... so one address reads
// K weights in parallel. In training mode the STDP unit then updates the
// weights of the output neurons that fired, one synapse at a time, while the
// next step's spikes are already being received. The multipliers of the LIF
// units and the STDP unit are approximate Booth multipliers (APPROX=1) or
// exact ones (APPROX=0).
//
// Interface: clk, synchronous active-low rst_n, the UART pins (8N1,
// CLKS_PER_BIT clocks per bit) and a few status outputs. Host protocol: see
// sys_controller. After a step frame the processor answers with
// ceil(N_OUT/8) bytes of output spikes.
// The memories have no reset; their write enables are held off while rst_n
// is low, so the first reset edge (when the controllers' state registers are
// not yet defined) cannot corrupt a stored weight or trace.
// Defaults are the 784-800 network with K=32 (34 memories: 32 weight banks,
// A+ and A-); the neuron constants are this design's choices.
module neuro_top
  import snn_pkg::*;
#(
  parameter int N_IN         = N_IN_DEF,
  parameter int N_OUT        = N_OUT_DEF,
  parameter int K            = K_DEF,
  parameter bit APPROX       = 1'b1,
  parameter int CLKS_PER_BIT = 1042,
  parameter int V_TH         = 1024,
  parameter int V_REST       = 0,
  parameter int V_LEAK       = 16,
  parameter logic [15:0] K_SYN = 16'h4000,
  parameter int KEXT_MIN     = 256,
  parameter int A_PLUS_INIT  = 32,     // 2.0 weight steps (Q4.4)
  parameter int A_MINUS_INIT = -24     // -1.5 weight steps (Q4.4)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    uart_rxd,
  output logic    uart_txd,
  output tstamp_t t_global,
  output logic    nos_busy,
  output logic    los_busy,
  output logic [31:0] steps_done,
  output logic [31:0] syn_updates
);
  localparam int N     = N_IN + N_OUT;
  localparam int IDXW  = $clog2(N);
  localparam int BANKW = (K > 1) ? $clog2(K) : 1;
  localparam int G_OUT = (N_OUT + K - 1) / K;
  localparam int WDEP  = G_OUT * N_IN;
  localparam int WAW   = $clog2(WDEP);
  localparam int PDEP  = N_OUT * N_IN;
  localparam int PAW   = $clog2(PDEP);

  // ---------------- UART and spike I/O ----------------
  logic       rx_valid;
  logic [7:0] rx_data;
  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic       sb_tx_valid, dump_valid, dump_active;
  logic [7:0] sb_tx_byte, dump_byte;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rxd(uart_rxd), .valid(rx_valid), .data(rx_data));

  assign tx_valid = dump_active ? dump_valid : sb_tx_valid;
  assign tx_data  = dump_active ? dump_byte  : sb_tx_byte;

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd(uart_txd));

  logic            sb_in_wr, sb_in_full, sb_in_load, sb_out_cap, sb_out_busy;
  logic [N_IN-1:0] e_vec;
  logic [N-1:0]    s_vec;

  spike_io_buffer #(.N_IN(N_IN), .N_OUT(N_OUT)) u_sbuf (
    .clk, .rst_n,
    .in_wr(sb_in_wr), .in_byte(rx_data), .in_full(sb_in_full), .in_load(sb_in_load),
    .e_vec(e_vec),
    .out_cap(sb_out_cap), .s_out(s_vec[N-1:N_IN]), .out_busy(sb_out_busy),
    .tx_valid(sb_tx_valid), .tx_byte(sb_tx_byte), .tx_ready(tx_ready && !dump_active));

  // ---------------- controller ----------------
  logic [IDXW-1:0]  lane_idx [K];
  logic             lane_we  [K];
  lau_op_e          lau_op;
  logic             in_layer, rng_en, fire_chk, clear, inh_upd;
  logic [IDXW-1:0]  pre_idx;
  logic [WAW-1:0]   nos_addr, dump_addr;
  logic [BANKW-1:0] dump_bank;
  weight_t          los_rdata;
  logic             stdp_start, stdp_busy, stdp_done, train_mode;

  sys_controller #(.N_IN(N_IN), .N_OUT(N_OUT), .K(K), .IDXW(IDXW), .BANKW(BANKW), .WAW(WAW)) u_ctrl (
    .clk, .rst_n,
    .rx_valid, .rx_data,
    .dump_valid, .dump_byte, .tx_ready, .dump_active,
    .sb_in_wr, .sb_in_full, .sb_in_load, .sb_out_cap, .sb_out_busy,
    .lane_idx, .lane_we, .lau_op, .in_layer, .pre_idx, .rng_en, .fire_chk, .clear,
    .t_global, .inh_upd, .nos_addr, .dump_bank, .dump_addr, .dump_rdata(los_rdata),
    .stdp_start, .stdp_busy, .train_mode, .nos_busy, .steps_done);

  // ---------------- neuron unit ----------------
  vmem_t           lane_v_rd [K];
  vmem_t           lane_v_wr [K];
  logic [IDXW-1:0] tf_idx;
  tstamp_t         tf_rd;

  neuron_unit #(.N(N), .K(K), .IDXW(IDXW), .V_TH(V_TH), .V_REST(V_REST)) u_nu (
    .clk, .rst_n, .lane_idx, .lane_v_rd, .lane_we, .lane_v_wr,
    .s_vec, .tf_idx, .tf_rd, .fire_chk, .clear, .t_global);

  // ---------------- inhibitory neurons ----------------
  logic [N_INH_IN-1:0] s_inh_in;
  logic                s_inh_out;
  vmem_t               inh_to_in, inh_to_out;

  inhibitory_unit #(.N_IN(N_IN), .N_OUT(N_OUT), .V_TH(V_TH), .V_REST(V_REST), .V_LEAK(V_LEAK)) u_inh (
    .clk, .rst_n, .upd(inh_upd), .fire_chk, .clear,
    .s_in(s_vec[N_IN-1:0]), .s_out(s_vec[N-1:N_IN]),
    .s_inh_in, .s_inh_out, .inh_to_in, .inh_to_out);

  // ---------------- weight banks and synapse R/W interface ----------------
  weight_t          nos_rdata  [K];
  logic [WAW-1:0]   bank_addr  [K];
  logic             bank_we    [K];
  weight_t          bank_wdata;
  weight_t          bank_rdata [K];
  logic [BANKW-1:0] stdp_bank;
  logic [WAW-1:0]   stdp_waddr;
  logic             stdp_wwe;
  weight_t          stdp_wdata;

  synapse_rw_if #(.K(K), .WAW(WAW), .BANKW(BANKW)) u_srw (
    .clk, .los_sel(stdp_busy || dump_active),
    .nos_addr, .nos_rdata,
    .los_bank(dump_active ? dump_bank : stdp_bank),
    .los_addr(dump_active ? dump_addr : stdp_waddr),
    .los_we(stdp_wwe && !dump_active && rst_n), .los_wdata(stdp_wdata), .los_rdata,
    .bank_addr, .bank_we, .bank_wdata, .bank_rdata);

  for (genvar k = 0; k < K; k++) begin : g_bank
    sp_bram #(.DEPTH(WDEP), .WIDTH(WW), .AWID(WAW), .INIT(32'd4), .INIT_RANDOM(1'b1),
              .INIT_MASK(32'h7), .SALT(32'h1000 * (k + 1))) u_wbank (
      .clk, .addr(bank_addr[k]), .we(bank_we[k]), .wdata(bank_wdata), .rdata(bank_rdata[k]));
  end

  // ---------------- LIF arithmetic units ----------------
  for (genvar k = 0; k < K; k++) begin : g_lane
    logic [15:0] rnd;
    logic [15:0] acc;      // weighted spike sum, observable for debug
    logic        e_bit;
    assign e_bit = in_layer && (int'(lane_idx[k]) < N_IN) && e_vec[lane_idx[k][$clog2(N_IN)-1:0]];

    lfsr_rng #(.SEED(16'hACE1 ^ 16'(k * 16'h3B5))) u_rng (
      .clk, .rst_n, .en(rng_en), .rnd(rnd));

    lau #(.APPROX(APPROX), .K_SYN(K_SYN), .KEXT_MIN(KEXT_MIN), .V_LEAK(V_LEAK)) u_lau (
      .clk, .rst_n, .op(lau_op), .w_in(nos_rdata[k]), .s_in(s_vec[pre_idx]),
      .e_in(e_bit), .rnd(rnd), .inh_in(in_layer ? inh_to_in : inh_to_out),
      .v_in(lane_v_rd[k]), .v_new(lane_v_wr[k]), .acc(acc));
  end

  // ---------------- STDP unit and its parameter memories ----------------
  logic [PAW-1:0] p_addr;
  logic           p_we;
  apar_t          ap_wdata, ap_rdata, am_wdata, am_rdata;

  sp_bram #(.DEPTH(PDEP), .WIDTH(AW), .AWID(PAW), .INIT(32'(A_PLUS_INIT))) u_aplus (
    .clk, .addr(p_addr), .we(p_we && rst_n), .wdata(ap_wdata), .rdata(ap_rdata));
  sp_bram #(.DEPTH(PDEP), .WIDTH(AW), .AWID(PAW), .INIT(32'(A_MINUS_INIT))) u_aminus (
    .clk, .addr(p_addr), .we(p_we && rst_n), .wdata(am_wdata), .rdata(am_rdata));

  stdp_unit #(.N_IN(N_IN), .N_OUT(N_OUT), .K(K), .APPROX(APPROX), .IDXW(IDXW),
              .BANKW(BANKW), .WAW(WAW), .PAW(PAW)) u_stdp (
    .clk, .rst_n, .start(stdp_start), .busy(stdp_busy), .done(stdp_done),
    .t_global, .s_out(s_vec[N-1:N_IN]), .tf_idx, .tf_rd,
    .w_bank(stdp_bank), .w_addr(stdp_waddr), .w_we(stdp_wwe), .w_wdata(stdp_wdata),
    .w_rdata(los_rdata), .p_addr, .p_we, .ap_wdata, .ap_rdata, .am_wdata, .am_rdata,
    .syn_updates);

  assign los_busy = stdp_busy;

  logic unused;
  assign unused = ^{stdp_done, train_mode, s_inh_in, s_inh_out};
endmodule
