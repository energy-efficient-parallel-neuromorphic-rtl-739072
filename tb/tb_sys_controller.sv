// tb_sys_controller: the controller alone (10 input, 7 output neurons, K=3)
// driven with command bytes. For training and recognition steps it checks
// that every neuron is written exactly once per step by the right lane and
// operation, that each output neuron's update follows exactly N_IN
// accumulate cycles over presynaptic indices 0..N_IN-1 with the matching
// weight addresses, the length of the neuron operation stage
// (ceil(N_IN/K) + ceil(N_OUT/K)*(N_IN+2) + 2 cycles, plus the cycle that
// loads the input spikes), the timer, that the
// learning stage starts only in training mode and that the next step waits
// for it. Then a weight dump is compared byte by byte with a weight model,
// and clear resets the timer.
module tb_sys_controller;
  import snn_pkg::*;
  localparam int NI = 10, NO = 7, K = 3, IDXW = 5, BANKW = 2;
  localparam int GI = (NI + K - 1) / K, GO = (NO + K - 1) / K;
  localparam int WAW = $clog2(GO * NI);
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, tx_ready = 1, dump_valid, dump_active;
  logic [7:0] rx_data = 0, dump_byte;
  logic sb_in_wr, sb_in_full, sb_in_load, sb_out_cap, sb_out_busy;
  logic [IDXW-1:0] lane_idx [K], pre_idx;
  logic lane_we [K];
  lau_op_e lau_op;
  logic in_layer, rng_en, fire_chk, clear, inh_upd, stdp_start, stdp_busy, train_mode, nos_busy;
  tstamp_t t_global;
  logic [WAW-1:0] nos_addr, dump_addr;
  logic [BANKW-1:0] dump_bank;
  weight_t dump_rdata;
  logic [31:0] steps_done;
  int checks = 0, failures = 0;
  int nbytes_in = 0, stdp_left = 0, starts = 0;
  int wmodel [K][GO * NI];

  sys_controller #(.N_IN(NI), .N_OUT(NO), .K(K), .IDXW(IDXW), .BANKW(BANKW), .WAW(WAW)) dut (
    .clk, .rst_n, .rx_valid, .rx_data, .dump_valid, .dump_byte, .tx_ready, .dump_active,
    .sb_in_wr, .sb_in_full, .sb_in_load, .sb_out_cap, .sb_out_busy,
    .lane_idx, .lane_we, .lau_op, .in_layer, .pre_idx, .rng_en, .fire_chk, .clear, .t_global,
    .inh_upd, .nos_addr, .dump_bank, .dump_addr, .dump_rdata, .stdp_start, .stdp_busy,
    .train_mode, .nos_busy, .steps_done);
  always #5 clk = ~clk;

  // simple models of the spike buffer, the STDP unit and the weight banks
  assign sb_in_full = (nbytes_in == (NI + 7) / 8);
  assign sb_out_busy = 1'b0;
  assign stdp_busy = (stdp_left != 0);
  always @(posedge clk) begin
    if (sb_in_load) nbytes_in <= 0; else if (sb_in_wr) nbytes_in <= nbytes_in + 1;
    if (stdp_start) begin stdp_left <= 25; starts++; end
    else if (stdp_left != 0) stdp_left <= stdp_left - 1;
    dump_rdata <= weight_t'(wmodel[dump_bank][dump_addr]);
  end

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  task automatic send(byte b);
    @(negedge clk); rx_valid = 1; rx_data = b;
    @(negedge clk); rx_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  // monitor of one neuron operation stage
  int writes [NI + NO];
  int acc_run [K];
  int nos_cycles;
  always @(posedge clk) if (rst_n) begin
    if (nos_busy) nos_cycles++;
    if (lau_op == LAU_ACC) begin
      for (int k = 0; k < K; k++) begin
        if (int'(pre_idx) != acc_run[k]) begin
          failures++; $display("FAIL acc order lane %0d pre %0d exp %0d", k, pre_idx, acc_run[k]);
        end
        acc_run[k]++;
      end
    end
    for (int k = 0; k < K; k++) if (lane_we[k]) begin
      writes[lane_idx[k]]++;
      checks++;
      if (lau_op != LAU_UPDATE || k != ((int'(lane_idx[k]) >= NI) ? (int'(lane_idx[k]) - NI) % K : int'(lane_idx[k]) % K)
          || (int'(lane_idx[k]) >= NI && acc_run[k] != NI)) begin
        failures++; $display("FAIL write of neuron %0d lane %0d acc %0d", lane_idx[k], k, acc_run[k]);
      end
    end
    if (lau_op == LAU_UPDATE) for (int k = 0; k < K; k++) acc_run[k] = 0;
  end
  // nos_addr must follow the presynaptic index one cycle ahead
  logic [WAW-1:0] addr_q;
  always @(posedge clk) begin
    addr_q <= nos_addr;
    if (lau_op == LAU_ACC) begin
      checks++;
      if (int'(addr_q) % NI != int'(pre_idx)) begin
        failures++; $display("FAIL addr %0d for pre %0d", addr_q, pre_idx);
      end
    end
  end

  initial begin
    int t_before, st_before;
    foreach (acc_run[k]) acc_run[k] = 0;
    for (int k = 0; k < K; k++) for (int a = 0; a < GO * NI; a++) wmodel[k][a] = $urandom_range(15);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      bit tr;
      tr = (s != 2);
      foreach (writes[n]) writes[n] = 0;
      nos_cycles = 0;
      t_before = int'(t_global);
      st_before = starts;
      send(tr ? CMD_TRAIN : CMD_RECOG);
      send(8'($urandom)); send(8'($urandom));
      wait (steps_done == 32'(s + 1));
      @(negedge clk);
      foreach (writes[n]) chk(writes[n], 1, "writes per neuron");
      chk(nos_cycles, GI + GO * (NI + 2) + 3, "NOS cycles (incl. load cycle)");
      chk(int'(t_global), t_before + 1, "timer");
      chk(starts - st_before, int'(tr), "LOS start");
    end
    // dump
    fork
      send(CMD_DUMP);
      begin
        for (int i = 0; i < NO; i++)
          for (int j = 0; j < NI; j += 2) begin
            int lo, hi;
            do @(posedge clk); while (!(dump_valid && tx_ready));
            lo = wmodel[i % K][(i / K) * NI + j];
            hi = (j + 1 < NI) ? wmodel[i % K][(i / K) * NI + j + 1] : 0;
            chk(int'(dump_byte), hi * 16 + lo, "dump byte");
          end
      end
    join
    send(CMD_CLEAR);
    repeat (40) @(negedge clk);
    chk(int'(t_global), 256, "clear timer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
