// tb_neuro_top: end-to-end test of the processor through its UART pins, on a
// reduced network (16 input, 8 output neurons, K=4, 4 clocks per bit, lower
// threshold so that neurons fire within a few steps).
//
// A host model sends step frames with random input spike patterns, mixes
// training and recognition steps, clears between two patterns and asks for
// weight dumps. Every output-spike byte and every dumped weight is compared
// with a software model of the whole network (snn_ref_pkg::snn_model) that
// uses the same approximate multiplier. The next frame is sent as soon as
// the processor starts answering, so its reception overlaps the learning
// stage. The test counts each mechanism of the design and fails if one never
// happened: input/output/inhibitory firing, training and recognition steps,
// STDP updates, neurons skipped by the learning scan, spike I/O during the
// learning stage, weight saturation, clear and the weight dump.
module tb_neuro_top;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int NI = 16, NO = 8, K = 4, CPB = 4, VTH = 64, KMIN = 32, LEAK = 2;
  localparam logic [15:0] KSYN = 16'h7000;
  localparam int IB = (NI + 7) / 8, OB = (NO + 7) / 8;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  tstamp_t t_global;
  logic nos_busy, los_busy;
  logic [31:0] steps_done, syn_updates;
  int checks = 0, failures = 0;
  snn_model m;
  byte exp_q[$];
  int  n_started = 0;      // answer bytes whose start bit has been seen
  int  n_expected = 0;     // answer bytes of all steps sent so far
  byte dump_q[$];
  bit  dumping = 0;

  neuro_top #(.N_IN(NI), .N_OUT(NO), .K(K), .CLKS_PER_BIT(CPB), .V_TH(VTH), .K_SYN(KSYN),
              .KEXT_MIN(KMIN), .V_LEAK(LEAK), .A_PLUS_INIT(100), .A_MINUS_INIT(-40)) dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .t_global, .nos_busy, .los_busy,
    .steps_done, .syn_updates);
  always #5 clk = ~clk;

  // ---- mechanism counters ----
  int n_overlap = 0, n_skip = 0, n_wait_los = 0;
  always @(posedge clk) begin
    if (dut.rx_valid && los_busy) n_overlap++;
    if (los_busy && int'(dut.u_stdp.state) == 1 && int'(dut.u_stdp.i_cnt) < NO
        && !dut.s_vec[NI + int'(dut.u_stdp.i_cnt)]) n_skip++;
    if (int'(dut.u_ctrl.state) == 2 && los_busy) n_wait_los++;
  end

  // ---- host UART receiver ----
  initial begin
    forever begin
      byte b;
      @(negedge txd);
      n_started++;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
      repeat (CPB) @(posedge clk);
      if (dumping) dump_q.push_back(b);
      else begin
        checks++;
        if (exp_q.size() == 0 || exp_q[0] != b) begin
          failures++;
          if (failures < 10) $display("FAIL output spikes byte %h exp %h at t=%0d", b,
                                      (exp_q.size() != 0) ? exp_q[0] : 8'hxx, t_global);
        end
        if (exp_q.size() != 0) void'(exp_q.pop_front());
      end
    end
  end

  task automatic send_byte(byte b);
    rxd = 0; repeat (CPB) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (CPB) @(posedge clk); end
    rxd = 1; repeat (CPB) @(posedge clk);
  endtask

  task automatic step(bit train, bit e[]);
    byte ob;
    logic [IB*8-1:0] ev;
    ev = '0;
    for (int n = 0; n < NI; n++) ev[n] = e[n];
    m.step(e, train);
    for (int b = 0; b < OB; b++) begin
      ob = 0;
      for (int q = 0; q < 8; q++) if (b * 8 + q < NO) ob[q] = m.s[NI + b * 8 + q];
      exp_q.push_back(ob);
    end
    send_byte(train ? CMD_TRAIN : CMD_RECOG);
    for (int b = 0; b < IB; b++) send_byte(ev[8*b +: 8]);
    wait (n_started > n_expected);       // this step's answer has started
    n_expected += OB;                      // answer starts: the next frame may follow
  endtask

  task automatic check_dump();
    wait (exp_q.size() == 0);
    repeat (20 * CPB) @(posedge clk);
    dumping = 1;
    send_byte(CMD_DUMP);
    wait (dump_q.size() == NO * NI / 2);
    n_expected += NO * NI / 2;
    repeat (12 * CPB) @(posedge clk);
    dumping = 0;
    for (int i = 0; i < NO; i++)
      for (int j = 0; j < NI; j += 2) begin
        byte b;
        b = dump_q.pop_front();
        checks++;
        if (int'(b[3:0]) != m.w[i*NI + j] || int'(b[7:4]) != m.w[i*NI + j + 1]) begin
          failures++;
          if (failures < 10) $display("FAIL dump W(%0d,%0d)=%0d,%0d exp %0d,%0d", j, i, b[3:0], b[7:4],
                                      m.w[i*NI + j], m.w[i*NI + j + 1]);
        end
      end
  endtask

  initial begin
    bit e[];
    int n_train = 0, n_recog = 0, n_clear = 0, n_dump = 0;
    m = new(NI, NO, K, 1'b1, VTH, 0, LEAK, int'(KSYN), KMIN, 100, -40);
    e = new[NI];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check_dump(); n_dump++;                       // initial weights
    for (int pat = 0; pat < 3; pat++) begin
      int dens;
      dens = 2 + pat;
      for (int s = 0; s < 14; s++) begin
        bit tr;
        for (int n = 0; n < NI; n++) e[n] = ($urandom_range(dens) != 0) && (((n + pat) % 3) != 0);
        tr = (pat != 2) || (s < 7);
        step(tr, e);
        if (tr) n_train++; else n_recog++;
      end
      check_dump(); n_dump++;
      checks++;
      if (int'(syn_updates) != m.syn_updates) begin
        failures++; $display("FAIL syn_updates %0d exp %0d", syn_updates, m.syn_updates);
      end
      m.clear();
      send_byte(CMD_CLEAR); n_clear++;
      repeat (4 * CPB) @(posedge clk);
    end
    $display("steps: train %0d recog %0d; firings: in %0d out %0d inh_in %0d inh_out %0d",
             n_train, n_recog, m.fired_in, m.fired_out, m.fired_inh_in, m.fired_inh_out);
    $display("stdp synapse updates %0d, scan skips %0d, weight saturations %0d",
             m.syn_updates, n_skip, m.w_sat);
    $display("bytes received during learning %0d, steps waiting for learning %0d cycles, clears %0d, dumps %0d",
             n_overlap, n_wait_los, n_clear, n_dump);
    begin
      int mech[11];
      mech = '{n_train, n_recog, m.fired_in, m.fired_out, m.fired_inh_in, m.fired_inh_out,
                       m.syn_updates, n_skip, n_overlap, n_clear, m.w_sat};
      foreach (mech[i]) begin
        checks++;
        if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    checks++;
    if (int'(steps_done) != n_train + n_recog) begin failures++; $display("FAIL steps_done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
