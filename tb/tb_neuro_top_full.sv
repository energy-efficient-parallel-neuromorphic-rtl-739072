// tb_neuro_top_full: the processor at its default size (784 input and 800
// output neurons, K=32 lanes, 34 memories, 1042 clocks per UART bit) taken
// through one complete training operation over its UART pins.
//
// A fixed input pattern (a filled ring in the 28x28 image, standing in for a
// digit) is presented with training steps until output neurons have fired
// and their synapses have been learned, then once in recognition mode. Every
// output-spike byte is compared with the software network model, and at the
// end all 627,200 weights and all A+/A- values inside the memories are
// compared with the model. The length of each neuron operation stage is
// checked against ceil(784/32) + ceil(800/32)*(784+2) + 2 cycles.
module tb_neuro_top_full;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int NI = 784, NO = 800, K = 32, CPB = 1042;
  localparam int IB = (NI + 7) / 8, OB = (NO + 7) / 8;
  localparam int WDEP = ((NO + K - 1) / K) * NI;
  logic clk = 0, rst_n = 0, rxd = 1, txd;
  tstamp_t t_global;
  logic nos_busy, los_busy;
  logic [31:0] steps_done, syn_updates;
  int checks = 0, failures = 0;
  snn_model m;
  byte exp_q[$];
  int  n_started = 0;      // answer bytes whose start bit has been seen
  int  n_expected = 0;     // answer bytes of all steps sent so far

  neuro_top dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .t_global, .nos_busy, .los_busy,
    .steps_done, .syn_updates);
  always #5 clk = ~clk;

  // neuron operation stage length
  int nos_len = 0, nos_runs = 0;
  always @(posedge clk) begin
    if (nos_busy) nos_len++;
    else if (nos_len != 0) begin
      nos_runs++;
      checks++;
      if (nos_len != (NI + K - 1) / K + ((NO + K - 1) / K) * (NI + 2) + 3) begin
        failures++; $display("FAIL NOS took %0d cycles", nos_len);
      end
      nos_len = 0;
    end
  end

  // host UART receiver
  initial begin
    forever begin
      byte b;
      @(negedge txd);
      n_started++;
      repeat (CPB / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (CPB) @(posedge clk); b[i] = txd; end
      repeat (CPB) @(posedge clk);
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != b) begin
        failures++;
        if (failures < 10) $display("FAIL output spikes byte %h exp %h", b,
                                    (exp_q.size() != 0) ? exp_q[0] : 8'hxx);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
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
    n_expected += OB;
  endtask

  // memory comparison, one process per weight bank
  event do_cmp;
  int mism [K];
  for (genvar k = 0; k < K; k++) begin : g_cmp
    always @(do_cmp) begin
      mism[k] = 0;
      for (int a = 0; a < WDEP; a++) begin
        int i, j;
        i = (a / NI) * K + k; j = a % NI;
        if (i < NO && int'(dut.g_bank[k].u_wbank.mem[a]) != m.w[i * NI + j]) mism[k]++;
      end
    end
  end

  initial begin
    bit e[];
    int steps, bad_p, wtot;
    m = new(NI, NO, K, 1'b1, 1024, 0, 16, 16'h4000, 256, 32, -24);
    e = new[NI];
    for (int n = 0; n < NI; n++) begin
      int x, y, r2;
      x = n % 28 - 14; y = n / 28 - 14; r2 = x * x + y * y;
      e[n] = (r2 >= 25) && (r2 <= 100);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    steps = 0;
    while ((m.syn_updates == 0 || steps < 3) && steps < 12) begin
      step(1'b1, e);
      steps++;
      $display("training step %0d: t=%0d input firings %0d output firings %0d synapse updates %0d",
               steps, m.t, m.fired_in, m.fired_out, m.syn_updates);
    end
    step(1'b0, e);
    wait (exp_q.size() == 0);
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (m.fired_out == 0 || m.syn_updates == 0) begin
      failures++; $display("FAIL no output firing / no learning in %0d steps", steps);
    end
    checks++;
    if (int'(syn_updates) != m.syn_updates) begin
      failures++; $display("FAIL syn_updates %0d exp %0d", syn_updates, m.syn_updates);
    end
    ->do_cmp;
    #1;
    wtot = 0;
    foreach (mism[k]) wtot += mism[k];
    checks++;
    if (wtot != 0) begin failures++; $display("FAIL %0d weights differ from the model", wtot); end
    bad_p = 0;
    for (int a = 0; a < NI * NO; a++)
      if (int'($signed(dut.u_aplus.mem[a])) != m.ap[a] || int'($signed(dut.u_aminus.mem[a])) != m.am[a])
        bad_p++;
    checks++;
    if (bad_p != 0) begin failures++; $display("FAIL %0d A+/A- values differ", bad_p); end
    $display("NOS runs %0d, steps %0d, output firings %0d, synapse updates %0d",
             nos_runs, int'(steps_done), m.fired_out, m.syn_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
