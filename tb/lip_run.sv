// lip_run: one configuration of the parallelism sweep (used by tb_lip_sweep).
//
// Instantiates the processor with K lanes and the exact or approximate
// multipliers (APPROX) on a reduced network (NI input, NO output neurons),
// and plays one pattern through its UART pins as a host would: TRAIN_STEPS
// training steps, a weight dump, a clear, then RECOG_STEPS recognition
// steps of the same pattern. Every
// answer byte and every dumped weight is compared with the software model of
// the network (snn_ref_pkg::snn_model) configured the same way.
//
// It also measures the two stage lengths that the degree of parallelism
// trades off: every neuron operation stage must last
// ceil(NI/K) + ceil(NO/K)*(NI+2) + 3 cycles (load, layers, inhibitory
// neurons, fire check), and every learning stage NO + 1 + 2*NI*(output
// neurons that fired) cycles, independent of K. Recognition steps must run
// no learning stage at all. The stimulus comes from a fixed linear
// congruential generator, so every configuration sees the same input spikes.
// The run (and its clock) starts when go rises; done rises when it is over
// and the counters are then valid.
module lip_run #(
  parameter int NI = 32,
  parameter int NO = 40,
  parameter int K = 4,
  parameter bit APPROX = 1'b1,
  parameter int TRAIN_STEPS = 10,
  parameter int RECOG_STEPS = 6
) (
  input  logic go,           // the run starts when go rises
  output logic done,
  output int   checks,
  output int   failures,
  output int   nos_cycles,   // sum over all steps
  output int   los_cycles,   // sum over all steps
  output int   out_fired     // output-layer firings in recognition steps
);
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int CPB = 4, VTH = 64, KMIN = 32, LEAK = 2;
  localparam logic [15:0] KSYN = 16'h7000;
  localparam int IB = (NI + 7) / 8, OB = (NO + 7) / 8;
  localparam int NOS_LEN = (NI + K - 1) / K + ((NO + K - 1) / K) * (NI + 2) + 3;

  logic clk = 0, rst_n = 0, rxd = 1, txd;
  tstamp_t t_global;
  logic nos_busy, los_busy;
  logic [31:0] steps_done, syn_updates;
  snn_model m;
  byte exp_q[$];
  byte dump_q[$];
  bit  dumping = 0;
  int  n_started = 0, n_expected = 0;
  int  los_exp = 0;            // expected learning-stage cycles, all steps
  int  nos_len = 0, los_len = 0;
  bit  recog_phase = 0;
  int unsigned lcg = 32'd12345;

  neuro_top #(.N_IN(NI), .N_OUT(NO), .K(K), .APPROX(APPROX), .CLKS_PER_BIT(CPB), .V_TH(VTH),
              .K_SYN(KSYN), .KEXT_MIN(KMIN), .V_LEAK(LEAK), .A_PLUS_INIT(100),
              .A_MINUS_INIT(-40)) dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd), .t_global, .nos_busy, .los_busy,
    .steps_done, .syn_updates);
  initial begin
    wait (go);
    forever #5 clk = ~clk;
  end

  initial begin
    done = 0; checks = 0; failures = 0; nos_cycles = 0; los_cycles = 0; out_fired = 0;
  end

  // stage lengths
  always @(posedge clk) if (rst_n) begin
    if (nos_busy) begin nos_len++; nos_cycles++; end
    else if (nos_len != 0) begin
      checks++;
      if (nos_len != NOS_LEN) begin
        failures++; $display("FAIL K=%0d NOS took %0d cycles, exp %0d", K, nos_len, NOS_LEN);
      end
      nos_len = 0;
    end
    if (los_busy) begin
      los_cycles++;
      if (recog_phase) begin
        failures++; $display("FAIL K=%0d learning stage in recognition mode", K);
      end
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
      if (dumping) dump_q.push_back(b);
      else begin
        checks++;
        if (exp_q.size() == 0 || exp_q[0] != b) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d APPROX=%0d output spikes byte %h exp %h", K,
                                      APPROX, b, (exp_q.size() != 0) ? exp_q[0] : 8'h00);
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
    int nf;
    logic [IB*8-1:0] ev;
    ev = '0;
    for (int n = 0; n < NI; n++) ev[n] = e[n];
    m.step(e, train);
    nf = 0;
    for (int i = 0; i < NO; i++) nf += int'(m.s[NI + i]);
    if (train) los_exp += NO + 1 + 2 * NI * nf;
    else out_fired += nf;
    for (int b = 0; b < OB; b++) begin
      ob = 0;
      for (int q = 0; q < 8; q++) if (b * 8 + q < NO) ob[q] = m.s[NI + b * 8 + q];
      exp_q.push_back(ob);
    end
    send_byte(train ? CMD_TRAIN : CMD_RECOG);
    for (int b = 0; b < IB; b++) send_byte(ev[8*b +: 8]);
    wait (n_started > n_expected);
    n_expected += OB;
  endtask

  task automatic check_dump();
    wait (exp_q.size() == 0);
    wait (!los_busy);
    repeat (20 * CPB) @(posedge clk);
    dumping = 1;
    send_byte(CMD_DUMP);
    wait (dump_q.size() == NO * ((NI + 1) / 2));
    n_expected += NO * ((NI + 1) / 2);
    repeat (12 * CPB) @(posedge clk);
    dumping = 0;
    for (int i = 0; i < NO; i++)
      for (int j = 0; j < NI; j += 2) begin
        byte b;
        b = dump_q.pop_front();
        checks++;
        if (int'(b[3:0]) != m.w[i*NI + j] || (j + 1 < NI && int'(b[7:4]) != m.w[i*NI + j + 1])) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d dump W(%0d,%0d) got %0d,%0d exp %0d,%0d", K, j, i, b[3:0], b[7:4], m.w[i*NI + j], (j + 1 < NI) ? m.w[i*NI + j + 1] : 0);
        end
      end
  endtask

  initial begin
    bit e[];
    m = new(NI, NO, K, APPROX, VTH, 0, LEAK, int'(KSYN), KMIN, 100, -40);
    e = new[NI];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int s = 0; s < TRAIN_STEPS + RECOG_STEPS; s++) begin
      bit tr;
      tr = s < TRAIN_STEPS;
      if (!tr && !recog_phase) begin
        check_dump();
        recog_phase = 1;
        m.clear();                       // recognition starts a fresh pattern
        send_byte(CMD_CLEAR);
        repeat (4 * CPB) @(posedge clk);
      end
      // the same pattern every step: pixels in a diagonal band spike with
      // probability 3/4
      for (int n = 0; n < NI; n++) begin
        lcg = lcg * 32'd1103515245 + 32'd12345;
        e[n] = (((n % 8) + (n / 8)) % 4 != 0) && (lcg[17:16] != 2'b00);
      end
      step(tr, e);
    end
    wait (exp_q.size() == 0);
    repeat (20 * CPB) @(posedge clk);
    checks++;
    if (los_cycles != los_exp) begin
      failures++; $display("FAIL K=%0d learning stages took %0d cycles, exp %0d", K, los_cycles, los_exp);
    end
    checks++;
    if (int'(syn_updates) != m.syn_updates) begin
      failures++; $display("FAIL K=%0d syn_updates %0d exp %0d", K, syn_updates, m.syn_updates);
    end
    checks++;
    if (int'(steps_done) != TRAIN_STEPS + RECOG_STEPS) begin
      failures++; $display("FAIL K=%0d steps_done %0d", K, steps_done);
    end
    done = 1;
  end
endmodule
