// tb_stdp_unit: learning stage on a 8-input, 6-output network with K=2
// weight banks, modelled here as arrays with one-cycle read latency. Random
// firing patterns, firing times, weights and A+/A- values are learned over
// several rounds; all weights and parameters are compared with the STDP
// rule computed in the testbench (same approximate multiplier model and
// exponential tables). From start to the done pulse it must take one cycle
// per output neuron scanned, 2 cycles per updated synapse and 2 cycles of
// start/finish overhead.
module tb_stdp_unit;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  localparam int NI = 8, NO = 6, K = 2, IDXW = 4, BANKW = 1;
  localparam int WAW = $clog2(((NO + K - 1) / K) * NI), PAW = $clog2(NO * NI);
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  tstamp_t t_global, tf_rd;
  logic [NO-1:0] s_out;
  logic [IDXW-1:0] tf_idx;
  logic [BANKW-1:0] w_bank;
  logic [WAW-1:0] w_addr;
  logic w_we, p_we;
  weight_t w_wdata, w_rdata;
  logic [PAW-1:0] p_addr;
  apar_t ap_wdata, ap_rdata, am_wdata, am_rdata;
  logic [31:0] syn_updates;
  int checks = 0, failures = 0;

  int wmem [K][(NO + K - 1) / K * NI];
  int apm [NO * NI], amm [NO * NI];
  int tfire [NI];
  int rw [NO][NI], rap [NO][NI], ram [NO][NI];
  int e1 [256], e2 [256];

  stdp_unit #(.N_IN(NI), .N_OUT(NO), .K(K), .IDXW(IDXW), .BANKW(BANKW), .WAW(WAW), .PAW(PAW)) dut (
    .clk, .rst_n, .start, .busy, .done, .t_global, .s_out, .tf_idx, .tf_rd,
    .w_bank, .w_addr, .w_we, .w_wdata, .w_rdata, .p_addr, .p_we,
    .ap_wdata, .ap_rdata, .am_wdata, .am_rdata, .syn_updates);
  always #5 clk = ~clk;

  assign tf_rd = tstamp_t'(tfire[tf_idx]);
  always @(posedge clk) begin
    w_rdata  <= weight_t'(wmem[w_bank][w_addr]);
    ap_rdata <= apar_t'(apm[p_addr]);
    am_rdata <= apar_t'(amm[p_addr]);
    if (w_we) wmem[w_bank][w_addr] <= int'(w_wdata);
    if (p_we) begin apm[p_addr] <= int'(ap_wdata); amm[p_addr] <= int'(am_wdata); end
  end

  initial begin
    int cyc, nfired, sat_seen;
    for (int d = 0; d < 256; d++) begin
      e1[d] = exp_entry(15760736, d);
      e2[d] = exp_entry(16261035, d);
    end
    sat_seen = 0;
    for (int i = 0; i < NO; i++) for (int j = 0; j < NI; j++) begin
      rw[i][j] = ($urandom_range(2) == 0) ? 15 * $urandom_range(1) : $urandom_range(15);
      rap[i][j] = $urandom_range(150) - 30; ram[i][j] = -$urandom_range(60);
      wmem[i % K][(i / K) * NI + j] = rw[i][j];
      apm[i * NI + j] = rap[i][j] & 255; amm[i * NI + j] = ram[i][j] & 255;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 8; round++) begin
      t_global = tstamp_t'(1000 + round * 7);
      foreach (tfire[j]) tfire[j] = int'(t_global) - $urandom_range(300);
      s_out = NO'($urandom);
      if (round == 0) s_out = '0;
      nfired = $countones(s_out);
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NO + 2 + nfired * 2 * NI) begin
        failures++; $display("FAIL busy %0d cycles, exp %0d", cyc, NO + 2 + nfired * 2 * NI);
      end
      // model
      for (int i = 0; i < NO; i++) if (s_out[i]) for (int j = 0; j < NI; j++) begin
        int dt, idx, a1, a2, dw, wn;
        dt = (int'(t_global) - tfire[j]) & 16'hFFFF;
        idx = (dt > 255) ? 255 : dt;
        a1 = sat(ref_mult_approx(rap[i][j] * 256, e1[idx]) + 4, -128, 127);
        a2 = sat(ref_mult_approx(ram[i][j] * 256, e2[idx]) - 3, -128, 127);
        dw = a1 + a2 - 2;
        wn = (rw[i][j] * 16 + dw + 8) >>> 4;
        if (wn < 0 || wn > 15) sat_seen++;
        rw[i][j] = sat(wn, 0, 15); rap[i][j] = a1; ram[i][j] = a2;
      end
      for (int i = 0; i < NO; i++) for (int j = 0; j < NI; j++) begin
        int gw, ga, gm;
        gw = wmem[i % K][(i / K) * NI + j];
        ga = apm[i * NI + j]; ga = (ga > 127) ? ga - 256 : ga;
        gm = amm[i * NI + j]; gm = (gm > 127) ? gm - 256 : gm;
        checks += 3;
        if (gw != rw[i][j] || ga != rap[i][j] || gm != ram[i][j]) begin
          failures++;
          if (failures < 8) $display("FAIL round %0d syn(%0d,%0d): W %0d/%0d A+ %0d/%0d A- %0d/%0d",
                                     round, j, i, gw, rw[i][j], ga, rap[i][j], gm, ram[i][j]);
        end
      end
    end
    $display("weight saturations in model: %0d", sat_seen);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL weight saturation never exercised"); end
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
