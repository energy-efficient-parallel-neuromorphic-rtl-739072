// tb_neuron_unit: small neuron unit (N=21, K=4). Random parallel lane writes
// and reads against an array model, then fire checks (threshold, reset to
// rest, firing-time stamp, flag clear), the Tfire read port and clear.
module tb_neuron_unit;
  import snn_pkg::*;
  localparam int N = 21, K = 4, IDXW = 5, V_TH = 100, V_REST = -5;
  logic clk = 0, rst_n = 0;
  logic [IDXW-1:0] lane_idx [K];
  vmem_t lane_v_rd [K], lane_v_wr [K];
  logic lane_we [K];
  logic [N-1:0] s_vec;
  logic [IDXW-1:0] tf_idx;
  tstamp_t tf_rd, t_global;
  logic fire_chk, clear;
  int checks = 0, failures = 0;
  int vm [N], tf [N];
  bit sm [N];

  neuron_unit #(.N(N), .K(K), .IDXW(IDXW), .V_TH(V_TH), .V_REST(V_REST)) dut (
    .clk, .rst_n, .lane_idx, .lane_v_rd, .lane_we, .lane_v_wr, .s_vec, .tf_idx, .tf_rd,
    .fire_chk, .clear, .t_global);
  always #5 clk = ~clk;

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  task automatic check_all();
    for (int n = 0; n < N; n += K) begin
      for (int k = 0; k < K; k++) begin lane_idx[k] = IDXW'((n + k) % N); lane_we[k] = 0; end
      #1;
      for (int k = 0; k < K; k++) chk(int'(lane_v_rd[k]), vm[(n + k) % N], "vmem");
    end
    for (int n = 0; n < N; n++) begin
      tf_idx = IDXW'(n); #1;
      chk(int'(tf_rd), tf[n], "tfire");
      chk(int'(s_vec[n]), int'(sm[n]), "s");
    end
  endtask

  initial begin
    fire_chk = 0; clear = 0; t_global = 0; tf_idx = 0;
    for (int k = 0; k < K; k++) begin lane_idx[k] = 0; lane_we[k] = 0; lane_v_wr[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (vm[n]) begin vm[n] = V_REST; tf[n] = 0; sm[n] = 0; end
    @(negedge clk);
    check_all();
    for (int round = 0; round < 6; round++) begin
      // K-way parallel writes to distinct neurons
      for (int g = 0; g < (N + K - 1) / K; g++) begin
        @(negedge clk);
        for (int k = 0; k < K; k++) begin
          lane_idx[k] = IDXW'(g * K + k);
          lane_we[k]  = (g * K + k < N) && ($urandom_range(3) != 0);
          lane_v_wr[k] = vmem_t'($urandom_range(220) - 100);
        end
        @(posedge clk);
        for (int k = 0; k < K; k++) if (lane_we[k]) vm[g * K + k] = int'(lane_v_wr[k]);
      end
      @(negedge clk);
      for (int k = 0; k < K; k++) lane_we[k] = 0;
      check_all();
      // fire check
      t_global = tstamp_t'(100 + round);
      fire_chk = 1;
      @(posedge clk);
      foreach (vm[n]) begin
        if (vm[n] >= V_TH) begin sm[n] = 1; tf[n] = 100 + round; vm[n] = V_REST; end
        else sm[n] = 0;
      end
      @(negedge clk);
      fire_chk = 0;
      check_all();
    end
    clear = 1;
    @(posedge clk);
    foreach (vm[n]) begin vm[n] = V_REST; tf[n] = 0; sm[n] = 0; end
    @(negedge clk);
    clear = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
