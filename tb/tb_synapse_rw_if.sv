// tb_synapse_rw_if: the interface in front of K=4 single-port weight banks.
// Checks that in the neuron operation mode every bank is read at the shared
// address and returns its own word to its lane, that in the learning mode
// only the selected bank is written, and that the selected bank's read data
// comes back one cycle after the address.
module tb_synapse_rw_if;
  import snn_pkg::*;
  localparam int K = 4, WAW = 6, BANKW = 2, DEPTH = 64;
  logic clk = 0;
  logic los_sel, los_we;
  logic [WAW-1:0] nos_addr, los_addr;
  logic [BANKW-1:0] los_bank;
  weight_t los_wdata, los_rdata, bank_wdata;
  weight_t nos_rdata [K], bank_rdata [K];
  logic [WAW-1:0] bank_addr [K];
  logic bank_we [K];
  int checks = 0, failures = 0;
  int model [K][DEPTH];

  synapse_rw_if #(.K(K), .WAW(WAW), .BANKW(BANKW)) dut (
    .clk, .los_sel, .nos_addr, .nos_rdata, .los_bank, .los_addr, .los_we, .los_wdata,
    .los_rdata, .bank_addr, .bank_we, .bank_wdata, .bank_rdata);

  for (genvar k = 0; k < K; k++) begin : g_b
    sp_bram #(.DEPTH(DEPTH), .WIDTH(4), .INIT(32'(k))) u_b (
      .clk, .addr(bank_addr[k]), .we(bank_we[k]), .wdata(bank_wdata), .rdata(bank_rdata[k]));
  end
  always #5 clk = ~clk;

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    for (int k = 0; k < K; k++) for (int a = 0; a < DEPTH; a++) model[k][a] = k;
    los_sel = 1; los_we = 0; nos_addr = 0; los_addr = 0; los_bank = 0; los_wdata = 0;
    // learning side: random writes to single banks
    for (int n = 0; n < 300; n++) begin
      int b, a;
      @(negedge clk);
      b = $urandom_range(K - 1); a = $urandom_range(DEPTH - 1);
      los_bank = BANKW'(b); los_addr = WAW'(a); los_we = $urandom_range(1);
      los_wdata = 4'($urandom);
      @(posedge clk);
      if (los_we) model[b][a] = int'(los_wdata);
    end
    // learning side reads, latency 1
    for (int n = 0; n < 100; n++) begin
      int b, a;
      @(negedge clk);
      b = $urandom_range(K - 1); a = $urandom_range(DEPTH - 1);
      los_bank = BANKW'(b); los_addr = WAW'(a); los_we = 0;
      @(negedge clk);
      los_bank = BANKW'((b + 1) % K);         // next request already on the bus
      chk(int'(los_rdata), model[b][a], "los read");
    end
    // neuron operation side: K banks in parallel
    @(negedge clk);
    los_sel = 0; los_we = 1;                  // a stray write request must be ignored
    for (int a = 0; a < DEPTH; a++) begin
      nos_addr = WAW'(a);
      @(negedge clk);
      for (int k = 0; k < K; k++) chk(int'(nos_rdata[k]), model[k][a], "nos read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
