// tb_lfsr_rng: checks the LFSR sequence step by step against the shift rule,
// that enable=0 holds the state, and that the period is the maximal 65535.
module tb_lfsr_rng;
  import snn_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] rnd;
  int checks = 0, failures = 0;
  int model, period;

  lfsr_rng #(.SEED(16'h1D2C)) dut (.clk, .rst_n, .en, .rnd);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    model = 16'h1D2C;
    checks++; if (int'(rnd) != model) failures++;
    en <= 1;
    period = 0;
    for (int n = 0; n < 70000; n++) begin
      @(posedge clk);
      #1;
      model = lfsr_next(model);
      period++;
      if (n < 2000) begin
        checks++;
        if (int'(rnd) != model) begin
          failures++;
          if (failures < 5) $display("FAIL step %0d rnd=%h model=%h", n, rnd, model);
        end
      end
      if (rnd == 16'h1D2C) break;
    end
    checks++;
    if (period != 65535) begin failures++; $display("FAIL period %0d", period); end
    en <= 0;
    @(posedge clk); #1;
    model = int'(rnd);
    repeat (3) @(posedge clk);
    #1;
    checks++; if (int'(rnd) != model) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
