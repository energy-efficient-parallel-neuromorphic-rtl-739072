// tb_uart: transmitter looped back into the receiver at 8 clocks per bit.
// Checks every received byte, the transmit frame length (10 bit times from
// acceptance to ready), the start and stop bit levels, and the receiver
// against a serial stream generated directly by the testbench.
module tb_uart;
  localparam int CPB = 8;
  logic clk = 0, rst_n = 0;
  logic tx_valid = 0, tx_ready, txd, rx_valid, rxd_tb = 1, rx2_valid;
  logic [7:0] tx_data = 0, rx_data, rx2_data;
  int checks = 0, failures = 0;
  byte q[$];

  uart_tx #(.CLKS_PER_BIT(CPB)) u_tx (.clk, .rst_n, .valid(tx_valid), .data(tx_data), .ready(tx_ready), .txd);
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx (.clk, .rst_n, .rxd(txd), .valid(rx_valid), .data(rx_data));
  uart_rx #(.CLKS_PER_BIT(CPB)) u_rx2 (.clk, .rst_n, .rxd(rxd_tb), .valid(rx2_valid), .data(rx2_data));
  always #5 clk = ~clk;

  always @(posedge clk) if (rx_valid) begin
    checks++;
    if (q.size() == 0 || rx_data != q[0]) begin
      failures++; $display("FAIL loopback got %h", rx_data);
    end
    if (q.size() != 0) void'(q.pop_front());
  end

  initial begin
    int t0, len;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 40; n++) begin
      @(negedge clk);
      tx_valid = 1; tx_data = 8'($urandom);
      q.push_back(tx_data);
      @(posedge clk);        // accepted here
      t0 = 0;
      @(negedge clk);
      tx_valid = 0;
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      len = 0;
      while (!tx_ready) begin @(negedge clk); len++; if (len == 9*CPB+CPB/2) begin
        checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end end end
      checks++;
      if (len != 10 * CPB) begin failures++; $display("FAIL frame length %0d", len); end
    end
    repeat (4 * CPB) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d bytes lost", q.size()); end
    // direct serial stream into the second receiver
    for (int n = 0; n < 10; n++) begin
      logic [7:0] d;
      d = 8'($urandom);
      fork
        begin
          rxd_tb = 0; repeat (CPB) @(posedge clk);
          for (int b = 0; b < 8; b++) begin rxd_tb = d[b]; repeat (CPB) @(posedge clk); end
          rxd_tb = 1; repeat (CPB) @(posedge clk);
        end
        begin
          @(posedge rx2_valid);
          checks++;
          if (rx2_data != d) begin failures++; $display("FAIL rx %h exp %h", rx2_data, d); end
        end
      join
      repeat (3) @(posedge clk);
    end
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
