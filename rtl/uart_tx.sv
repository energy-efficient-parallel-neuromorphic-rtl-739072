// uart_tx: UART transmitter, 8 data bits, no parity, 1 stop bit, LSB first.
//
// A byte is accepted when valid and ready are both high (ready is high only
// while the transmitter is idle); it is then sent as a start bit, 8 data bits
// and a stop bit, each CLKS_PER_BIT clock cycles long. The line idles high.
module uart_tx #(
  parameter int CLKS_PER_BIT = 1042
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       valid,
  input  logic [7:0] data,
  output logic       ready,
  output logic       txd
);
  logic [9:0] shreg;
  logic [3:0] nbits;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;

  assign ready = (nbits == 4'd0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      shreg <= '1;
      nbits <= '0;
      cnt   <= '0;
      txd   <= 1'b1;
    end else if (nbits == 4'd0) begin
      txd <= 1'b1;
      if (valid) begin
        shreg <= {1'b1, data, 1'b0};
        nbits <= 4'd10;
        cnt   <= '0;
        txd   <= 1'b0;
      end
    end else begin
      if (int'(cnt) == CLKS_PER_BIT - 1) begin
        cnt   <= '0;
        nbits <= nbits - 1'b1;
        shreg <= {1'b1, shreg[9:1]};
        txd   <= (nbits == 4'd1) ? 1'b1 : shreg[1];
      end else cnt <= cnt + 1'b1;
    end
  end
endmodule
