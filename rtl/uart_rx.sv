// uart_rx: UART receiver, 8 data bits, no parity, 1 stop bit, LSB first.
//
// The line is sampled in the middle of each bit, CLKS_PER_BIT clock cycles
// apart (1042 = 120 MHz / 115200 baud by default; the baud rate is this
// design's choice). The input is synchronised by two flip-flops. A received
// byte is presented on data with a one-cycle valid pulse after the middle of
// the stop bit; a frame whose stop bit is 0 is dropped.
module uart_rx #(
  parameter int CLKS_PER_BIT = 1042
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd,
  output logic       valid,
  output logic [7:0] data
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rstate_e;
  rstate_e state;
  logic [1:0] sync;
  logic [$clog2(CLKS_PER_BIT+1)-1:0] cnt;
  logic [2:0] bitn;
  logic rx;

  assign rx = sync[1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync  <= 2'b11;
      state <= R_IDLE;
      cnt   <= '0;
      bitn  <= '0;
      valid <= 1'b0;
      data  <= '0;
    end else begin
      sync  <= {sync[0], rxd};
      valid <= 1'b0;
      unique case (state)
        R_IDLE: if (!rx) begin
          state <= R_START;
          cnt   <= '0;
        end
        R_START: begin
          if (int'(cnt) == CLKS_PER_BIT/2 - 1) begin
            cnt   <= '0;
            state <= rx ? R_IDLE : R_DATA;   // glitch: back to idle
            bitn  <= '0;
          end else cnt <= cnt + 1'b1;
        end
        R_DATA: begin
          if (int'(cnt) == CLKS_PER_BIT - 1) begin
            cnt  <= '0;
            data <= {rx, data[7:1]};
            bitn <= bitn + 1'b1;
            if (bitn == 3'd7) state <= R_STOP;
          end else cnt <= cnt + 1'b1;
        end
        R_STOP: begin
          if (int'(cnt) == CLKS_PER_BIT - 1) begin
            cnt   <= '0;
            valid <= rx;
            state <= R_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
