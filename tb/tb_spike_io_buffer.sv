// tb_spike_io_buffer: 20 input neurons (3 bytes) and 12 output neurons
// (2 bytes). Checks byte-to-bit order of the input vector, that the active
// vector only changes on load (so a new vector can be filled while the old
// one is in use), in_full, and the output byte stream under random ready.
module tb_spike_io_buffer;
  localparam int NI = 20, NO = 12;
  logic clk = 0, rst_n = 0;
  logic in_wr = 0, in_load = 0, out_cap = 0, tx_ready = 0;
  logic [7:0] in_byte = 0, tx_byte;
  logic in_full, out_busy, tx_valid;
  logic [NI-1:0] e_vec;
  logic [NO-1:0] s_out = 0;
  int checks = 0, failures = 0;

  spike_io_buffer #(.N_IN(NI), .N_OUT(NO)) dut (
    .clk, .rst_n, .in_wr, .in_byte, .in_full, .in_load, .e_vec,
    .out_cap, .s_out, .out_busy, .tx_valid, .tx_byte, .tx_ready);
  always #5 clk = ~clk;

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    logic [NI-1:0] prev, vec;
    logic [NO-1:0] ov;
    logic [15:0] got;
    prev = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      vec = NI'($urandom);
      for (int b = 0; b < 3; b++) begin
        @(negedge clk);
        chk(int'(in_full), 0, "not full");
        in_wr = 1; in_byte = 8'(vec >> (8 * b));
        @(negedge clk);
        in_wr = 0;
        chk(int'(e_vec), int'(prev), "active held");
      end
      chk(int'(in_full), 1, "full");
      in_load = 1;
      @(negedge clk);
      in_load = 0;
      chk(int'(e_vec), int'(vec), "loaded vector");
      chk(int'(in_full), 0, "emptied");
      prev = vec;
      // output
      ov = NO'($urandom);
      s_out = ov; out_cap = 1;
      @(negedge clk);
      out_cap = 0; s_out = '0;
      got = '0;
      for (int b = 0; b < 2; ) begin
        tx_ready = $urandom_range(1);
        #1;
        if (tx_valid && tx_ready) begin got[8*b +: 8] = tx_byte; b++; end
        @(negedge clk);
      end
      tx_ready = 0;
      chk(int'(got), int'(ov), "output bytes");
      chk(int'(out_busy), 0, "out done");
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
