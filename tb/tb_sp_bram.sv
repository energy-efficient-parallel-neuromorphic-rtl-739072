// tb_sp_bram: checks initial contents (constant and hashed), one-cycle read
// latency, read-first behaviour on a write, and random write/read traffic
// against an array model.
module tb_sp_bram;
  import snn_ref_pkg::*;
  localparam int DEPTH = 300;
  logic clk = 0;
  logic [8:0] addr, addr2;
  logic we, we2;
  logic [7:0] wdata, rdata, wdata2;
  logic [3:0] rdata2;
  int checks = 0, failures = 0;
  int model [DEPTH];

  sp_bram #(.DEPTH(DEPTH), .WIDTH(8), .INIT(32'hE8)) dut (
    .clk, .addr, .we, .wdata, .rdata);
  sp_bram #(.DEPTH(DEPTH), .WIDTH(4), .INIT(32'd4), .INIT_RANDOM(1'b1), .INIT_MASK(32'h7),
            .SALT(32'h3000)) dut2 (.clk, .addr(addr2), .we(we2), .wdata(wdata2[3:0]), .rdata(rdata2));
  always #5 clk = ~clk;

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    we = 0; we2 = 0; wdata2 = 0; addr = 0; addr2 = 0; wdata = 0;
    for (int i = 0; i < DEPTH; i++) model[i] = 8'hE8;
    // initial contents
    for (int i = 0; i < DEPTH; i++) begin
      addr <= 9'(i); addr2 <= 9'(i);
      @(posedge clk); #1;
      chk(int'(rdata), 8'hE8, "init const");
      chk(int'(rdata2), bram_init(i, 32'h3000, 4, 7, 1, 4), "init hash");
    end
    // read-first write
    addr <= 9'd7; we <= 1; wdata <= 8'h5A;
    @(posedge clk); #1;
    chk(int'(rdata), 8'hE8, "read-first");
    model[7] = 8'h5A;
    we <= 0;
    @(posedge clk); #1;
    chk(int'(rdata), 8'h5A, "read after write");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      addr <= 9'(a);
      we <= $urandom_range(1);
      wdata <= 8'($urandom);
      @(posedge clk); #1;
      chk(int'(rdata), model[a], "random");
      if (we) model[a] = int'(wdata);
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
