// tb_booth_mult_approx: checks the approximate Booth multiplier two ways:
// bit-exact against a digit-level model of the truncated partial products
// plus group compensation, and statistically against the exact rounded
// product (error within -2..+3 LSB, mean error within +-0.25 LSB).
module tb_booth_mult_approx;
  import snn_ref_pkg::*;
  logic signed [15:0] a, b, p;
  int checks = 0, failures = 0;
  longint err_sum = 0;
  int nsamp = 0, err_min = 0, err_max = 0;

  booth_mult_approx dut (.a(a), .b(b), .p(p));

  task automatic try(int x, int y);
    int m, e, err;
    a = 16'(x); b = 16'(y);
    #1;
    m = ref_mult_approx(int'(a), int'(b));
    e = ref_mult_exact(int'(a), int'(b));
    err = int'(p) - e;
    err_sum += err; nsamp++;
    if (err < err_min) err_min = err;
    if (err > err_max) err_max = err;
    checks++;
    if (int'(p) != m) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d model=%0d", a, b, p, m);
    end
    checks++;
    if (err < -2 || err > 3) begin
      failures++;
      if (failures < 10) $display("FAIL error bound a=%0d b=%0d p=%0d exact=%0d", a, b, p, e);
    end
  endtask

  initial begin
    real mean;
    int corner[8] = '{0, 1, -1, 256, -256, 32767, -32768, 12345};
    foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++) try($urandom, $urandom);
    mean = real'(err_sum) / real'(nsamp);
    $display("approx error: min %0d max %0d mean %f", err_min, err_max, mean);
    checks++;
    if (mean > 0.25 || mean < -0.25) begin
      failures++;
      $display("FAIL mean error %f", mean);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
