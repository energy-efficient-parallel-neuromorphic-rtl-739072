// tb_booth_mult_std: checks the exact fixed-width Booth multiplier against
// the rounded integer part of the true product, (A*B + 2^15) >> 16, for
// corner operands and 20000 random pairs.
module tb_booth_mult_std;
  import snn_ref_pkg::*;
  logic signed [15:0] a, b, p;
  int checks = 0, failures = 0;

  booth_mult_std dut (.a(a), .b(b), .p(p));

  task automatic try(int x, int y);
    int exp_p;
    a = 16'(x); b = 16'(y);
    #1;
    exp_p = ref_mult_exact(int'(a), int'(b));
    checks++;
    if (int'(p) != exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL a=%0d b=%0d p=%0d exp=%0d", a, b, p, exp_p);
    end
  endtask

  initial begin
    int corner[8] = '{0, 1, -1, 256, -256, 32767, -32768, 12345};
    foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++) try($urandom, $urandom);
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
