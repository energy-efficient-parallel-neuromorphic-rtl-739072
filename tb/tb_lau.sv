// tb_lau: drives two LIF arithmetic units (exact and approximate multiplier)
// with random presynaptic weight/spike sequences, external spikes, random
// numbers and inhibitory inputs. After N_PRE accumulate cycles (one per
// presynaptic neuron) the accumulator and the updated membrane potential are
// compared with a model; the approximate unit may differ from the exact
// model only by the multiplier error. Saturation at both ends is exercised.
module tb_lau;
  import snn_pkg::*;
  import snn_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  lau_op_e op;
  weight_t w_in;
  logic s_in, e_in;
  logic [15:0] rnd;
  vmem_t inh_in, v_in, v_new_x, v_new_a;
  logic [15:0] acc_x, acc_a;
  int checks = 0, failures = 0;

  lau #(.APPROX(1'b0)) dut_x (.clk, .rst_n, .op, .w_in, .s_in, .e_in, .rnd, .inh_in, .v_in,
                              .v_new(v_new_x), .acc(acc_x));
  lau dut_a (.clk, .rst_n, .op, .w_in, .s_in, .e_in, .rnd, .inh_in, .v_in,
             .v_new(v_new_a), .acc(acc_a));
  always #5 clk = ~clk;

  task automatic one_update(int n_pre, int v0, bit e, int inh);
    int acc, exp_v, exp_a, cyc;
    acc = 0; cyc = 0;
    for (int j = 0; j < n_pre; j++) begin
      op <= LAU_ACC; w_in <= 4'($urandom); s_in <= ($urandom_range(3) != 0);
      @(negedge clk);
      if (s_in) acc += int'(w_in);
      @(posedge clk); cyc++;
      #1;
    end
    checks++;
    if (int'(acc_x) != acc || int'(acc_a) != acc || cyc != n_pre) begin
      failures++; $display("FAIL acc %0d/%0d exp %0d after %0d cycles", acc_x, acc_a, acc, cyc);
    end
    op <= LAU_UPDATE; v_in <= 16'(v0); e_in <= e; rnd <= 16'($urandom); inh_in <= 16'(inh);
    @(negedge clk);
    exp_v = sat(v0 + ref_mult_exact(16'h4000, acc) + (e ? 256 + int'(rnd[7:0]) : 0) + inh - 16,
                -32768, 32767);
    exp_a = sat(v0 + ref_mult_approx(16'h4000, acc) + (e ? 256 + int'(rnd[7:0]) : 0) + inh - 16,
                -32768, 32767);
    checks += 2;
    if (int'(v_new_x) != exp_v) begin
      failures++; $display("FAIL exact v_new %0d exp %0d (v0 %0d acc %0d)", v_new_x, exp_v, v0, acc);
    end
    if (int'(v_new_a) != exp_a) begin
      failures++; $display("FAIL approx v_new %0d exp %0d", v_new_a, exp_a);
    end
    @(posedge clk); #1;
    checks++;
    if (acc_x != 0 || acc_a != 0) begin failures++; $display("FAIL acc not cleared"); end
  endtask

  initial begin
    op = LAU_NOP; w_in = 0; s_in = 0; e_in = 0; rnd = 0; inh_in = 0; v_in = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 40; n++)
      one_update($urandom_range(800, 1), $urandom_range(2000) - 1000, $urandom_range(1),
                 -int'($urandom_range(3)) * 16);
    one_update(784, 32700, 1, 0);        // positive saturation
    one_update(0, -32760, 0, -2048);     // negative saturation
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
