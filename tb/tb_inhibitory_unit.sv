// tb_inhibitory_unit: small layers (16 input, 8 output neurons). Random
// firing patterns drive the update/fire-check cycle; membrane potentials,
// inhibitory flags and the inhibition fed back to each layer are compared
// with a model of the constant-weight inhibitory neurons. Both kinds of
// inhibitory neuron are made to fire.
module tb_inhibitory_unit;
  import snn_pkg::*;
  localparam int NI = 16, NO = 8, VTH = 100;
  logic clk = 0, rst_n = 0, upd = 0, fire_chk = 0, clear = 0;
  logic [NI-1:0] s_in;
  logic [NO-1:0] s_out;
  logic [5:0] s_inh_in;
  logic s_inh_out;
  vmem_t inh_to_in, inh_to_out;
  int checks = 0, failures = 0;
  int v_i [6], v_o;
  bit f_i [6], f_o;
  int fired_i = 0, fired_o = 0;

  inhibitory_unit #(.N_IN(NI), .N_OUT(NO), .W_E2I_IN(8), .W_E2I_OUT(40), .W_I2E_OUT(-300),
                    .W_I2E_IN0(-3), .V_TH(VTH), .V_REST(0), .V_LEAK(4)) dut (
    .clk, .rst_n, .upd, .fire_chk, .clear, .s_in, .s_out, .s_inh_in, .s_inh_out,
    .inh_to_in, .inh_to_out);
  always #5 clk = ~clk;

  task automatic chk(int got, int exp_v, string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp_v);
    end
  endtask

  initial begin
    int ci, co, e_in;
    s_in = 0; s_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (v_i[q]) begin v_i[q] = 0; f_i[q] = 0; end
    v_o = 0; f_o = 0;
    for (int step = 0; step < 60; step++) begin
      @(negedge clk);
      s_in = NI'($urandom & $urandom); s_out = NO'($urandom & $urandom & $urandom);
      ci = $countones(s_in); co = $countones(s_out);
      upd = 1;
      @(posedge clk);
      foreach (v_i[q]) v_i[q] = v_i[q] + 8 * ci - 4;
      v_o = v_o + 40 * co - 4;
      @(negedge clk);
      upd = 0; fire_chk = 1;
      @(posedge clk);
      foreach (v_i[q]) begin f_i[q] = (v_i[q] >= VTH); if (f_i[q]) begin v_i[q] = 0; fired_i++; end end
      f_o = (v_o >= VTH); if (f_o) begin v_o = 0; fired_o++; end
      @(negedge clk);
      fire_chk = 0;
      e_in = 0;
      foreach (f_i[q]) begin
        chk(int'(s_inh_in[q]), int'(f_i[q]), "s_inh_in");
        chk(int'(dut.v_in[q]), v_i[q], "v_inh_in");
        if (f_i[q]) e_in += -3 * (q + 1);
      end
      chk(int'(s_inh_out), int'(f_o), "s_inh_out");
      chk(int'(dut.v_out), v_o, "v_inh_out");
      chk(int'(inh_to_in), e_in, "inh_to_in");
      chk(int'(inh_to_out), f_o ? -300 : 0, "inh_to_out");
    end
    checks++;
    if (fired_i == 0 || fired_o == 0) begin failures++; $display("FAIL no inhibitory firing"); end
    $display("inhibitory firings: input layer %0d, output layer %0d", fired_i, fired_o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
