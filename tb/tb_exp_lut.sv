// tb_exp_lut: compares every table entry with exp(-dt/tau) * 256 computed in
// floating point (tolerance 1 LSB), and checks saturation for dt >= DEPTH.
module tb_exp_lut;
  logic [15:0] dt, e;
  int checks = 0, failures = 0;

  exp_lut dut (.dt(dt), .e(e));   // default tau = 16

  initial begin
    real ref_v;
    int r;
    for (int d = 0; d < 300; d++) begin
      dt = 16'(d);
      #1;
      ref_v = $exp(-real'((d > 255) ? 255 : d) / 16.0) * 256.0;
      r = int'(ref_v);
      checks++;
      if (int'(e) - r > 1 || r - int'(e) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL dt=%0d e=%0d ref=%f", d, e, ref_v);
      end
    end
    dt = 16'hFFFF; #1;
    checks++; if (e != 16'd0) begin failures++; $display("FAIL sat e=%0d", e); end
    dt = 0; #1;
    checks++; if (e != 16'd256) begin failures++; $display("FAIL e(0)=%0d", e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
