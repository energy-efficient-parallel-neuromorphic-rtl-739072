// tb_lip_sweep: the degree-of-parallelism sweep, run on a reduced network.
//
// Ten copies of the processor run the same pattern one after the other
// (lip_run, each started by the previous one's done):
// K = 1, 2, 4, 8 and 32 lanes, each with exact (APPROX=0) and approximate
// (APPROX=1) multipliers, on a 32-input, 40-output network. Each copy is
// checked bit for bit against the software model and on its stage lengths
// (see lip_run). This bench then compares the configurations:
//   - the neuron operation stage gets shorter with every doubling of K and
//     does not depend on the multiplier type;
//   - K=1 is exactly the serial schedule, one synapse per clock;
//   - the learning stage is the same length formula at every K, so training
//     speeds up less than recognition.
// It prints the cycle counts and the speedups over K=1 for both modes.
module tb_lip_sweep;
  localparam int NCFG = 10;
  localparam int NI = 32, NO = 40;
  localparam int KS [5] = '{1, 2, 4, 8, 32};
  logic done [NCFG];
  int   chk [NCFG], fail [NCFG], nos [NCFG], los [NCFG], fired [NCFG];
  int   checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    lip_run #(.NI(NI), .NO(NO), .K(KS[c / 2]), .APPROX(1'(c % 2))) u_run (
      .go((c == 0) ? 1'b1 : done[(c == 0) ? 0 : c - 1]), .done(done[c]), .checks(chk[c]), .failures(fail[c]), .nos_cycles(nos[c]),
      .los_cycles(los[c]), .out_fired(fired[c]));
  end

  initial begin
    #1;
    wait (done[NCFG - 1]);             // the runs are chained: the last ends last
    #10;
    for (int c = 0; c < NCFG; c++) begin
      checks += chk[c];
      failures += fail[c];
    end
    $display("  K  mult    NOS cycles  LOS cycles  recog speedup  train speedup");
    for (int c = 0; c < NCFG; c++)
      $display("%3d  %s  %10d  %10d  %13.2f  %13.2f", KS[c / 2], (c % 2) ? "approx" : "exact ",
               nos[c], los[c], real'(nos[c % 2]) / real'(nos[c]),
               real'(nos[c % 2] + los[c % 2]) / real'(nos[c] + los[c]));
    for (int c = 0; c < NCFG; c++) begin
      // same schedule for both multipliers
      if (c % 2 == 1) begin
        checks++;
        if (nos[c] != nos[c - 1]) begin failures++; $display("FAIL NOS differs by multiplier"); end
      end
      // more lanes, shorter neuron stage
      if (c >= 2) begin
        checks++;
        if (nos[c] >= nos[c - 2]) begin
          failures++; $display("FAIL K=%0d not faster than K=%0d", KS[c / 2], KS[c / 2 - 1]);
        end
      end
    end
    // serial schedule: (NI + NO*(NI+2) + 3) cycles per step, 16 steps
    checks++;
    if (nos[0] != 16 * (NI + NO * (NI + 2) + 3)) begin
      failures++; $display("FAIL serial NOS %0d cycles", nos[0]);
    end
    // learning must have happened, and recognition must produce output spikes
    for (int c = 0; c < NCFG; c++) begin
      checks += 2;
      if (los[c] == 0) begin failures++; $display("FAIL cfg %0d never learned", c); end
      if (fired[c] == 0) begin failures++; $display("FAIL cfg %0d no output spikes", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) #10;              // 3M clock periods
    $display("watchdog: runs finished %0d %0d %0d %0d %0d %0d %0d %0d %0d %0d", done[0], done[1], done[2], done[3], done[4], done[5], done[6], done[7], done[8], done[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
