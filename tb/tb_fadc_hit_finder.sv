// tb_fadc_hit_finder: self-checking test of one FADC channel's hit finder.
//
// Three runs, each with its own pedestal, gain and threshold, feed noisy
// baseline with random pulses (isolated pulses, pulse trains closer than
// the dead time, long pulses, pulses big enough to saturate). A reference
// model computed from the stimulus arrays predicts, for every cycle, whether
// a Hit comes out and with what energy; the check is cycle exact, so it
// also checks the NSA+1 cycle latency. The run also counts that the dead
// time suppressed crossings and that the sum saturated.
module tb_fadc_hit_finder;
  import nps_pkg::*;

  localparam int NSB = 4, NSA = 9, DEAD = 8, GAIN_FRAC = 8;
  localparam int NCYC = 3000;

  logic clk = 1'b0, rst = 1'b1;
  logic [SAMPLE_W-1:0] sample = '0, pedestal = '0;
  logic [GAIN_W-1:0]   gain = '0;
  logic [HIT_E_W-1:0]  tet = '0;
  hit_t hit;

  fadc_hit_finder #(.NSB(NSB), .NSA(NSA), .DEAD(DEAD), .GAIN_FRAC(GAIN_FRAC)) dut (
    .clk(clk), .rst(rst), .sample(sample), .pedestal(pedestal), .gain(gain),
    .tet(tet), .hit(hit));

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int n_hits = 0, n_dead_suppressed = 0, n_saturated = 0;

  int smp   [NCYC];
  int cal   [NCYC];
  bit exp_v [NCYC];
  int exp_e [NCYC];

  function automatic int calib(int s, int ped, int g);
    int v;
    v = (s > ped) ? s - ped : 0;
    v = (v * g) >>> GAIN_FRAC;
    return (v > 8191) ? 8191 : v;
  endfunction

  task automatic make_stimulus(int ped);
    int t, a, len;
    for (int i = 0; i < NCYC; i++) smp[i] = ped - 3 + int'($urandom_range(0, 6));
    t = 20;
    while (t < NCYC - 40) begin
      a = int'($urandom_range(0, 9));
      if (a < 5) begin                 // ordinary pulse
        len = int'($urandom_range(3, 7));
        for (int i = 0; i < len; i++) smp[t+i] += int'($urandom_range(5, 400)) / (i + 1);
      end else if (a < 7) begin        // two pulses inside the dead time
        smp[t] += 200; smp[t+1] += 100;
        smp[t+int'($urandom_range(2, 6))] += 300;
      end else if (a < 8) begin        // long pulse over threshold
        len = int'($urandom_range(10, 25));
        for (int i = 0; i < len; i++) smp[t+i] += 60;
      end else begin                   // huge pulse
        for (int i = 0; i < 6; i++) smp[t+i] = 4095;
      end
      t += int'($urandom_range(8, 40));
    end
    for (int i = 0; i < NCYC; i++) if (smp[i] > 4095) smp[i] = 4095;
  endtask

  task automatic make_expect(int ped, int g, int thr);
    int next_ok, sum;
    for (int i = 0; i < NCYC; i++) begin
      cal[i] = calib(smp[i], ped, g);
      exp_v[i] = 1'b0;
      exp_e[i] = 0;
    end
    next_ok = 0;
    for (int i = 0; i < NCYC - NSA; i++) begin
      if (cal[i] > thr) begin
        if (i >= next_ok) begin
          sum = 0;
          for (int j = i - NSB; j < i + NSA; j++) if (j >= 0) sum += cal[j];
          exp_v[i] = 1'b1;
          exp_e[i] = (sum > 8191) ? 8191 : sum;
          if (sum > 8191) n_saturated++;
          next_ok = i + DEAD;
        end else begin
          n_dead_suppressed++;
        end
      end
    end
  endtask

  task automatic run(int ped, int g, int thr);
    make_stimulus(ped);
    make_expect(ped, g, thr);
    @(negedge clk);
    rst = 1'b1; pedestal = SAMPLE_W'(ped); gain = GAIN_W'(g); tet = HIT_E_W'(thr);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NCYC + NSA + 2; p++) begin
      sample = (p < NCYC) ? SAMPLE_W'(smp[p]) : SAMPLE_W'(ped);
      @(negedge clk);
      // after posedge p: the hit of sample p-NSA is on the output
      if (p - NSA >= 0 && p - NSA < NCYC) begin
        checks++;
        if (hit.valid !== exp_v[p-NSA] ||
            (exp_v[p-NSA] && int'(hit.energy) != exp_e[p-NSA])) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH sample %0d: got v=%0d e=%0d exp v=%0d e=%0d",
                     p - NSA, hit.valid, hit.energy, exp_v[p-NSA], exp_e[p-NSA]);
        end
        if (hit.valid) n_hits++;
      end
    end
  endtask

  initial begin
    run(410, 16'h0100, 10);
    run(300, 16'h0180, 25);
    run(500, 16'h00C0, 10);
    $display("hits=%0d dead_time_suppressed=%0d saturated=%0d",
             n_hits, n_dead_suppressed, n_saturated);
    checks++; if (n_hits < 100) failures++;
    checks++; if (n_dead_suppressed == 0) failures++;
    checks++; if (n_saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
