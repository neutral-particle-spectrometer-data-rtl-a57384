// tb_fadc250: self-checking test of the 16-channel FADC250 hit logic.
//
// Every channel gets its own pedestal and gain and an independent random
// pulse stream. A reference model per channel predicts the Hit stream cycle
// by cycle (threshold after pedestal and gain, NSB+NSA sum, dead time,
// NSA+1 cycles latency), so swapped channels, a wrong per-channel
// calibration or wrong timing all show up.
module tb_fadc250;
  import nps_pkg::*;

  localparam int NCH = 16, NSB = 4, NSA = 9, DEAD = 8;
  localparam int NCYC = 600;

  logic clk = 1'b0, rst = 1'b1;
  logic [SAMPLE_W-1:0] sample [NCH];
  logic [SAMPLE_W-1:0] pedestal [NCH];
  logic [GAIN_W-1:0]   gain [NCH];
  logic [HIT_E_W-1:0]  tet = DEF_TET;
  hit_t hit [NCH];

  fadc250 dut (.clk(clk), .rst(rst), .sample(sample), .pedestal(pedestal),
               .gain(gain), .tet(tet), .hit(hit));

  always #2 clk = ~clk;

  int checks = 0, failures = 0, n_hits = 0;
  int smp [NCH][NCYC];
  bit exp_v [NCH][NCYC];
  int exp_e [NCH][NCYC];
  int ped_i [NCH];
  int gain_i [NCH];

  initial begin
    int cal [NCYC];
    int t, next_ok, sum, v;
    for (int ch = 0; ch < NCH; ch++) begin
      ped_i[ch]  = 350 + 10 * ch;
      gain_i[ch] = 128 + 16 * ch;           // 0.5 .. 1.4375 MeV/count
      pedestal[ch] = SAMPLE_W'(ped_i[ch]);
      gain[ch]     = GAIN_W'(gain_i[ch]);
      sample[ch]   = '0;
      for (int i = 0; i < NCYC; i++) smp[ch][i] = ped_i[ch] - 2 + int'($urandom_range(0, 4));
      t = 10 + ch;
      while (t < NCYC - 30) begin
        for (int i = 0; i < 5; i++) smp[ch][t+i] += int'($urandom_range(0, 300)) / (i + 1);
        t += int'($urandom_range(6, 30));
      end
      for (int i = 0; i < NCYC; i++) begin
        v = (smp[ch][i] > ped_i[ch]) ? smp[ch][i] - ped_i[ch] : 0;
        v = (v * gain_i[ch]) / 256;
        cal[i] = (v > 8191) ? 8191 : v;
        exp_v[ch][i] = 1'b0;
        exp_e[ch][i] = 0;
      end
      next_ok = 0;
      for (int i = 0; i < NCYC - NSA; i++) begin
        if (cal[i] > int'(DEF_TET) && i >= next_ok) begin
          sum = 0;
          for (int j = i - NSB; j < i + NSA; j++) if (j >= 0) sum += cal[j];
          exp_v[ch][i] = 1'b1;
          exp_e[ch][i] = (sum > 8191) ? 8191 : sum;
          next_ok = i + DEAD;
        end
      end
    end

    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NCYC + NSA + 2; p++) begin
      for (int ch = 0; ch < NCH; ch++)
        sample[ch] = (p < NCYC) ? SAMPLE_W'(smp[ch][p]) : SAMPLE_W'(ped_i[ch]);
      @(negedge clk);
      if (p - NSA >= 0 && p - NSA < NCYC) begin
        for (int ch = 0; ch < NCH; ch++) begin
          checks++;
          if (hit[ch].valid !== exp_v[ch][p-NSA] ||
              (exp_v[ch][p-NSA] && int'(hit[ch].energy) != exp_e[ch][p-NSA])) begin
            failures++;
            if (failures < 10)
              $display("MISMATCH ch %0d sample %0d: got v=%0d e=%0d exp v=%0d e=%0d", ch,
                       p - NSA, hit[ch].valid, hit[ch].energy, exp_v[ch][p-NSA], exp_e[ch][p-NSA]);
          end
          if (hit[ch].valid) n_hits++;
        end
      end
    end
    $display("hits=%0d", n_hits);
    checks++; if (n_hits < 16 * 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
