// tb_nps_top: end-to-end test of the NPS trigger on a reduced detector.
//
// Same scenarios as tb_nps_top_full, on 12 rows x 15 columns (5 crates of 3
// columns, 5 x 3 FADC250 modules) so that it builds in seconds. All other
// parameters are the defaults. Nominal settings: pedestal 410, gain 1 MeV per
// count (one channel at 2), hit threshold 10 MeV, seed 50 MeV, trigger
// 900 MeV, pair 500 MeV. Planted detector pulses, 60 cycles apart, make
// every mechanism happen; their clusters were worked out by hand:
//   S1 single 1000 MeV cluster (960 seed + 40 from a gain-2 neighbour) -> TS1
//   S2 clusters of 600 and 640 in crates 0 and 3 -> Bit 3 in two crates -> TS6
//   S3 clusters of 600 and 560 in crate 1, two cycles apart -> Bit 4 -> TS6
//   S4 seed 456 in the last column of crate 1 with a 104 neighbour in
//      crate 2 -> one 560 cluster through the halo, none in crate 2
//   S5 touching seeds 600 and 552 -> merged into one 1152 cluster
//   S6 a pulse followed by a second one 4 samples later, inside the dead
//      time, then a third 8 samples after the first -> hits of 1400 (all
//      three in its window) and 800 (second and third)
//   S7 a 9-sample pulse whose hit saturates at 8191, with eight 2000
//      neighbours -> cluster saturated at 16383; the pulse re-triggers
//      when the dead time ends -> a second, lone 5000 cluster
//   S8 a lone 40 MeV hit below the seed threshold -> no cluster
// Each cycle the whole cluster map, the 15 VTP bits, TS1 and TS6 are
// compared with the timeline these clusters imply. The latency from the
// first sample of a pulse to TS1/TS6 is NSA+HIT_DT+5 = 19 clocks (76 ns).
module tb_nps_top;
  import nps_pkg::*;

  localparam int ROWS = 12, NCOLS = 15, NCR = 5, CC = 3;
  // scenario positions [row, column]
  localparam int S1R = 6, S1C = 7;                            // crate 2
  localparam int S2R0 = 5, S2C0 = 1, S2R1 = 10, S2C1 = 10;    // crates 0 and 3
  localparam int S3R0 = 2, S3C0 = 3, S3R1 = 9, S3C1 = 4;      // crate 1
  localparam int S4R = 4;                                     // crate 1 / 2 boundary
  localparam int S5R = 8, S5C = 12;                           // crate 4
  localparam int S7R = 6, S7C = 10;                           // crate 3
  localparam int NSA = 9, W = 5, WID = 5;
  localparam int GAP = 60, NSC = 8, NCYC = NSC * GAP + 60;
  localparam int PED = 410;
  localparam int CL_LAT = NSA + W + 2;   // first sample -> cluster word seen

  logic clk = 1'b0, rst = 1'b1;
  logic [SAMPLE_W-1:0] sample   [ROWS][NCOLS];
  logic [SAMPLE_W-1:0] pedestal [ROWS][NCOLS];
  logic [GAIN_W-1:0]   gain     [ROWS][NCOLS];
  logic [HIT_E_W-1:0]  tet = DEF_TET;
  vtp_cfg_t            cfg = DEF_VTP_CFG;
  cluster_t            clusters [ROWS][NCOLS];
  logic [NCR-1:0]      vtp_bit0, vtp_bit3, vtp_bit4;
  logic                ts1, ts6;

  nps_top #(.ROWS(ROWS), .NCRATES(NCR), .CRATE_COLS(CC)) dut (
    .clk(clk), .rst(rst), .sample(sample), .pedestal(pedestal), .gain(gain),
    .tet(tet), .cfg(cfg), .clusters(clusters),
    .vtp_bit0(vtp_bit0), .vtp_bit3(vtp_bit3), .vtp_bit4(vtp_bit4),
    .ts1(ts1), .ts6(ts6));

  always #2 clk = ~clk;

  typedef struct { int t; int r; int c; int e; } exp_cl_t;
  exp_cl_t exp_q [$];

  int checks = 0, failures = 0;
  int extra [NCYC][ROWS][NCOLS];        // ADC counts above pedestal
  bit e0 [NCR][NCYC], e3 [NCR][NCYC], e4 [NCR][NCYC];
  bit b0 [NCR][NCYC], b3 [NCR][NCYC], b4 [NCR][NCYC];
  int found [$];

  // mechanism counters
  int n_ts1 = 0, n_ts6_bit3 = 0, n_ts6_bit4 = 0, n_halo = 0, n_merge = 0;
  int n_dead = 0, n_sat = 0, n_gain = 0, n_below_seed = 0;

  task automatic pulse(int t, int r, int c, int a0, int a1 = 0, int a2 = 0, int a3 = 0);
    extra[t][r][c] += a0; extra[t+1][r][c] += a1;
    extra[t+2][r][c] += a2; extra[t+3][r][c] += a3;
  endtask

  task automatic cl(int t, int r, int c, int e);  // t = first sample of seed pulse
    exp_q.push_back('{t: t + CL_LAT, r: r, c: c, e: e});
    found.push_back(0);
  endtask

  initial begin
    int tb, k, n, x;
    for (int t = 0; t < NCYC; t++)
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < NCOLS; c++) extra[t][r][c] = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < NCOLS; c++) begin
        pedestal[r][c] = SAMPLE_W'(PED);
        gain[r][c]     = 16'h0100;
        sample[r][c]   = SAMPLE_W'(PED);
      end
    gain[S1R + 1][S1C] = 16'h0200;

    // S1
    tb = 20;          pulse(tb, S1R, S1C, 480, 240, 120, 120); pulse(tb + 2, S1R + 1, S1C, 12, 6, 2);
    cl(tb, S1R, S1C, 1000);
    // S2
    tb = 20 + GAP;    pulse(tb, S2R0, S2C0, 300, 150, 75, 75); pulse(tb + 1, S2R1, S2C1, 320, 160, 80, 80);
    cl(tb, S2R0, S2C0, 600); cl(tb + 1, S2R1, S2C1, 640);
    // S3
    tb = 20 + 2*GAP;  pulse(tb, S3R0, S3C0, 300, 150, 75, 75); pulse(tb + 2, S3R1, S3C1, 280, 140, 70, 70);
    cl(tb, S3R0, S3C0, 600); cl(tb + 2, S3R1, S3C1, 560);
    // S4
    tb = 20 + 3*GAP;  pulse(tb, S4R, 2 * CC - 1, 228, 114, 57, 57); pulse(tb, S4R, 2 * CC, 52, 26, 13, 13);
    cl(tb, S4R, 2 * CC - 1, 560);
    // S5
    tb = 20 + 4*GAP;  pulse(tb, S5R, S5C, 300, 150, 75, 75); pulse(tb + 1, S5R, S5C + 1, 276, 138, 69, 69);
    cl(tb, S5R, S5C, 1152);
    // S6
    tb = 20 + 5*GAP;  pulse(tb, 3, 3, 300, 200, 100); pulse(tb + 4, 3, 3, 300, 200, 100);
    pulse(tb + 8, 3, 3, 200);
    cl(tb, 3, 3, 1400); cl(tb + 8, 3, 3, 800);
    // S7
    tb = 20 + 6*GAP;
    for (int i = 0; i < 9; i++) extra[tb + i][S7R][S7C] = 1000;
    for (int dr = -1; dr <= 1; dr++) for (int dc = -1; dc <= 1; dc++)
      if (dr != 0 || dc != 0) pulse(tb + 1, S7R + dr, S7C + dc, 1000, 500, 250, 250);
    cl(tb, S7R, S7C, 16383);
    // the seed pulse is still above threshold when the dead time ends:
    // a second hit of 5 x 1000 samples, alone in its window
    cl(tb + 8, S7R, S7C, 5000);
    // S8
    tb = 20 + 7*GAP;  pulse(tb, ROWS - 3, 1, 20, 10, 5, 5);

    // expected VTP bit events: one cycle after the cluster is seen
    for (int kk = 0; kk < NCR; kk++)
      for (int t = 0; t < NCYC; t++) begin e0[kk][t] = 0; e3[kk][t] = 0; e4[kk][t] = 0; end
    foreach (exp_q[i]) begin
      k = exp_q[i].c / CC;
      if (exp_q[i].e >= 900) e0[k][exp_q[i].t + 1] = 1;
      if (exp_q[i].e > 500)  e3[k][exp_q[i].t + 1] = 1;
    end
    for (int kk = 0; kk < NCR; kk++)
      for (int t = 0; t < NCYC; t++) begin
        n = 0;
        foreach (exp_q[i])
          if (exp_q[i].c / CC == kk && exp_q[i].e > 500 &&
              exp_q[i].t + 1 <= t && exp_q[i].t + 1 > t - WID) n++;
        e4[kk][t] = n >= 2;
      end
    for (int kk = 0; kk < NCR; kk++)
      for (int t = 0; t < NCYC; t++) begin
        b0[kk][t] = 0; b3[kk][t] = 0; b4[kk][t] = 0;
        for (int p = t - WID + 1; p <= t; p++) if (p >= 0) begin
          b0[kk][t] |= e0[kk][p]; b3[kk][t] |= e3[kk][p]; b4[kk][t] |= e4[kk][p];
        end
      end

    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NCYC; p++) begin
      bit x1, x6, hit_any;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < NCOLS; c++) begin
          x = PED + extra[p][r][c];
          sample[r][c] = SAMPLE_W'((x > 4095) ? 4095 : x);
        end
      @(negedge clk);
      // cluster map
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < NCOLS; c++) begin
          hit_any = 0;
          foreach (exp_q[i])
            if (exp_q[i].t == p && exp_q[i].r == r && exp_q[i].c == c) begin
              hit_any = 1;
              checks++;
              if (!clusters[r][c].valid || int'(clusters[r][c].energy) != exp_q[i].e) begin
                failures++;
                $display("MISSING cluster t=%0d (%0d,%0d) exp %0d got v=%0d e=%0d", p, r, c,
                         exp_q[i].e, clusters[r][c].valid, clusters[r][c].energy);
              end else begin
                found[i]++;
                if (exp_q[i].e == 16383) n_sat++;
                if (exp_q[i].e == 1152) n_merge++;
                if (exp_q[i].e == 560 && c == 2 * CC - 1) n_halo++;
                if (exp_q[i].e == 800) n_dead++;
                if (exp_q[i].e == 1000) n_gain++;
              end
            end
          if (!hit_any && clusters[r][c].valid) begin
            failures++;
            $display("UNEXPECTED cluster t=%0d (%0d,%0d) e=%0d", p, r, c, clusters[r][c].energy);
          end
        end
      // VTP bits and V1495 outputs
      for (int kk = 0; kk < NCR; kk++) begin
        checks += 3;
        if (vtp_bit0[kk] !== b0[kk][p] || vtp_bit3[kk] !== b3[kk][p] || vtp_bit4[kk] !== b4[kk][p]) begin
          failures++;
          $display("VTP %0d bits at %0d: got %0d%0d%0d exp %0d%0d%0d", kk, p, vtp_bit0[kk],
                   vtp_bit3[kk], vtp_bit4[kk], b0[kk][p], b3[kk][p], b4[kk][p]);
        end
      end
      x1 = 0; x6 = 0;
      if (p > 0) begin
        n = 0;
        for (int kk = 0; kk < NCR; kk++) begin
          x1 |= b0[kk][p-1]; x6 |= b4[kk][p-1]; n += int'(b3[kk][p-1]);
        end
        if (n >= 2) x6 = 1;
        if (x6 && n >= 2 && ts6 && !(b4[0][p-1] | b4[1][p-1] | b4[2][p-1] | b4[3][p-1] | b4[4][p-1]))
          n_ts6_bit3++;
        if (x6 && n < 2 && ts6) n_ts6_bit4++;
      end
      checks += 2;
      if (ts1 !== x1 || ts6 !== x6) begin
        failures++;
        $display("TS at %0d: got %0d%0d exp %0d%0d", p, ts1, ts6, x1, x6);
      end
      if (ts1) n_ts1++;
    end
    foreach (found[i]) begin
      checks++;
      if (found[i] != 1) failures++;
    end
    // S8: nothing near (33,1) - covered by the UNEXPECTED check; count it
    n_below_seed = 1;
    $display("ts1_cycles=%0d ts6_by_bit3=%0d ts6_by_bit4=%0d halo=%0d merge=%0d dead_time=%0d saturation=%0d gain=%0d",
             n_ts1, n_ts6_bit3, n_ts6_bit4, n_halo, n_merge, n_dead, n_sat, n_gain);
    checks++; if (n_ts1 == 0) failures++;
    checks++; if (n_ts6_bit3 == 0) failures++;
    checks++; if (n_ts6_bit4 == 0) failures++;
    checks++; if (n_halo == 0) failures++;
    checks++; if (n_merge == 0) failures++;
    checks++; if (n_dead == 0) failures++;
    checks++; if (n_sat == 0) failures++;
    checks++; if (n_gain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
