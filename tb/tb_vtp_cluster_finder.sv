// tb_vtp_cluster_finder: self-checking test of the cluster finder.
//
// A 6 x 4 crate (6 x 6 with the halo columns) gets random sparse hits whose
// energies repeat often, so equal neighbouring seeds occur, plus planted
// patterns: two touching seeds (must merge into one cluster on the larger
// one) and two seeds two crystals apart with a lower hit between them (must
// stay two clusters that both count the middle hit). A reference model built
// from the whole hit record predicts every cluster word in every cycle,
// checking the W+2 cycle latency too. Two runs use nhit_min = 1 and 2.
module tb_vtp_cluster_finder;
  import nps_pkg::*;

  localparam int ROWS = 6, COLS = 4, GC = COLS + 2, W = 5;
  localparam int NCYC = 1500;

  logic clk = 1'b0, rst = 1'b1;
  vtp_cfg_t cfg = DEF_VTP_CFG;
  hit_t hits [ROWS][GC];
  cluster_t clusters [ROWS][COLS];

  vtp_cluster_finder #(.ROWS(ROWS), .COLS(COLS), .W(W)) dut (
    .clk(clk), .rst(rst), .cfg(cfg), .hits(hits), .clusters(clusters));

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int n_clusters = 0, n_not_max = 0, n_tie = 0, n_shared = 0, n_nhit_rej = 0;
  int n_halo_nb = 0;

  int he [NCYC][ROWS][GC];   // hit energy, 0 = no hit

  function automatic int hit_at(int t, int r, int c);
    if (t < 0 || t >= NCYC || r < 0 || r >= ROWS || c < 0 || c >= GC) return 0;
    return he[t][r][c];
  endfunction

  // Reference cluster at seed (t, r, c); c in halo'd coordinates.
  function automatic void ref_cluster(int t, int r, int c, int seed_thr, int nhit_min,
                                      output bit v, output int e, output int n);
    int es, q, tq;
    bit is_max;
    v = 0; e = 0; n = 0;
    es = hit_at(t, r, c);
    if (es == 0 || es <= seed_thr) return;
    is_max = 1;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++)
        for (tq = t - W; tq <= t + W; tq++) begin
          if (dr == 0 && dc == 0 && tq == t) continue;
          q = hit_at(tq, r + dr, c + dc);
          if (q == 0) continue;
          if (q > es) is_max = 0;
          else if (q == es) begin
            if (tq < t || (tq == t && (dr * GC + dc) < 0)) is_max = 0;
            n_tie++;
          end
        end
    if (!is_max) begin n_not_max++; return; end
    e = es; n = 1;
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        if (dr == 0 && dc == 0) continue;
        for (tq = t; tq <= t + W; tq++) begin
          q = hit_at(tq, r + dr, c + dc);
          if (q != 0) begin
            e += q; n++;
            if (c + dc == 0 || c + dc == GC - 1) n_halo_nb++;
          end
        end
      end
    if (n < nhit_min) begin n_nhit_rej++; e = 0; n = 0; return; end
    v = 1;
    if (e > 16383) e = 16383;
  endfunction

  task automatic make_hits();
    int x;
    for (int t = 0; t < NCYC; t++)
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < GC; c++) begin
          he[t][r][c] = 0;
          if ($urandom_range(0, 99) < 3) begin
            x = int'($urandom_range(0, 9));
            he[t][r][c] = (x < 3) ? 80 : (x < 4) ? 3000 : int'($urandom_range(11, 400));
          end
        end
    // planted patterns every 100 cycles in a quiet area
    for (int t = 50; t < NCYC - 50; t += 100) begin
      for (int dt = -8; dt <= 8; dt++)
        for (int r = 1; r <= 3; r++)
          for (int c = 1; c <= 5; c++) he[t+dt][r][c] = 0;
      // touching seeds 200 and 150 at (2,1),(2,2): one cluster
      he[t][2][1] = 200; he[t+1][2][2] = 150;
      // separated seeds at (2,3) and (2,5) with lower (2,4) between
      he[t][2][3] = 300; he[t+2][2][4] = 40; he[t+1][2][5] = 250;
      n_shared++;
    end
  endtask

  task automatic run(int nhit_min);
    bit v; int e, n, t;
    cfg.nhit_min = NHIT_W'(nhit_min);
    make_hits();
    @(negedge clk);
    rst = 1'b1;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < GC; c++) hits[r][c] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NCYC + W + 3; p++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < GC; c++) begin
          hits[r][c].valid  = (p < NCYC) && (he[p][r][c] != 0);
          hits[r][c].energy = (p < NCYC) ? HIT_E_W'(he[p][r][c]) : '0;
        end
      @(negedge clk);
      t = p - W - 1;
      if (t >= 0 && t < NCYC) begin
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            ref_cluster(t, r, c + 1, int'(cfg.seed_thr), nhit_min, v, e, n);
            checks++;
            if (clusters[r][c].valid !== v ||
                (v && (int'(clusters[r][c].energy) != e || int'(clusters[r][c].nhits) != n))) begin
              failures++;
              if (failures < 10)
                $display("MISMATCH t=%0d (%0d,%0d): got v=%0d e=%0d n=%0d exp v=%0d e=%0d n=%0d",
                         t, r, c, clusters[r][c].valid, clusters[r][c].energy,
                         clusters[r][c].nhits, v, e, n);
            end
            if (v) n_clusters++;
          end
      end
    end
  endtask

  initial begin
    run(1);
    run(2);
    $display("clusters=%0d not_local_max=%0d ties=%0d planted_shared=%0d nhit_rejects=%0d halo_neighbours=%0d",
             n_clusters, n_not_max, n_tie, n_shared, n_nhit_rej, n_halo_nb);
    checks++; if (n_clusters < 100) failures++;
    checks++; if (n_not_max == 0) failures++;
    checks++; if (n_tie == 0) failures++;
    checks++; if (n_nhit_rej == 0) failures++;
    checks++; if (n_halo_nb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
