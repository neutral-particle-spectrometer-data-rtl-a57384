// tb_vtp: directed end-to-end test of one crate's VTP.
//
// A 4 x 3 crate (plus halo columns) receives planted hit patterns, 40
// cycles apart, whose clusters were worked out by hand:
//   A  seed 950 + neighbour 30 two cycles later -> one cluster 980:
//      Bit 0 and Bit 3, no Bit 4.
//   B  seed 450 + two neighbours of 40 and 30 -> cluster 520: Bit 3 only,
//      reached only thanks to the neighbour sum.
//   C  two separated seeds 600 and 700, three cycles apart -> Bit 3 and
//      Bit 4.
//   D  touching seeds 600 and 550 -> merged into one cluster 1150 on the
//      600 seed: Bit 0 and Bit 3 but no Bit 4.
//   E  seed 400 + halo-column neighbour 200 -> cluster 600: Bit 3.
//   F  two seeds 600 and 650 seven cycles apart -> Bit 3 twice, no Bit 4.
// Every cycle the three bits are compared with the timeline these
// clusters imply (cluster W+1 cycles after its seed, bits one cycle
// later, 5 cycles wide) and each cluster word is checked at its seed.
module tb_vtp;
  import nps_pkg::*;

  localparam int ROWS = 4, COLS = 3, GC = COLS + 2, W = 5, PW = 5, TW = 5;
  localparam int NSC = 6, GAP = 40, NCYC = NSC * GAP + 20;

  logic clk = 1'b0, rst = 1'b1;
  vtp_cfg_t cfg = DEF_VTP_CFG;
  hit_t hits [ROWS][GC];
  cluster_t clusters [ROWS][COLS];
  logic bit0, bit3, bit4;

  vtp #(.ROWS(ROWS), .COLS(COLS), .HIT_DT(W), .TRIG_WIDTH(TW), .PAIR_WIDTH(PW)) dut (
    .clk(clk), .rst(rst), .cfg(cfg), .hits(hits), .clusters(clusters),
    .bit0(bit0), .bit3(bit3), .bit4(bit4));

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int he [NCYC][ROWS][GC];
  int cl_e [NCYC][ROWS][COLS];     // expected cluster energy at seed time
  bit ev0 [NCYC], ev3 [NCYC], ev4 [NCYC];
  int seen0 = 0, seen3 = 0, seen4 = 0;

  task automatic put(int t, int r, int c, int e);   // c: halo'd column
    he[t][r][c] = e;
  endtask
  task automatic expect_cluster(int t, int r, int c, int e);  // c: own column
    cl_e[t][r][c] = e;
  endtask

  initial begin
    int t0, np, cnt;
    bit b0, b3, b4, any;
    for (int t = 0; t < NCYC; t++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < GC; c++) he[t][r][c] = 0;
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) cl_e[t][r][c] = 0;
    end
    // A
    t0 = 10;          put(t0, 1, 2, 950); put(t0 + 2, 2, 2, 30);
    expect_cluster(t0, 1, 1, 980);
    // B
    t0 = 10 + GAP;    put(t0, 2, 2, 450); put(t0, 1, 1, 40); put(t0 + 4, 3, 3, 30);
    expect_cluster(t0, 2, 1, 520);
    // C
    t0 = 10 + 2*GAP;  put(t0, 0, 1, 600); put(t0 + 3, 3, 3, 700);
    expect_cluster(t0, 0, 0, 600); expect_cluster(t0 + 3, 3, 2, 700);
    // D
    t0 = 10 + 3*GAP;  put(t0, 1, 2, 600); put(t0 + 1, 1, 3, 550);
    expect_cluster(t0, 1, 1, 1150);
    // E
    t0 = 10 + 4*GAP;  put(t0, 2, 1, 400); put(t0 + 1, 2, 0, 200);
    expect_cluster(t0, 2, 0, 600);
    // F
    t0 = 10 + 5*GAP;  put(t0, 0, 3, 600); put(t0 + 7, 3, 1, 650);
    expect_cluster(t0, 0, 2, 600); expect_cluster(t0 + 7, 3, 0, 650);

    // trigger events: a cluster is on the stream W+1 cycles after its seed
    // and is registered into the output bits one cycle later
    for (int t = 0; t < NCYC; t++) begin ev0[t] = 0; ev3[t] = 0; ev4[t] = 0; end
    for (int t = 0; t + W + 2 < NCYC; t++)
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
        if (cl_e[t][r][c] >= 900) ev0[t + W + 2] = 1;
        if (cl_e[t][r][c] > 500) ev3[t + W + 2] = 1;
      end
    for (int t = 0; t < NCYC; t++) begin
      cnt = 0;
      for (int p = t - PW + 1; p <= t; p++)
        if (p - W - 2 >= 0)
          for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++)
            if (cl_e[p - W - 2][r][c] > 500) cnt++;
      ev4[t] = cnt >= 2;
    end

    for (int r = 0; r < ROWS; r++) for (int c = 0; c < GC; c++) hits[r][c] = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NCYC; p++) begin
      for (int r = 0; r < ROWS; r++) for (int c = 0; c < GC; c++) begin
        hits[r][c].valid  = he[p][r][c] != 0;
        hits[r][c].energy = HIT_E_W'(he[p][r][c]);
      end
      @(negedge clk);
      // cluster words of seeds at p - W - 1
      if (p - W - 1 >= 0)
        for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
          checks++;
          any = cl_e[p - W - 1][r][c] != 0;
          if (clusters[r][c].valid !== any ||
              (any && int'(clusters[r][c].energy) != cl_e[p - W - 1][r][c])) begin
            failures++;
            $display("CLUSTER MISMATCH seed t=%0d (%0d,%0d): got %0d/%0d exp %0d",
                     p - W - 1, r, c, clusters[r][c].valid, clusters[r][c].energy,
                     cl_e[p - W - 1][r][c]);
          end
        end
      b0 = 0; b3 = 0; b4 = 0;
      for (int q = p - TW + 1; q <= p; q++) if (q >= 0) begin
        b0 |= ev0[q]; b3 |= ev3[q]; b4 |= ev4[q];
      end
      checks += 3;
      if (bit0 !== b0 || bit3 !== b3 || bit4 !== b4) begin
        failures++;
        $display("BIT MISMATCH cycle %0d: got %0d%0d%0d exp %0d%0d%0d", p, bit0, bit3, bit4, b0, b3, b4);
      end
      seen0 += int'(bit0); seen3 += int'(bit3); seen4 += int'(bit4);
    end
    checks++; if (seen0 != 2 * TW) failures++;   // scenarios A and D
    checks++; if (seen4 == 0) failures++;          // scenario C
    $display("bit0_cycles=%0d bit3_cycles=%0d bit4_cycles=%0d", seen0, seen3, seen4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
