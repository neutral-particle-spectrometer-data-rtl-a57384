// tb_vtp_trigger: self-checking test of the VTP output bit logic.
//
// Random sparse cluster words on a 3 x 2 crate, with energies that often
// sit exactly on the thresholds (900 for Bit 0, 500 for the pair bits) to
// check >= against >. The reference model derives each bit from the
// whole input record: Bit 0 is high in cycle q when a cluster >= 900
// arrived in cycles q-4 .. q, Bit 3 likewise for a cluster > 500, Bit 4
// when in some cycle p in q-4 .. q the clusters > 500 of cycles p-4 .. p
// numbered two or more. This checks widths and the one-cycle latency.
module tb_vtp_trigger;
  import nps_pkg::*;

  localparam int ROWS = 3, COLS = 2, TW = 5, PW = 5, B3W = 5;
  localparam int NCYC = 4000;

  logic clk = 1'b0, rst = 1'b1;
  vtp_cfg_t cfg = DEF_VTP_CFG;
  cluster_t clusters [ROWS][COLS];
  logic bit0, bit3, bit4;

  vtp_trigger #(.ROWS(ROWS), .COLS(COLS), .TRIG_WIDTH(TW), .PAIR_WIDTH(PW)) dut (
    .clk(clk), .rst(rst), .cfg(cfg), .clusters(clusters),
    .bit0(bit0), .bit3(bit3), .bit4(bit4));

  always #2 clk = ~clk;

  int checks = 0, failures = 0;
  int n_b0 = 0, n_b3 = 0, n_b4 = 0, n_same_cycle_pair = 0, n_spread_pair = 0;
  int ce [NCYC][ROWS][COLS];
  bit trig [NCYC];
  int npair [NCYC];
  bit pairev [NCYC];

  function automatic bit recent(ref bit ev [NCYC], input int q, input int w);
    for (int p = q - w + 1; p <= q; p++) if (p >= 0 && ev[p]) return 1;
    return 0;
  endfunction

  initial begin
    int x, s;
    bit e0, e3, e4;
    bit p3 [NCYC];
    for (int t = 0; t < NCYC; t++) begin
      trig[t] = 0; npair[t] = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          ce[t][r][c] = 0;
          if ($urandom_range(0, 99) < 2) begin
            x = int'($urandom_range(0, 5));
            ce[t][r][c] = (x == 0) ? 900 : (x == 1) ? 899 : (x == 2) ? 500 : (x == 3) ? 501
                        : int'($urandom_range(51, 2000));
          end
          if (ce[t][r][c] >= 900) trig[t] = 1;
          if (ce[t][r][c] > 500) npair[t]++;
        end
      p3[t] = npair[t] > 0;
      s = 0;
      for (int p = t - PW + 1; p <= t; p++) if (p >= 0) s += npair[p];
      pairev[t] = s >= 2;
      if (npair[t] >= 2) n_same_cycle_pair++;
      else if (pairev[t]) n_spread_pair++;
    end

    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int p = 0; p < NCYC; p++) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          clusters[r][c].valid  = ce[p][r][c] != 0;
          clusters[r][c].energy = CLUS_E_W'(ce[p][r][c]);
          clusters[r][c].nhits  = (ce[p][r][c] != 0) ? NHIT_W'(3) : '0;
        end
      @(negedge clk);
      e0 = recent(trig, p, TW);
      e3 = recent(p3, p, B3W);
      e4 = recent(pairev, p, PW);
      checks += 3;
      if (bit0 !== e0) failures++;
      if (bit3 !== e3) failures++;
      if (bit4 !== e4) failures++;
      if ((bit0 !== e0 || bit3 !== e3 || bit4 !== e4) && failures < 10)
        $display("MISMATCH cycle %0d: got %0d%0d%0d exp %0d%0d%0d", p, bit0, bit3, bit4, e0, e3, e4);
      if (bit0) n_b0++;
      if (bit3) n_b3++;
      if (bit4) n_b4++;
    end
    $display("bit0_cycles=%0d bit3_cycles=%0d bit4_cycles=%0d same_cycle_pairs=%0d spread_pairs=%0d",
             n_b0, n_b3, n_b4, n_same_cycle_pair, n_spread_pair);
    checks++; if (n_b0 == 0) failures++;
    checks++; if (n_b4 == 0) failures++;
    checks++; if (n_same_cycle_pair == 0) failures++;
    checks++; if (n_spread_pair == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) clusters[r][c] = '0;
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
