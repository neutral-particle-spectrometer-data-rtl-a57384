// vtp: the trigger logic of one crate's VTP module.
//
// The VTP gathers the Hit streams of all FADC250 channels of its crate,
// plus one column of channels from each neighbouring crate, finds clusters
// in them (vtp_cluster_finder) and turns the cluster stream into its three
// output bits (vtp_trigger).
//
// Interface: hits[ROWS][COLS+2] (own COLS columns in the middle, halo
// columns at index 0 and COLS+1), cfg; out: the cluster stream and bits
// 0, 3 and 4.
// Timing: a seed hit in cycle c makes its cluster in cycle c+W+2 and the
// output bits rise in cycle c+W+3.
//
// Follows the document in function; the one-column halo is this design's
// reading of "select channels from adjacent crates".
module vtp
  import nps_pkg::*;
#(
  parameter int unsigned ROWS       = 36,
  parameter int unsigned COLS       = 6,
  parameter int unsigned HIT_DT     = 5,
  parameter int unsigned TRIG_WIDTH = 5,
  parameter int unsigned PAIR_WIDTH = 5
) (
  input  logic     clk,
  input  logic     rst,
  input  vtp_cfg_t cfg,
  input  hit_t     hits     [ROWS][COLS+2],
  output cluster_t clusters [ROWS][COLS],
  output logic     bit0,
  output logic     bit3,
  output logic     bit4
);

  vtp_cluster_finder #(.ROWS(ROWS), .COLS(COLS), .W(HIT_DT)) u_clus (
    .clk     (clk),
    .rst     (rst),
    .cfg     (cfg),
    .hits    (hits),
    .clusters(clusters)
  );

  vtp_trigger #(
    .ROWS(ROWS), .COLS(COLS), .TRIG_WIDTH(TRIG_WIDTH), .PAIR_WIDTH(PAIR_WIDTH)
  ) u_trig (
    .clk     (clk),
    .rst     (rst),
    .cfg     (cfg),
    .clusters(clusters),
    .bit0    (bit0),
    .bit3    (bit3),
    .bit4    (bit4)
  );

endmodule
