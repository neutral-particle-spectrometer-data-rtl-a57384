// v1495_trigger: trigger combination in the single CAEN V1495 module.
//
// Inputs are bits 0, 3 and 4 of all NVTP crate VTPs.
//  * TS1 = OR of all Bit 0 inputs (any single cluster above the trigger
//    threshold anywhere in the detector).
//  * TS6 = (at least two Bit 3 inputs high in the same clock, i.e. clusters
//    above the pair threshold in two different crates) OR any Bit 4 input
//    (two such clusters in one crate).
// Both outputs are registered: they follow their inputs by one clock.
//
// Follows the document: the OR for TS1, the ">= 2 of Bit 3" count ORed
// with all Bit 4 inputs for TS6. This design's choice: the delay, which
// the document leaves open, is one register stage on both outputs.
module v1495_trigger #(
  parameter int unsigned NVTP = 5
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [NVTP-1:0] bit0,
  input  logic [NVTP-1:0] bit3,
  input  logic [NVTP-1:0] bit4,
  output logic            ts1,
  output logic            ts6
);

  logic [$clog2(NVTP+1)-1:0] n3;

  always_comb begin
    n3 = '0;
    for (int i = 0; i < NVTP; i++) n3 += $bits(n3)'(bit3[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ts1 <= 1'b0;
      ts6 <= 1'b0;
    end else begin
      ts1 <= |bit0;
      ts6 <= (n3 >= 2) || (|bit4);
    end
  end

endmodule
