// tb_v1495_trigger: exhaustive self-checking test of the V1495 logic.
//
// All 2^15 combinations of the five crates' Bit 0, Bit 3 and Bit 4 inputs
// are applied one per clock; TS1 must be the OR of the Bit 0 inputs and
// TS6 must be (two or more Bit 3 inputs) OR any Bit 4 input, one clock
// later.
module tb_v1495_trigger;

  localparam int NVTP = 5;

  logic clk = 1'b0, rst = 1'b1;
  logic [NVTP-1:0] bit0 = '0, bit3 = '0, bit4 = '0;
  logic ts1, ts6;

  v1495_trigger #(.NVTP(NVTP)) dut (
    .clk(clk), .rst(rst), .bit0(bit0), .bit3(bit3), .bit4(bit4), .ts1(ts1), .ts6(ts6));

  always #2 clk = ~clk;

  int checks = 0, failures = 0, n_ts6_from_bit3 = 0, n_ts6_from_bit4 = 0;

  initial begin
    bit e1, e6;
    int n3;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int v = 0; v < (1 << (3 * NVTP)); v++) begin
      {bit4, bit3, bit0} = 15'(v);
      n3 = 0;
      for (int i = 0; i < NVTP; i++) if (bit3[i]) n3++;
      e1 = bit0 != 0;
      e6 = (n3 > 1) || (bit4 != 0);
      @(negedge clk);
      checks += 2;
      if (ts1 !== e1 || ts6 !== e6) begin
        failures++;
        if (failures < 10) $display("MISMATCH in=%h got %0d%0d exp %0d%0d", v, ts1, ts6, e1, e6);
      end
      if (n3 > 1 && bit4 == 0 && ts6) n_ts6_from_bit3++;
      if (n3 < 2 && bit4 != 0 && ts6) n_ts6_from_bit4++;
    end
    checks++; if (n_ts6_from_bit3 == 0 || n_ts6_from_bit4 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
