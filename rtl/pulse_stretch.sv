// pulse_stretch: retriggerable output pulse of fixed width.
//
// An event in cycle c drives `pulse` high in cycles c+1 .. c+WIDTH. A new
// event while the pulse is high restarts the count, so the pulse ends
// WIDTH cycles after the last event. Used for the fixed-width output bits
// of the VTP.
module pulse_stretch #(
  parameter int unsigned WIDTH = 5
) (
  input  logic clk,
  input  logic rst,
  input  logic event_in,
  output logic pulse
);

  localparam int unsigned CW = $clog2(WIDTH + 1);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)              cnt <= '0;
    else if (event_in)    cnt <= CW'(WIDTH);
    else if (cnt != '0)   cnt <= cnt - 1'b1;
  end

  assign pulse = (cnt != '0);

endmodule
