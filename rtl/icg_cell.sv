// icg_cell: integrated clock-gating cell.
//
// The gated clock follows clk_in while `en` is set and stays low while it is
// clear. The enable is captured by a latch that is transparent while clk_in is
// low, so an enable that changes while the clock is high takes effect only
// from the next rising edge and never shortens a pulse. The design gates its
// clock with a plain AND of clock and enable; the latch in front of the AND is
// this implementation's addition (the usual integrated clock-gating form).
//
// Timing: `en` must be stable before the rising edge of clk_in it should
// pass or block. The latch is intended and is the only storage in the cell.
module icg_cell (
  input  logic clk_in,
  input  logic en,
  output logic clk_out
);

  logic en_lat;

  always_latch begin
    if (!clk_in) en_lat = en;
  end

  assign clk_out = clk_in & en_lat;

endmodule
