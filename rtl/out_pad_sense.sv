// out_pad_sense: decides when a value the chip drives off-chip has settled.
//
// The chip samples its own output pads through a hysteresis inverter and
// takes the outside world to be stable when that sample is stable; only
// then does it ask the memory to take the data. Here pad_in is the sampled
// pad value and drive is high while the chip drives the pads. stable rises
// once drive has been high and pad_in unchanged for STABLE_CLKS consecutive
// clocks; it falls at once when drive falls or pad_in changes.
//
// The idea of waiting for a stable pad sample is the chip's; the count of
// STABLE_CLKS clocks is this design's own way of saying "stable" in a
// clocked circuit.
module out_pad_sense #(
  parameter int unsigned W           = 8,
  parameter int unsigned STABLE_CLKS = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         drive,
  input  logic [W-1:0] pad_in,
  output logic         stable
);

  localparam int unsigned CW = $clog2(STABLE_CLKS + 1);

  logic [W-1:0]  sample;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample <= '0;
      cnt    <= '0;
    end else begin
      sample <= pad_in;
      if (!drive || pad_in != sample) cnt <= '0;
      else if (cnt != CW'(STABLE_CLKS)) cnt <= cnt + 1'b1;
    end
  end

  assign stable = drive && (pad_in == sample) && (cnt == CW'(STABLE_CLKS));

endmodule
