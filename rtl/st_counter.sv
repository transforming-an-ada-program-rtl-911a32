// st_counter: self-timed up-counter (REG.CTR, TOS.COL.CTR, TOS.ROW.CTR and
// INITNUM.CTR of the RIP chip).
//
// Three one-clock requests: inc adds one (wrapping), clr loads zero and max
// loads all ones. All ones plays the part of the value -1 from which the
// task's loops start ("index := -1; ... index := index + 1"), so a preset
// to max followed by inc gives 0. Each request is answered one clock later
// by a one-clock DONE pulse. If several requests arrive together, clr wins
// over max and max over inc.
//
// The increment, clear and preset requests are the ones printed next to the
// counters in the block diagram; that "max" presets to all ones, the
// priority and the one-clock DONE are this design's own reading.
module st_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         clr,
  input  logic         max,
  output logic         done,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      done <= 1'b0;
    end else begin
      if (clr)      q <= '0;
      else if (max) q <= '1;
      else if (inc) q <= q + 1'b1;
      done <= inc | clr | max;
    end
  end

endmodule
