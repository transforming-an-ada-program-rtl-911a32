// tos_table: the type-of-service (TOS) table of the RIP chip.
//
// Eight 8-bit self-timed registers, TOS[0] to TOS[7], behind the TOS table
// decoder and the TOS done multiplexer. While ena is high, the decoder sends
// the write request (we, one clock) or the read request (re, a level) to the
// register selected by sel, and the multiplexer returns that register's
// DONE. The read value appears on dout with oe high, for the data bus.
// Timing is that of st_register: DONE one clock after the request.
//
// The bank of eight 8-bit registers, the decoder, the done multiplexer and
// the 3-bit select come from the chip's block diagram; the sel input is
// driven by the register counter.
module tos_table
  import rip_pkg::*;
#(
  parameter int unsigned DEPTH = TOS_DEPTH,
  parameter int unsigned W     = DATA_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ena,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] sel,
  input  logic [W-1:0]             din,
  output logic [W-1:0]             dout,
  output logic                     oe,
  output logic                     done,
  output logic [DEPTH-1:0][W-1:0]  words
);

  logic [DEPTH-1:0]        word_we, word_re, word_oe, word_done;
  logic [DEPTH-1:0][W-1:0] word_dout;

  // TOS table decoder
  always_comb begin
    word_we = '0;
    word_re = '0;
    if (ena) begin
      word_we[sel] = we;
      word_re[sel] = re;
    end
  end

  for (genvar i = 0; i < DEPTH; i++) begin : g_word
    st_register #(.W(W)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .we   (word_we[i]),
      .re   (word_re[i]),
      .din  (din),
      .dout (word_dout[i]),
      .oe   (word_oe[i]),
      .done (word_done[i]),
      .q    (words[i])
    );
  end

  // TOS done multiplexer and the wired bus drivers
  always_comb begin
    done = ena & word_done[sel];
    oe   = |word_oe;
    dout = '0;
    for (int i = 0; i < DEPTH; i++) dout |= word_dout[i];
  end

endmodule
