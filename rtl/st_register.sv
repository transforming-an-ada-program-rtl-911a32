// st_register: one self-timed register of the RIP chip.
//
// Every variable of the task is held in a register of this kind: the TOS
// table words, the parameter registers and INITNUM.REG. A write request
// (we, one clock wide) loads din and is answered one clock later by a
// one-clock DONE pulse. A read request (re, a level) puts the contents on
// the register's bus driver (dout with oe) and DONE stays high, one clock
// behind re, for as long as the value is driven. q always shows the
// contents, which is what the comparators look at.
//
// The chip built this as a speed-independent latch with request and
// acknowledge circuitry; here the handshake is synchronous, with DONE one
// clock after the request, which is this design's own choice. Reset clears
// the contents.
module st_register #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,     // write request (pulse)
  input  logic         re,     // read request (level)
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,   // bus driver value, zero when not driving
  output logic         oe,     // bus driver enabled
  output logic         done,   // completion
  output logic [W-1:0] q
);

  logic we_d, re_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      we_d <= 1'b0;
      re_d <= 1'b0;
    end else begin
      if (we) q <= din;
      we_d <= we;
      re_d <= re;
    end
  end

  assign oe   = re;
  assign dout = re ? q : '0;
  assign done = we_d | re_d;

endmodule
