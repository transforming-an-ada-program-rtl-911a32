// param_regfile: the eight parameter registers of the RIP chip.
//
// MAX-PACKET-LO, MAX-PACKET-HI, ADDR-LENGTH, TIMEOUT-LO, TIMEOUT-HI (8 bits
// each), ACK-TYPE (1 bit), TOS.COL.REG and TOS.ROW.REG (3 bits each), with
// the register decoder and the register done multiplexer. sel is the
// register counter and picks the register in the order the task reads the
// parameters (see rip_pkg::param_idx_e). While ena is high, a write request
// (we, one clock) loads the low bits of din into the selected register and a
// read request (re, a level) drives it, zero-extended, onto dout with oe
// high. DONE comes back one clock after the request.
//
// The register list, their widths and the decoder/done-mux arrangement are
// the chip's; that a narrow register keeps the low bits of the octet is
// this design's own choice. params shows every register, and tos_col and
// tos_row feed the column and row comparators.
module param_regfile
  import rip_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ena,
  input  logic              we,
  input  logic              re,
  input  logic [IDX_W-1:0]  sel,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout,
  output logic              oe,
  output logic              done,
  output params_t           params
);

  // width of each register, by index
  localparam int unsigned REG_W [NUM_PARAM] = '{8, 8, 8, 8, 8, 1, 3, 3};

  logic [NUM_PARAM-1:0]             r_we, r_re, r_oe, r_done;
  logic [NUM_PARAM-1:0][DATA_W-1:0] r_dout;   // zero-extended
  logic [NUM_PARAM-1:0][DATA_W-1:0] r_q;      // zero-extended

  // register decoder
  always_comb begin
    r_we = '0;
    r_re = '0;
    if (ena) begin
      r_we[sel] = we;
      r_re[sel] = re;
    end
  end

  for (genvar i = 0; i < NUM_PARAM; i++) begin : g_reg
    localparam int unsigned RW = REG_W[i];
    logic [RW-1:0] dout_n, q_n;
    st_register #(.W(RW)) u_reg (
      .clk  (clk),
      .rst_n(rst_n),
      .we   (r_we[i]),
      .re   (r_re[i]),
      .din  (din[RW-1:0]),
      .dout (dout_n),
      .oe   (r_oe[i]),
      .done (r_done[i]),
      .q    (q_n)
    );
    assign r_dout[i] = DATA_W'(dout_n);
    assign r_q[i]    = DATA_W'(q_n);
  end

  // register done multiplexer and the wired bus drivers
  always_comb begin
    done = ena & r_done[sel];
    oe   = |r_oe;
    dout = '0;
    for (int i = 0; i < NUM_PARAM; i++) dout |= r_dout[i];
  end

  always_comb begin
    params.max_packet_lo = r_q[P_MAX_PACKET_LO];
    params.max_packet_hi = r_q[P_MAX_PACKET_HI];
    params.addr_length   = r_q[P_ADDR_LENGTH];
    params.timeout_lo    = r_q[P_TIMEOUT_LO];
    params.timeout_hi    = r_q[P_TIMEOUT_HI];
    params.ack_type      = r_q[P_ACK_TYPE][0];
    params.tos_col       = r_q[P_TOS_COL][IDX_W-1:0];
    params.tos_row       = r_q[P_TOS_ROW][IDX_W-1:0];
  end

endmodule
