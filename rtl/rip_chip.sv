// rip_chip: the RIP (Read_Init_Parameters) chip, a small "smart store" for
// the initialization parameters of the outbound half of an Internet
// Protocol module.
//
// The chip is the hardware form of one task with two entries, Go and
// Srv_req, which itself calls the memory module's Out_request entry. Each
// entry call is a request/acknowledge channel:
//   Go       from Inm_Out: go_req, initnum (4 bits, held with go_req),
//            answered by go_ack with go_bad (1 = bad_srv_command, the TOS
//            table did not fit; 0 = send_ok).
//   Srv_req  from Inm_Srv: srv_req with an address chunk on srv_chunk,
//            answered by srv_ack once the memory has taken the chunk.
//   Memory   to the memory module: mem_req with mem_op, answered by mem_ack.
//            Address chunks go out on mem_chunk, which are the srv_chunk
//            wires themselves (the chunk is not latched: the server holds it
//            until srv_ack). Octets travel on the 8-bit bidirectional data
//            bus, given here as dbus_in (the value at the pads), dbus_out and
//            its enable dbus_oe.
// All channels are four-phase. Go with INITNUM > 0 (NORMAL) forwards
// INITNUM chunks, then loads eight parameter octets and the TOS table from
// the memory; Go with INITNUM = 0 (TEST) sends the stored parameters and
// table back to the memory. See rip_control for the sequence.
//
// state_onehot, test_mode, params, tos_words, initnum_q (INITNUM.REG) and
// reg_idx (REG.CTR) bring the chip's state
// variables out for observation, as the chip brought them to pads.
//
// The partition into datapath and control unit, the blocks and the bus
// widths are the chip's. The chip was speed-independent (no clock); this
// model is synchronous to clk with an asynchronous active-low reset, which
// is this design's own choice, as is the split of the bidirectional bus
// into in/out/enable.
module rip_chip
  import rip_pkg::*;
#(
  parameter int unsigned PAD_STABLE_CLKS = 2
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // Go
  input  logic                              go_req,
  input  logic [NIB_W-1:0]                  initnum,
  output logic                              go_ack,
  output logic                              go_bad,
  // Srv_req
  input  logic                              srv_req,
  input  logic [NIB_W-1:0]                  srv_chunk,
  output logic                              srv_ack,
  // Memory.Out_request
  output logic                              mem_req,
  output mem_op_e                           mem_op,
  output logic [NIB_W-1:0]                  mem_chunk,
  input  logic                              mem_ack,
  input  logic [DATA_W-1:0]                 dbus_in,
  output logic [DATA_W-1:0]                 dbus_out,
  output logic                              dbus_oe,
  // observation
  output logic [19:0]                       state_onehot,
  output logic                              test_mode,
  output params_t                           params,
  output logic [TOS_DEPTH-1:0][DATA_W-1:0]  tos_words,
  output logic [NIB_W-1:0]                  initnum_q,
  output logic [IDX_W-1:0]                  reg_idx
);

  dp_ctrl_t         ctrl;
  dp_stat_t         stat;
  logic             pad_stable;

  rip_control u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .go_req      (go_req),
    .go_ack      (go_ack),
    .go_bad      (go_bad),
    .srv_req     (srv_req),
    .srv_ack     (srv_ack),
    .mem_req     (mem_req),
    .mem_op      (mem_op),
    .mem_ack     (mem_ack),
    .pad_stable  (pad_stable),
    .ctrl        (ctrl),
    .stat        (stat),
    .state_onehot(state_onehot),
    .test_mode   (test_mode)
  );

  rip_datapath u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .ctrl       (ctrl),
    .stat       (stat),
    .initnum_bus(initnum),
    .dbus_in    (dbus_in),
    .dbus_out   (dbus_out),
    .dbus_oe    (dbus_oe),
    .params     (params),
    .tos_words  (tos_words),
    .initnum_q  (initnum_q),
    .reg_idx    (reg_idx)
  );

  out_pad_sense #(.W(DATA_W), .STABLE_CLKS(PAD_STABLE_CLKS)) u_pad_sense (
    .clk   (clk),
    .rst_n (rst_n),
    .drive (dbus_oe),
    .pad_in(dbus_in),
    .stable(pad_stable)
  );

  // address chunks are forwarded unlatched
  assign mem_chunk = srv_chunk;

endmodule
