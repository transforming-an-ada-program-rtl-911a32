// rip_datapath: the data path of the RIP chip.
//
// Holds the task's variables and the little arithmetic it needs: the TOS
// table (eight 8-bit words), the eight parameter registers, INITNUM.REG
// (4 bits, loaded from the INITNUM bus), the counters INITNUM.CTR (4 bits),
// REG.CTR, TOS.COL.CTR and TOS.ROW.CTR (3 bits each), and the equality
// comparators INITNUM.CTR = INITNUM.REG, TOS.COL.CTR = TOS.COL.REG,
// TOS.ROW.CTR = TOS.ROW.REG and REG.CTR = 111. REG.CTR selects both the
// parameter register and the TOS word, so one counter walks first the
// parameters and then the table.
//
// Every request from the control unit (ctrl) is answered by a DONE in stat,
// one clock later. Data reach the registers from dbus_in (the data bus as
// seen at the pads) and leave on dbus_out with dbus_oe high.
//
// The set of blocks, their widths and their connections follow the chip's
// block diagram; the synchronous handshake is this design's own.
module rip_datapath
  import rip_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  dp_ctrl_t                          ctrl,
  output dp_stat_t                          stat,
  input  logic [NIB_W-1:0]                  initnum_bus,
  input  logic [DATA_W-1:0]                 dbus_in,
  output logic [DATA_W-1:0]                 dbus_out,
  output logic                              dbus_oe,
  output params_t                           params,
  output logic [TOS_DEPTH-1:0][DATA_W-1:0]  tos_words,
  output logic [NIB_W-1:0]                  initnum_q,
  output logic [IDX_W-1:0]                  reg_idx
);

  logic [NIB_W-1:0]  ictr_q;
  logic [IDX_W-1:0]  col_q, row_q;
  logic [DATA_W-1:0] tos_dout, reg_dout;
  logic              tos_oe, reg_oe;
  logic [NIB_W-1:0]  init_dout_unused;
  logic              init_oe_unused;

  // INITNUM.REG: loaded from the INITNUM bus, never read onto the data bus
  st_register #(.W(NIB_W)) u_initnum_reg (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (ctrl.init_lod),
    .re   (1'b0),
    .din  (initnum_bus),
    .dout (init_dout_unused),
    .oe   (init_oe_unused),
    .done (stat.init_done),
    .q    (initnum_q)
  );

  st_counter #(.W(NIB_W)) u_initnum_ctr (
    .clk(clk), .rst_n(rst_n),
    .inc(ctrl.ictr_inc), .clr(ctrl.ictr_clr), .max(1'b0),
    .done(stat.ictr_done), .q(ictr_q)
  );

  st_counter #(.W(IDX_W)) u_reg_ctr (
    .clk(clk), .rst_n(rst_n),
    .inc(ctrl.rctr_inc), .clr(1'b0), .max(ctrl.rctr_max),
    .done(stat.rctr_done), .q(reg_idx)
  );

  st_counter #(.W(IDX_W)) u_col_ctr (
    .clk(clk), .rst_n(rst_n),
    .inc(ctrl.col_inc), .clr(1'b0), .max(ctrl.col_max),
    .done(stat.col_done), .q(col_q)
  );

  st_counter #(.W(IDX_W)) u_row_ctr (
    .clk(clk), .rst_n(rst_n),
    .inc(ctrl.row_inc), .clr(1'b0), .max(ctrl.row_max),
    .done(stat.row_done), .q(row_q)
  );

  tos_table u_tos (
    .clk  (clk),
    .rst_n(rst_n),
    .ena  (ctrl.tos_ena),
    .we   (ctrl.we),
    .re   (ctrl.re),
    .sel  (reg_idx),
    .din  (dbus_in),
    .dout (tos_dout),
    .oe   (tos_oe),
    .done (stat.tos_done),
    .words(tos_words)
  );

  param_regfile u_regs (
    .clk   (clk),
    .rst_n (rst_n),
    .ena   (ctrl.reg_ena),
    .we    (ctrl.we),
    .re    (ctrl.re),
    .sel   (reg_idx),
    .din   (dbus_in),
    .dout  (reg_dout),
    .oe    (reg_oe),
    .done  (stat.reg_done),
    .params(params)
  );

  eq_comparator #(.W(NIB_W)) u_initnum_eq (
    .a(ictr_q), .b(initnum_q), .eq(stat.initnum_eq)
  );

  eq_comparator #(.W(IDX_W)) u_rctr_eq7 (
    .a(reg_idx), .b('1), .eq(stat.rctr_eq7)
  );

  eq_comparator #(.W(IDX_W)) u_col_eq (
    .a(col_q), .b(params.tos_col), .eq(stat.col_eq)
  );

  eq_comparator #(.W(IDX_W)) u_row_eq (
    .a(row_q), .b(params.tos_row), .eq(stat.row_eq)
  );

  assign dbus_out = tos_dout | reg_dout;
  assign dbus_oe  = tos_oe | reg_oe;

endmodule
