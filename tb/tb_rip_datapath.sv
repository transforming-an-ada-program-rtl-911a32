// tb_rip_datapath: drives the datapath's request lines directly, as the
// control unit would, and checks: INITNUM.REG loading and the
// INITNUM.CTR = INITNUM.REG comparison; REG.CTR preset, increment and the
// "= 111" detector; parameter and TOS writes from the data bus through the
// shared REG.CTR index, with each bank only written when enabled; reads onto
// the data bus; and the column and row comparators against the stored
// TOS.COL.REG and TOS.ROW.REG. Every request must be answered by its DONE
// one clock later.
module tb_rip_datapath;
  import rip_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  dp_ctrl_t ctrl = '0;
  dp_stat_t stat;
  logic [NIB_W-1:0] initnum_bus = '0, initnum_q;
  logic [DATA_W-1:0] dbus_in = '0, dbus_out;
  logic dbus_oe;
  params_t params;
  logic [TOS_DEPTH-1:0][DATA_W-1:0] tos_words;
  logic [IDX_W-1:0] reg_idx;
  int checks = 0, failures = 0;

  rip_datapath dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // issue a one-clock request and check that `which` DONE answers it
  task automatic pulse(input dp_ctrl_t c, input int which);
    dp_stat_t s;
    ctrl = c;
    @(posedge clk); #1;
    ctrl = ctrl & dp_ctrl_t'({2'b00, 2'b11, 2'b00});   // keep reg_ena/tos_ena only
    s = stat;
    check(s[which], $sformatf("DONE bit %0d after request", which));
    @(posedge clk); #1;
  endtask

  // bit positions in dp_stat_t (MSB first: init_done .. row_eq)
  localparam int D_INIT = 10, D_ICTR = 9, D_RCTR = 8, D_COL = 7, D_ROW = 6, D_REG = 5, D_TOS = 4;

  dp_ctrl_t c;
  logic [7:0] img [16];
  int rows_m1, cols_m1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 20; t++) begin
      int n;
      n = $urandom % 16;
      // INITNUM
      initnum_bus = 4'(n);
      c = '0; c.init_lod = 1; pulse(c, D_INIT);
      check(initnum_q == 4'(n), "INITNUM.REG loaded");
      initnum_bus = 4'(n + 3);
      c = '0; c.ictr_clr = 1; pulse(c, D_ICTR);
      check(stat.initnum_eq == (n == 0), "INITNUM compare after clear");
      for (int i = 1; i <= n; i++) begin
        c = '0; c.ictr_inc = 1; pulse(c, D_ICTR);
        check(stat.initnum_eq == (i == n), $sformatf("INITNUM compare at %0d of %0d", i, n));
      end
      // parameters
      rows_m1 = $urandom % 8;
      cols_m1 = $urandom % 8;
      for (int k = 0; k < 16; k++) img[k] = 8'($urandom);
      img[6] = {img[6][7:3], 3'(cols_m1)};
      img[7] = {img[7][7:3], 3'(rows_m1)};
      c = '0; c.rctr_max = 1; pulse(c, D_RCTR);
      check(reg_idx == 3'd7 && stat.rctr_eq7, "REG.CTR preset to 111");
      for (int k = 0; k < 8; k++) begin
        c = '0; c.rctr_inc = 1; pulse(c, D_RCTR);
        check(reg_idx == 3'(k), "REG.CTR index");
        check(stat.rctr_eq7 == (k == 7), "REG.CTR = 111 detector");
        dbus_in = img[k];
        c = '0; c.reg_ena = 1; c.we = 1; pulse(c, D_REG);
        ctrl = '0;
      end
      check(params.max_packet_lo == img[0] && params.max_packet_hi == img[1]
            && params.addr_length == img[2] && params.timeout_lo == img[3]
            && params.timeout_hi == img[4] && params.ack_type == img[5][0]
            && params.tos_col == img[6][2:0] && params.tos_row == img[7][2:0], "parameters written");
      // TOS words: REG.CTR wraps from 7 to 0
      for (int k = 0; k < 8; k++) begin
        c = '0; c.rctr_inc = 1; pulse(c, D_RCTR);
        dbus_in = img[8 + k];
        c = '0; c.tos_ena = 1; c.we = 1; pulse(c, D_TOS);
        ctrl = '0;
      end
      for (int k = 0; k < 8; k++) check(tos_words[k] == img[8 + k], "TOS word written");
      check(params.max_packet_lo == img[0], "TOS writes leave the registers alone");
      // read back over the bus
      for (int k = 0; k < 8; k++) begin
        c = '0; c.rctr_inc = 1; pulse(c, D_RCTR);
        c = '0; c.reg_ena = 1; c.re = 1;
        ctrl = c;
        @(posedge clk); #1;
        check(stat.reg_done && dbus_oe && dbus_out == (img[k] & (k == 5 ? 8'h01 : (k >= 6 ? 8'h07 : 8'hFF))),
              $sformatf("register %0d read", k));
        ctrl = '0;
        @(posedge clk); #1;
        check(!dbus_oe, "bus released");
      end
      // column and row comparators
      c = '0; c.col_max = 1; pulse(c, D_COL);
      c = '0; c.row_max = 1; pulse(c, D_ROW);
      check(stat.col_eq == (cols_m1 == 7) && stat.row_eq == (rows_m1 == 7), "compare at -1");
      for (int i = 0; i < 8; i++) begin
        c = '0; c.col_inc = 1; pulse(c, D_COL);
        c = '0; c.row_inc = 1; pulse(c, D_ROW);
        check(stat.col_eq == (i == cols_m1), $sformatf("column compare %0d vs %0d", i, cols_m1));
        check(stat.row_eq == (i == rows_m1), $sformatf("row compare %0d vs %0d", i, rows_m1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
