// tb_rip_control: tests the control unit on its own. The datapath is
// replaced by a behavioural model written here (counters, INITNUM register,
// parameter registers and TOS words, each request answered by DONE one clock
// later, or after a random delay for the pad-settling signal), and the
// testbench plays Inm_Out, Inm_Srv and the memory. For a range of INITNUM
// values and table shapes it checks the Go response, the number and order
// of memory requests (INITNUM LOAD_ADDRESS requests, then 8 + min(entries,
// 8) octet transfers), the mode, the values moved, and that SEND requests
// wait for pad_stable.
module tb_rip_control;
  import rip_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic go_req = 1'b0, go_ack, go_bad, srv_req = 1'b0, srv_ack;
  logic mem_req, mem_ack = 1'b0, pad_stable = 1'b0, test_mode;
  mem_op_e mem_op;
  dp_ctrl_t ctrl;
  dp_stat_t stat;
  logic [19:0] state_onehot;
  int checks = 0, failures = 0;

  rip_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------- behavioural datapath ----------
  logic [3:0] m_init, m_ictr, initnum = '0;
  logic [2:0] m_rctr, m_col, m_row;
  logic [7:0] m_reg [8];
  logic [7:0] m_tos [8];
  logic [7:0] mem_data = '0;
  logic [7:0] drv;
  logic       re_d, we_d;
  logic [6:0] done_r;

  always_ff @(posedge clk) begin
    if (ctrl.init_lod) m_init <= initnum;
    if (ctrl.ictr_clr) m_ictr <= '0; else if (ctrl.ictr_inc) m_ictr <= m_ictr + 1'b1;
    if (ctrl.rctr_max) m_rctr <= '1; else if (ctrl.rctr_inc) m_rctr <= m_rctr + 1'b1;
    if (ctrl.col_max)  m_col  <= '1; else if (ctrl.col_inc)  m_col  <= m_col + 1'b1;
    if (ctrl.row_max)  m_row  <= '1; else if (ctrl.row_inc)  m_row  <= m_row + 1'b1;
    if (ctrl.we && ctrl.reg_ena) m_reg[m_rctr] <= mem_data;
    if (ctrl.we && ctrl.tos_ena) m_tos[m_rctr] <= mem_data;
    done_r <= {ctrl.init_lod, ctrl.ictr_inc | ctrl.ictr_clr, ctrl.rctr_inc | ctrl.rctr_max,
               ctrl.col_inc | ctrl.col_max, ctrl.row_inc | ctrl.row_max, 1'b0, 1'b0};
    we_d <= ctrl.we;
    re_d <= ctrl.re;
  end

  always_comb begin
    stat.init_done  = done_r[6];
    stat.ictr_done  = done_r[5];
    stat.rctr_done  = done_r[4];
    stat.col_done   = done_r[3];
    stat.row_done   = done_r[2];
    stat.reg_done   = ctrl.reg_ena & (we_d | re_d);
    stat.tos_done   = ctrl.tos_ena & (we_d | re_d);
    stat.initnum_eq = m_ictr == m_init;
    stat.rctr_eq7   = m_rctr == 3'd7;
    stat.col_eq     = m_col == m_reg[6][2:0];
    stat.row_eq     = m_row == m_reg[7][2:0];
    drv = ctrl.reg_ena ? m_reg[m_rctr] : m_tos[m_rctr];
  end

  // pads settle a random number of clocks after re rises
  int settle = 0;
  always @(posedge clk) begin
    if (!ctrl.re) begin
      settle     <= 1 + $urandom % 4;
      pad_stable <= 1'b0;
    end else if (settle > 0) settle <= settle - 1;
    else pad_stable <= 1'b1;
  end

  // ---------- memory ----------
  mem_op_e    ops [$];
  logic [7:0] sent [$];
  logic [7:0] img [16];
  int         ptr = 0;
  int         early_send = 0;
  initial begin
    forever begin
      do @(posedge clk); while (!mem_req);
      ops.push_back(mem_op);
      if (mem_op == MEM_RECV_DATUM) begin mem_data <= img[ptr % 16]; ptr++; end
      if (mem_op == MEM_SEND_DATUM) begin
        if (!pad_stable) early_send++;
        sent.push_back(drv);
      end
      repeat ($urandom % 3) @(posedge clk);
      mem_ack <= 1'b1;
      do @(posedge clk); while (mem_req);
      mem_ack <= 1'b0;
    end
  end

  task automatic go(input logic [3:0] n, output logic bad);
    initnum = n;
    go_req  <= 1'b1;
    fork
      begin
        do @(posedge clk); while (!go_ack);
        bad = go_bad;
        go_req <= 1'b0;
        do @(posedge clk); while (go_ack);
      end
      for (int i = 0; i < n; i++) begin
        repeat ($urandom % 3) @(posedge clk);
        srv_req <= 1'b1;
        do @(posedge clk); while (!srv_ack);
        srv_req <= 1'b0;
        do @(posedge clk); while (srv_ack);
      end
    join
    @(posedge clk);
  endtask

  initial begin
    logic bad;
    int entries, words, nload, nrecv, nsend;
    for (int i = 0; i < 8; i++) begin m_reg[i] = '0; m_tos[i] = '0; end
    m_init = '0; m_ictr = '0; m_rctr = '0; m_col = '0; m_row = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int t = 0; t < 30; t++) begin
      logic [3:0] n;
      int r, c;
      n = 4'(1 + $urandom % 15);
      r = $urandom % 8; c = $urandom % 8;
      if (t == 0) begin r = 0; c = 7; end
      if (t == 1) begin r = 1; c = 3; end
      if (t == 2) begin r = 2; c = 2; end
      for (int k = 0; k < 16; k++) img[k] = 8'($urandom);
      img[6] = {5'b0, 3'(c)};
      img[7] = {5'b0, 3'(r)};
      entries = (r + 1) * (c + 1);
      words = entries > 8 ? 8 : entries;
      // NORMAL
      ops.delete(); ptr = 0;
      go(n, bad);
      nload = 0; nrecv = 0; nsend = 0;
      foreach (ops[i]) begin
        if (ops[i] == MEM_LOAD_ADDRESS) begin nload++; check(i < n, "address chunks come first"); end
        if (ops[i] == MEM_RECV_DATUM) nrecv++;
        if (ops[i] == MEM_SEND_DATUM) nsend++;
      end
      check(!test_mode, "NORMAL mode");
      check(nload == n, $sformatf("%0d chunks forwarded, expected %0d", nload, n));
      check(nrecv == 8 + words && nsend == 0, $sformatf("%0d octets received, expected %0d", nrecv, 8 + words));
      check(bad == (entries > 8), "NORMAL response");
      for (int k = 0; k < 8; k++) check(m_reg[k] == img[k], "parameter stored");
      for (int k = 0; k < words; k++) check(m_tos[k] == img[8 + k], "TOS word stored");
      // TEST
      ops.delete(); sent.delete();
      go(4'd0, bad);
      check(test_mode, "TEST mode");
      check(ops.size() == 8 + words, "TEST transfers");
      foreach (ops[i]) check(ops[i] == MEM_SEND_DATUM, "TEST sends only");
      check(bad == (entries > 8), "TEST response");
      if (sent.size() == 8 + words) begin
        for (int k = 0; k < 8; k++) check(sent[k] == img[k], "parameter sent");
        for (int k = 0; k < words; k++) check(sent[8 + k] == img[8 + k], "TOS word sent");
      end
    end
    check(early_send == 0, "SEND only after pad_stable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, state %b", state_onehot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
