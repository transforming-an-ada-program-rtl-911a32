// tb_rip_chip: end-to-end test of the RIP chip with its three partners.
//
// The testbench plays Inm_Out (Go caller), Inm_Srv (address chunk server)
// and the memory module, all with random response delays, and models the
// off-chip data bus: when the chip starts driving, the pads show a wrong,
// changing value for a random number of clocks before they settle. The
// memory holds an image of parameters and TOS entries; its expected
// contents and the expected results are worked out here from the table
// shape, independently of the chip:
//   entries = (TOS.ROW + 1) * (TOS.COL + 1), words moved = min(entries, 8),
//   bad_srv_command exactly when entries > 8.
// Each scenario loads (NORMAL, INITNUM > 0) and then dumps (TEST,
// INITNUM = 0). The test counts how often each mechanism happened: NORMAL
// load, TEST dump, address chunk forwarding, multi-row table, table
// overflow, waiting for the pads to settle; one that never happened counts
// as a failure. The chip runs with its default parameters.
module tb_rip_chip;
  import rip_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                             go_req = 1'b0, go_ack, go_bad;
  logic [NIB_W-1:0]                 initnum = '0;
  logic                             srv_req = 1'b0, srv_ack;
  logic [NIB_W-1:0]                 srv_chunk = '0;
  logic                             mem_req, mem_ack = 1'b0;
  mem_op_e                          mem_op;
  logic [NIB_W-1:0]                 mem_chunk;
  logic [DATA_W-1:0]                dbus_in = '0, dbus_out;
  logic                             dbus_oe;
  logic [19:0]                      state_onehot;
  logic                             test_mode;
  params_t                          params;
  logic [TOS_DEPTH-1:0][DATA_W-1:0] tos_words;
  logic [NIB_W-1:0]                 initnum_q;
  logic [IDX_W-1:0]                 reg_idx;

  rip_chip dut (.*);

  int checks = 0, failures = 0;
  int n_normal = 0, n_test = 0, n_chunks = 0, n_multirow = 0, n_overflow = 0, n_pad_wait = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- memory module and data bus ----------------
  logic [DATA_W-1:0] image [16];   // 8 parameter octets, then 8 TOS octets
  logic [DATA_W-1:0] mem_drive = '0;
  logic [DATA_W-1:0] dump [$];
  logic [NIB_W-1:0]  got_chunks [$];
  int                recv_ptr = 0;
  int                settle = 0;

  // pads: unsettled for a few clocks after the chip starts driving
  always @(posedge clk) begin
    if (dbus_oe) begin
      if (settle > 0) begin
        dbus_in <= dbus_out ^ DATA_W'(1 << (settle % DATA_W));
        settle  <= settle - 1;
      end else begin
        dbus_in <= dbus_out;
      end
    end else begin
      settle  <= 1 + ($urandom % 4);
      dbus_in <= mem_drive;
    end
  end

  always @(posedge clk) if (dbus_oe && dbus_in != dbus_out && !mem_req && rst_n) n_pad_wait++;

  initial begin
    forever begin
      do @(posedge clk); while (!mem_req);
      repeat ($urandom % 3) @(posedge clk);
      case (mem_op)
        MEM_LOAD_ADDRESS: got_chunks.push_back(mem_chunk);
        MEM_RECV_DATUM: begin
          mem_drive <= image[recv_ptr % 16];
          recv_ptr++;
        end
        MEM_SEND_DATUM: begin
          check(dbus_oe && dbus_in == dbus_out, "memory asked to take data before the pads settled");
          dump.push_back(dbus_in);
        end
        default: check(1'b0, "unknown memory request");
      endcase
      @(posedge clk);
      mem_ack <= 1'b1;
      do @(posedge clk); while (mem_req);
      repeat ($urandom % 3) @(posedge clk);
      mem_ack <= 1'b0;
    end
  end

  // ---------------- Inm_Out and Inm_Srv ----------------
  task automatic go_call(input logic [NIB_W-1:0] num, output logic bad,
                         ref logic [NIB_W-1:0] sent [$]);
    sent.delete();
    initnum <= num;
    go_req  <= 1'b1;
    fork
      begin
        do @(posedge clk); while (!go_ack);
        bad = go_bad;
        repeat ($urandom % 3) @(posedge clk);
        go_req  <= 1'b0;
        initnum <= NIB_W'($urandom);   // INITNUM is latched, the bus may change
        do @(posedge clk); while (go_ack);
      end
      begin
        for (int i = 0; i < num; i++) begin
          logic [NIB_W-1:0] c;
          c = NIB_W'($urandom);
          repeat (1 + $urandom % 4) @(posedge clk);
          srv_chunk <= c;
          srv_req   <= 1'b1;
          do @(posedge clk); while (!srv_ack);
          // the memory has the chunk by the time Srv_req is acknowledged
          check(got_chunks.size() == i + 1 && got_chunks[i] == c, "chunk not forwarded before srv_ack");
          sent.push_back(c);
          srv_req <= 1'b0;
          do @(posedge clk); while (srv_ack);
        end
      end
    join
    repeat (2) @(posedge clk);
  endtask

  function automatic logic [DATA_W-1:0] stored(input int k);
    // what a parameter register keeps of octet k
    case (k)
      5:       return image[k] & 8'h01;
      6, 7:    return image[k] & 8'h07;
      default: return image[k];
    endcase
  endfunction

  task automatic scenario(input logic [NIB_W-1:0] num, input int rows_m1, input int cols_m1);
    logic             bad;
    logic [NIB_W-1:0] sent [$];
    int               entries, words;
    bit               ok;
    for (int k = 0; k < 16; k++) image[k] = DATA_W'($urandom);
    image[6] = (image[6] & 8'hF8) | DATA_W'(cols_m1);
    image[7] = (image[7] & 8'hF8) | DATA_W'(rows_m1);
    entries = (rows_m1 + 1) * (cols_m1 + 1);
    words   = entries > 8 ? 8 : entries;

    // NORMAL: load
    got_chunks.delete();
    recv_ptr = 0;
    go_call(num, bad, sent);
    n_normal++;
    if (num > 0) n_chunks++;
    if (rows_m1 > 0 && entries <= 8) n_multirow++;
    if (entries > 8) n_overflow++;
    check(bad == (entries > 8), $sformatf("load response bad=%0d, entries=%0d", bad, entries));
    check(got_chunks.size() == int'(num), "number of forwarded chunks");
    ok = 1;
    foreach (sent[i]) if (got_chunks[i] != sent[i]) ok = 0;
    check(ok, "forwarded chunk values");
    check(recv_ptr == 8 + words, $sformatf("octets received %0d, expected %0d", recv_ptr, 8 + words));
    check(params.max_packet_lo == image[0] && params.max_packet_hi == image[1]
          && params.addr_length == image[2] && params.timeout_lo == image[3]
          && params.timeout_hi == image[4] && params.ack_type == image[5][0]
          && params.tos_col == image[6][2:0] && params.tos_row == image[7][2:0], "parameters loaded");
    ok = 1;
    for (int w = 0; w < words; w++) if (tos_words[w] != image[8 + w]) ok = 0;
    check(ok, "TOS table loaded");
    check(!test_mode, "NORMAL mode taken for INITNUM > 0");

    // TEST: dump
    dump.delete();
    got_chunks.delete();
    go_call(0, bad, sent);
    n_test++;
    check(test_mode, "TEST mode taken for INITNUM = 0");
    check(bad == (entries > 8), "dump response");
    check(got_chunks.size() == 0, "no chunks in TEST mode");
    check(dump.size() == 8 + words, $sformatf("octets dumped %0d, expected %0d", dump.size(), 8 + words));
    ok = (dump.size() == 8 + words);
    if (ok) begin
      for (int k = 0; k < 8; k++) if (dump[k] != stored(k)) ok = 0;
      for (int w = 0; w < words; w++) if (dump[8 + w] != image[8 + w]) ok = 0;
    end
    check(ok, "dumped values");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    scenario(4'd3, 0, 3);    // one row of four
    scenario(4'd1, 1, 3);    // two rows of four: exactly eight words
    scenario(4'd2, 2, 3);    // twelve entries: overflow
    scenario(4'd15, 0, 7);   // one row of eight, fifteen chunks
    scenario(4'd1, 7, 0);    // eight rows of one
    scenario(4'd5, 3, 2);    // overflow on the last row
    for (int r = 0; r < 12; r++)
      scenario(NIB_W'(1 + $urandom % 15), $urandom % 8, $urandom % 8);
    check(n_normal > 0,   "NORMAL load happened");
    check(n_test > 0,     "TEST dump happened");
    check(n_chunks > 0,   "chunk forwarding happened");
    check(n_multirow > 0, "multi-row table happened");
    check(n_overflow > 0, "table overflow happened");
    check(n_pad_wait > 0, "wait for settled pads happened");
    $display("mechanisms: normal=%0d test=%0d chunks=%0d multirow=%0d overflow=%0d pad_wait_clks=%0d",
             n_normal, n_test, n_chunks, n_multirow, n_overflow, n_pad_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, state=%b go=%b/%b srv=%b/%b mem=%b/%b op=%0d oe=%b",
             state_onehot, go_req, go_ack, srv_req, srv_ack, mem_req, mem_ack, mem_op, dbus_oe);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
