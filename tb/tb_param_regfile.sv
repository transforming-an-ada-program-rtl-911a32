// tb_param_regfile: checks the parameter registers: each index writes its
// own register (keeping 8, 8, 8, 8, 8, 1, 3 and 3 low bits), the params
// struct shows the stored values, reads return them zero-extended, DONE
// follows every request by one clock, and with ena low nothing changes.
module tb_param_regfile;
  import rip_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ena = 1'b0, we = 1'b0, re = 1'b0, oe, done;
  logic [IDX_W-1:0] sel = '0;
  logic [DATA_W-1:0] din = '0, dout;
  params_t params;
  logic [7:0] model [8];
  localparam logic [7:0] MASK [8] = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'h01, 8'h07, 8'h07};
  int checks = 0, failures = 0;

  param_regfile dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input int s, input logic [7:0] v, input bit en);
    ena = en; sel = 3'(s); din = v; we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
    check(done == en, "write DONE");
    @(posedge clk); #1;
    if (en) model[s] = v & MASK[s];
  endtask

  task automatic read(input int s);
    ena = 1'b1; sel = 3'(s); re = 1'b1;
    @(posedge clk); #1;
    check(done && oe && dout == model[s], $sformatf("read reg %0d: %h expected %h", s, dout, model[s]));
    re = 1'b0;
    @(posedge clk); #1;
    check(!done && !oe, "released after read");
  endtask

  function automatic bit params_ok();
    return params.max_packet_lo == model[0] && params.max_packet_hi == model[1]
        && params.addr_length == model[2] && params.timeout_lo == model[3]
        && params.timeout_hi == model[4] && params.ack_type == model[5][0]
        && params.tos_col == model[6][2:0] && params.tos_row == model[7][2:0];
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 8; i++) write(i, 8'hF0 | 8'(i + 8), 1'b1);
    check(params_ok(), "params after first writes");
    for (int i = 0; i < 8; i++) read(i);
    for (int k = 0; k < 200; k++) begin
      int s;
      s = $urandom % 8;
      case ($urandom % 3)
        0: write(s, 8'($urandom), 1'b1);
        1: write(s, 8'($urandom), 1'b0);
        default: read(s);
      endcase
      check(params_ok(), "params struct");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
