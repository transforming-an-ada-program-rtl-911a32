// tb_tos_table: checks the TOS table against a reference array: writes with
// ena high land in the selected word only and are answered by DONE one
// clock later; writes with ena low change nothing and give no DONE; a read
// drives the selected word onto the bus with oe high and DONE following.
module tb_tos_table;
  import rip_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic ena = 1'b0, we = 1'b0, re = 1'b0, oe, done;
  logic [2:0] sel = '0;
  logic [7:0] din = '0, dout;
  logic [7:0][7:0] words;
  logic [7:0] model [8];
  int checks = 0, failures = 0;

  tos_table dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input int s, input logic [7:0] v, input bit en);
    ena = en; sel = 3'(s); din = v; we = 1'b1;
    @(posedge clk); #1;
    we = 1'b0;
    check(done == en, $sformatf("write DONE for word %0d, ena %0d", s, en));
    @(posedge clk); #1;
    if (en) model[s] = v;
  endtask

  task automatic read(input int s);
    ena = 1'b1; sel = 3'(s); re = 1'b1;
    @(posedge clk); #1;
    check(done && oe && dout == model[s], $sformatf("read word %0d: %h expected %h", s, dout, model[s]));
    re = 1'b0;
    @(posedge clk); #1;
    check(!done && !oe && dout == '0, "bus released after read");
  endtask

  initial begin
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 8; i++) write(i, 8'(8'h11 * i + 8'h3), 1'b1);
    for (int i = 0; i < 8; i++) read(i);
    for (int k = 0; k < 200; k++) begin
      int s;
      s = $urandom % 8;
      case ($urandom % 3)
        0: write(s, 8'($urandom), 1'b1);
        1: write(s, 8'($urandom), 1'b0);
        default: read(s);
      endcase
      for (int i = 0; i < 8; i++) check(words[i] == model[i], "word contents");
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
