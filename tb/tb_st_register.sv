// tb_st_register: checks the self-timed register: a write request loads the
// value and is answered by a one-clock DONE exactly one clock later; a read
// request drives the stored value with oe high and DONE follows re by one
// clock; nothing is driven when re is low; reset clears the contents.
module tb_st_register;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0, re = 1'b0, oe, done;
  logic [W-1:0] din = '0, dout, q;
  int checks = 0, failures = 0;

  st_register #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [W-1:0] v, prev;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(q == '0 && !done && !oe && dout == '0, "after reset");
    prev = '0;
    for (int i = 0; i < 50; i++) begin
      v = W'($urandom);
      // write
      din <= v; we <= 1'b1;
      @(posedge clk); #1;
      we <= 1'b0; din <= ~v;
      check(q == v, "written value");
      check(done, "DONE one clock after write");
      @(posedge clk); #1;
      check(!done, "DONE is one clock wide");
      check(q == v, "value kept when din changes");
      // idle: no drive
      check(!oe && dout == '0, "no drive without re");
      // read
      re <= 1'b1;
      #1;
      check(oe && dout == v, "read drives the value");
      @(posedge clk); #1;
      check(done, "DONE follows re");
      @(posedge clk); #1;
      check(done && dout == v, "DONE held while re");
      re <= 1'b0;
      @(posedge clk); #1;
      check(!done && !oe, "DONE falls after re");
      prev = v;
    end
    rst_n <= 1'b0; #1;
    check(q == '0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
