// tb_st_counter: checks the self-timed counter against a reference count:
// inc adds one with wrap-around, clr loads zero, max loads all ones (so max
// then inc gives zero), and each request is answered by a one-clock DONE one
// clock later. Requests arrive in random order, one at a time or together.
module tb_st_counter;
  localparam int unsigned W = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic inc = 1'b0, clr = 1'b0, max = 1'b0, done;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  int ref_q = 0;

  st_counter #(.W(W)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk); #1;
    check(q == 0 && !done, "after reset");
    for (int i = 0; i < 300; i++) begin
      int op;
      op = $urandom % 8;
      inc <= op[0]; clr <= op[1]; max <= op[2];
      if (op[1])      ref_q = 0;
      else if (op[2]) ref_q = (1 << W) - 1;
      else if (op[0]) ref_q = (ref_q + 1) % (1 << W);
      @(posedge clk); #1;
      inc <= 1'b0; clr <= 1'b0; max <= 1'b0;
      check(q == W'(ref_q), $sformatf("count %0d expected %0d (op %0d)", q, ref_q, op));
      check(done == (op != 0), "DONE one clock after a request");
      @(posedge clk); #1;
      check(!done, "DONE is one clock wide");
    end
    // the loop idiom: preset to -1, then increment to 0
    max <= 1'b1; @(posedge clk); #1; max <= 1'b0;
    inc <= 1'b1; @(posedge clk); #1; inc <= 1'b0;
    check(q == 0, "max then inc gives 0");
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
