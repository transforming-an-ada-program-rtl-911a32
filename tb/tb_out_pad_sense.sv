// tb_out_pad_sense: checks the output-settling detector. stable must stay
// low while the chip is not driving, while the sampled pads keep changing
// and for the first STABLE_CLKS clocks of an unchanged sample, must then
// rise, and must fall at once when the pads change or driving stops.
module tb_out_pad_sense;
  localparam int unsigned W = 8, N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic drive = 1'b0, stable;
  logic [W-1:0] pad_in = '0;
  int checks = 0, failures = 0;

  out_pad_sense #(.W(W), .STABLE_CLKS(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < 40; t++) begin
      int noisy;
      logic [W-1:0] v;
      noisy = $urandom % 5;
      v = W'($urandom);
      // not driving: never stable
      repeat (3) begin @(posedge clk); #1; check(!stable, "stable while not driving"); end
      drive <= 1'b1;
      // pads still changing
      for (int k = 0; k < noisy; k++) begin
        pad_in <= v ^ W'(1 << k);
        @(posedge clk); #1;
        check(!stable, "stable while pads change");
      end
      pad_in <= v;
      // count clocks until stable
      begin
        int n;
        n = 0;
        @(posedge clk); #1;
        while (!stable && n < 10) begin n++; @(posedge clk); #1; end
        check(n == N, $sformatf("settled after %0d clocks, expected %0d", n, N));
      end
      repeat (2) begin @(posedge clk); #1; check(stable, "stays stable"); end
      pad_in <= ~v; #1;
      check(!stable, "falls at once when the pads change");
      @(posedge clk); #1;
      drive <= 1'b0; #1;
      check(!stable, "falls when driving stops");
    end
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
