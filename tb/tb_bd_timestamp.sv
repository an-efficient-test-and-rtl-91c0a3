// tb_bd_timestamp: checks the 40 ns timestamp at the default 80 MHz clock.
// 800 clocks are 10 us, i.e. exactly 250 ticks; ticks must be 3 or 4 clocks
// apart; clear restarts the count.
module tb_bd_timestamp;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic tick;
  logic [31:0] ts;
  int checks = 0, failures = 0;

  bd_timestamp dut (.clk, .rst_n, .clear, .tick, .ts);

  always #6.25 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last, gap_bad, nt;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    last = 0; gap_bad = 0; nt = 0;
    for (int c = 1; c <= 800; c++) begin
      @(posedge clk); #1;
      if (tick) begin
        if (nt > 0 && (c - last < 3 || c - last > 4)) gap_bad++;
        last = c; nt++;
      end
    end
    check(ts == 32'd250, $sformatf("ts after 800 clocks = %0d, want 250", ts));
    check(nt == 250, $sformatf("ticks = %0d, want 250", nt));
    check(gap_bad == 0, "tick spacing not 3..4 clocks");
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    check(ts == 32'd0, "clear did not zero the timestamp");
    repeat (32) @(posedge clk); #1;
    check(ts == 32'd10, $sformatf("ts 32 clocks after clear = %0d, want 10", ts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
