// tb_bd_schedule: runs a small schedule (3 static slots of 4 macroticks, 4
// minislots of 2, symbol window 3, cycle 30, macrotick 2 clocks) and checks
// segment, slot number and cycle counter in every clock against a reference
// computed from the macrotick count. The third cycle holds the bus busy in
// the dynamic segment, which must freeze the dynamic slot number.
module tb_bd_schedule;
  import bd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, bus_idle = 1'b1;
  seg_e seg;
  logic [10:0] slot_id;
  logic [5:0] cycle;
  logic slot_start, seg_start, cycle_start;
  int checks = 0, failures = 0, errs = 0, n_cycle_start = 0, n_slot_start = 0;

  bd_schedule #(.MT_CLKS(2)) dut (.clk, .rst_n, .enable, .static_slot_mt(16'd4),
    .n_static(11'd3), .minislot_mt(8'd2), .n_minislots(11'd4), .symwin_mt(16'd3),
    .cycle_mt(16'd30), .bus_idle, .seg, .slot_id, .cycle, .slot_start, .seg_start,
    .cycle_start);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, mc, cyc;
    seg_e eseg;
    int eslot;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) enable = 1'b1;
    for (int n = 0; n < 180; n++) begin
      @(posedge clk); #1;
      m = (n + 1) / 2; mc = m % 30; cyc = m / 30;
      bus_idle = !(cyc == 2 && mc >= 12 && mc < 19);
      if (mc < 12)      begin eseg = SEG_STATIC;  eslot = mc / 4 + 1; end
      else if (mc < 20) begin eseg = SEG_DYNAMIC; eslot = 4 + (mc - 12) / 2; end
      else if (mc < 23) begin eseg = SEG_SYMBOL;  eslot = -1; end
      else              begin eseg = SEG_NIT;     eslot = -1; end
      // bus busy from the first dynamic macrotick: the slot stays at 4
      if (cyc == 2 && eseg == SEG_DYNAMIC) eslot = (mc < 19) ? 4 : 4;
      checks++;
      if (seg != eseg || (eslot > 0 && int'(slot_id) != eslot) || int'(cycle) != cyc) begin
        failures++;
        if (errs++ < 6)
          $display("FAIL: clk %0d mt %0d: seg %s slot %0d cycle %0d, want %s %0d %0d",
                   n, m, seg.name(), slot_id, cycle, eseg.name(), eslot, cyc);
      end
      n_cycle_start += int'(cycle_start);
      n_slot_start  += int'(slot_start);
    end
    checks++;
    if (n_cycle_start != 3) begin failures++; $display("FAIL: %0d cycle starts", n_cycle_start); end
    // cycles 0 and 1: 2 static steps, dynamic entry, 3 dynamic steps; cycle 2
    // without the dynamic steps; 3 cycle starts
    checks++;
    if (n_slot_start != 6 + 6 + 3 + 3) begin failures++; $display("FAIL: %0d slot starts", n_slot_start); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
