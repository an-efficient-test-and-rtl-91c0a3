// tb_bd_flag_map: applies 300 random flag vectors and checks the four
// standard flags (grouped as in the test campaign), the sticky register,
// write-one-to-clear and the per-flag event counters against a model.
module tb_bd_flag_map;
  import bd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clear_cnt = 1'b0;
  flags_t flags_in = '0, clear_mask = '0, pin_flags, sticky;
  logic [3:0] vss_pulse, vss_sticky;
  logic [15:0] count [16];
  int checks = 0, failures = 0;
  int mcount [16];
  flags_t msticky;

  bd_flag_map dut (.clk, .rst_n, .flags_in, .clear_mask, .clear_cnt, .pin_flags,
    .vss_pulse, .sticky, .vss_sticky, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] want;
    flags_t f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    msticky = '0;
    foreach (mcount[i]) mcount[i] = 0;
    for (int n = 0; n < 300; n++) begin
      f = flags_t'($urandom) & flags_t'($urandom);
      @(negedge clk);
      flags_in = f;
      clear_mask = (n % 50 == 49) ? 16'hFFFF : '0;
      @(posedge clk); #1;
      // syntax: CODERR TSSVIOL HCRCERR FCRCERR FESERR
      want[1] = f[0] | f[1] | f[2] | f[3] | f[4];
      // content: NERR SSERR FIDERR CCERR SPLERR
      want[2] = f[11] | f[12] | f[13] | f[14] | f[15];
      // boundary: BVIOL SWVIOL NITVIOL SOVERR
      want[3] = f[7] | f[8] | f[9] | f[10];
      want[0] = f[6];
      msticky = (n % 50 == 49) ? f : (msticky | f);
      for (int i = 0; i < 16; i++) mcount[i] += int'(f[i]);
      check(vss_pulse == want, $sformatf("vss %b want %b for flags %h", vss_pulse, want, f));
      check(pin_flags == f, "pin flags");
      check(sticky == msticky, $sformatf("sticky %h want %h", sticky, msticky));
    end
    @(negedge clk) flags_in = '0; clear_mask = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 16; i++)
      check(int'(count[i]) == mcount[i], $sformatf("count[%0d] %0d want %0d", i, count[i], mcount[i]));
    check(vss_sticky != 4'd0, "vss sticky empty");
    @(negedge clk) clear_cnt = 1'b1; clear_mask = 16'hFFFF;
    @(negedge clk) clear_cnt = 1'b0; clear_mask = '0;
    check(count[3] == 16'd0 && sticky == '0 && vss_sticky == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
