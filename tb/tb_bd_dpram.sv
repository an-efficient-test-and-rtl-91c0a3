// tb_bd_dpram: fills the RAM from port A and port B alternately, reads every
// word back from the other port, checks the one-clock read latency and that
// port B wins a same-address write collision.
module tb_bd_dpram;
  localparam int DEPTH = 256;
  logic clk = 1'b0;
  logic a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [15:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  bd_dpram #(.DEPTH(DEPTH)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] pat(input int i);
    return 32'h9E3779B9 * 32'(i + 1);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      if (i % 2 == 0) begin a_en = 1; a_we = 1; a_addr = 16'(i); a_wdata = pat(i); b_en = 0; end
      else            begin b_en = 1; b_we = 1; b_addr = 16'(i); b_wdata = pat(i); a_en = 0; end
    end
    @(negedge clk) a_en = 0; b_en = 0; a_we = 0; b_we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_addr = 16'(i); b_en = 1; b_addr = 16'(DEPTH - 1 - i);
      @(posedge clk); #1;
      check(a_rdata == pat(i), $sformatf("A read %0d", i));
      check(b_rdata == pat(DEPTH - 1 - i), $sformatf("B read %0d", DEPTH - 1 - i));
    end
    // collision: both write word 5
    @(negedge clk) a_en = 1; a_we = 1; a_addr = 5; a_wdata = 32'hAAAA0000;
                   b_en = 1; b_we = 1; b_addr = 5; b_wdata = 32'hBBBB0000;
    @(negedge clk) a_we = 0; b_we = 0;
    @(posedge clk); #1;
    check(a_rdata == 32'hBBBB0000, "port B must win a write collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
