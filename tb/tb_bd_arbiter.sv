// tb_bd_arbiter: three requesters write and read back words through the
// arbiter into a memory model at the same time. Checks: one grant per clock,
// no grant without a request, no requester passed over more than twice while
// it waits (round-robin), and every read returns its own word to its own
// requester one clock after the grant.
module tb_bd_arbiter;
  import bd_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req [N];
  mem_req_t rq [N];
  logic gnt [N], rvalid [N];
  logic [31:0] rdata, mem_wdata, mem_rdata;
  logic mem_en, mem_we;
  logic [15:0] mem_addr;
  logic [31:0] mem [256];
  int checks = 0, failures = 0, waited [N];

  bd_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .rq, .gnt, .rvalid, .rdata, .mem_en, .mem_we,
    .mem_addr, .mem_wdata, .mem_rdata);

  always #5 clk = ~clk;

  always @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr[7:0]] <= mem_wdata;
    mem_rdata <= mem[mem_addr[7:0]];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  // grant rules, checked every clock
  always @(posedge clk) if (rst_n) begin
    int ng;
    ng = 0;
    for (int i = 0; i < N; i++) begin
      ng += int'(gnt[i]);
      if (gnt[i] && !req[i]) check(1'b0, "grant without request");
      if (req[i] && !gnt[i]) waited[i]++;
      else waited[i] = 0;
      if (waited[i] > N - 1) check(1'b0, $sformatf("requester %0d starved", i));
    end
    check(ng <= 1, "more than one grant");
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input int i, input bit we, input int a, input logic [31:0] d,
                        output logic [31:0] r);
    @(negedge clk);
    req[i] = 1'b1; rq[i].we = we; rq[i].addr = 16'(a); rq[i].wdata = d;
    do @(posedge clk); while (!gnt[i]);
    @(negedge clk) req[i] = 1'b0;
    if (!we) begin
      check(rvalid[i], $sformatf("requester %0d: no rvalid", i));
      for (int j = 0; j < N; j++) if (j != i) check(!rvalid[j], "rvalid to the wrong requester");
      r = rdata;
    end
  endtask

  task automatic agent(input int i);
    logic [31:0] r;
    for (int k = 0; k < 40; k++) begin
      access(i, 1'b1, i * 64 + k, {8'(i), 8'(k), 16'hBEEF}, r);
      if ($urandom % 3 == 0) @(negedge clk);
    end
    for (int k = 0; k < 40; k++) begin
      access(i, 1'b0, i * 64 + k, '0, r);
      check(r == {8'(i), 8'(k), 16'hBEEF}, $sformatf("requester %0d word %0d read %h", i, k, r));
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin req[i] = 1'b0; rq[i] = '0; waited[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    fork
      agent(0);
      agent(1);
      agent(2);
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
