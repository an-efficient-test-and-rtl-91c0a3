// tb_bd_pkt_writer: writes packets into a 32-word ring region of a memory
// model with randomly withheld grants and checks the head word, timestamp,
// content words, wrap-around, the committed write pointer and the dropping
// of a packet that does not fit (overflow).
module tb_bd_pkt_writer;
  import bd_pkg::*;
  localparam int BASE = 8, SIZE = 32;
  logic clk = 1'b0, rst_n = 1'b0, clear_ovf = 1'b0;
  logic [15:0] rd_ptr = '0;
  logic pkt_start = 1'b0, byte_valid = 1'b0, pkt_end = 1'b0, busy;
  logic [7:0] pkt_id = '0, byte_data = '0;
  logic [31:0] pkt_ts = '0;
  logic req, gnt;
  mem_req_t req_data;
  logic [15:0] wr_ptr, pkt_count;
  logic overflow;
  logic [31:0] mem [64];
  int checks = 0, failures = 0;

  bd_pkt_writer dut (.clk, .rst_n, .region_base(16'(BASE)), .region_size(16'(SIZE)), .rd_ptr,
    .clear_ovf, .pkt_start, .pkt_id, .pkt_ts, .byte_valid, .byte_data, .pkt_end, .busy,
    .req, .req_data, .gnt, .wr_ptr, .overflow, .pkt_count);

  always #5 clk = ~clk;

  always @(negedge clk) gnt <= 1'($urandom);
  always @(posedge clk) if (rst_n && req && gnt) begin
    if (int'(req_data.addr) < BASE || int'(req_data.addr) >= BASE + SIZE) begin
      failures++;
      $display("FAIL: write outside region at %0d", req_data.addr);
    end
    mem[req_data.addr[5:0]] <= req_data.wdata;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] id, input logic [31:0] ts, input int n, input int seed);
    @(negedge clk) pkt_start = 1'b1; pkt_id = id; pkt_ts = ts;
    @(negedge clk) pkt_start = 1'b0;
    for (int i = 0; i < n; i++) begin
      byte_valid = 1'b1; byte_data = 8'(seed + 7 * i);
      @(negedge clk) byte_valid = 1'b0;
      @(negedge clk);
    end
    pkt_end = 1'b1;
    @(negedge clk) pkt_end = 1'b0;
    repeat (40) @(negedge clk);
  endtask

  // compare a packet stored at word offset off
  task automatic expect_pkt(input int off, input logic [7:0] id, input logic [31:0] ts,
                            input int n, input int seed);
    logic [7:0] b;
    check(mem[BASE + off] == {id, 8'h00, 16'(n)},
          $sformatf("head at %0d: %h", off, mem[BASE + off]));
    check(mem[BASE + (off + 1) % SIZE] == ts, "timestamp word");
    for (int i = 0; i < n; i++) begin
      b = mem[BASE + (off + 2 + i / 4) % SIZE][8 * (i % 4) +: 8];
      check(b == 8'(seed + 7 * i), $sformatf("content byte %0d: %h", i, b));
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    send(8'h11, 32'h12345678, 10, 3);
    check(wr_ptr == 16'd5 && pkt_count == 16'd1, $sformatf("wr_ptr %0d after packet 1", wr_ptr));
    expect_pkt(0, 8'h11, 32'h12345678, 10, 3);
    send(8'h01, 32'hCAFE0001, 0, 0);
    check(wr_ptr == 16'd7, $sformatf("wr_ptr %0d after empty packet", wr_ptr));
    expect_pkt(5, 8'h01, 32'hCAFE0001, 0, 0);
    // 24 free words, a 32-word packet must be dropped
    send(8'h02, 32'h0BAD0BAD, 120, 1);
    check(overflow && wr_ptr == 16'd7 && pkt_count == 16'd2, "oversized packet not dropped");
    @(negedge clk) clear_ovf = 1'b1;
    @(negedge clk) clear_ovf = 1'b0;
    check(!overflow, "overflow not cleared");
    // host consumed everything; a 17-word packet wraps around the end
    rd_ptr = 16'd7;
    send(8'h12, 32'h00ABCDEF, 60, 9);
    check(!overflow && wr_ptr == 16'd24 && pkt_count == 16'd3, $sformatf("wr_ptr %0d after 3rd", wr_ptr));
    expect_pkt(7, 8'h12, 32'h00ABCDEF, 60, 9);
    send(8'h13, 32'h00000042, 40, 5);
    check(!overflow && wr_ptr == 16'(36 % SIZE) && pkt_count == 16'd4, $sformatf("wr_ptr %0d after wrap", wr_ptr));
    expect_pkt(24, 8'h13, 32'h00000042, 40, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
