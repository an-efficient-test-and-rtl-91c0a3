// tb_bd_host_if: exercises the register map: reset values, read/write
// configuration registers, control pulses, write-one-to-clear of the flags,
// status and counter reads, and the DPRAM window (addr[15] set) through a
// memory model, all with the one-clock read latency.
module tb_bd_host_if;
  import bd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cs = 1'b0, we = 1'b0;
  logic [15:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic rvalid, mem_en, mem_we;
  logic [15:0] mem_addr;
  logic [31:0] mem_wdata, mem_rdata;
  logic mon_frame_en, mon_bit_en, sched_en, replay_start, replay_stop, replay_sync, ts_clear;
  logic clear_cnt, clear_ovf;
  flags_t clear_mask;
  logic [15:0] frame_rd, bit_rd, replay_end, static_slot_mt, symwin_mt, cycle_mt;
  logic [10:0] n_static, n_minislots;
  logic [7:0] minislot_mt;
  logic [6:0] static_plen;
  logic [15:0] count [16];
  logic [31:0] mem [64];
  int checks = 0, failures = 0, n_start = 0, n_ts_clear = 0;
  flags_t last_mask;

  bd_host_if dut (.clk, .rst_n, .cs, .we, .addr, .wdata, .rdata, .rvalid, .mem_en, .mem_we,
    .mem_addr, .mem_wdata, .mem_rdata, .mon_frame_en, .mon_bit_en, .sched_en, .replay_start,
    .replay_stop, .replay_sync, .ts_clear, .clear_cnt, .clear_ovf, .clear_mask, .frame_rd, .bit_rd,
    .replay_end, .static_slot_mt, .n_static, .minislot_mt, .n_minislots, .symwin_mt,
    .cycle_mt, .static_plen, .sticky(16'hA5C3), .vss_sticky(4'h9), .ts(32'h01020304),
    .frame_wr(16'd17), .bit_wr(16'd33), .replay_ptr(16'd5), .replay_busy(1'b1),
    .replay_underrun(1'b0), .overflow(2'b10), .seg(SEG_DYNAMIC), .cycle(6'd42),
    .slot_id(11'd77), .frame_pkts(16'd3), .bit_pkts(16'd4), .replay_pkts(16'd5), .count);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) mem[mem_addr[5:0]] <= mem_wdata;
      mem_rdata <= mem[mem_addr[5:0]];
    end
    if (rst_n) n_start += int'(replay_start);
    if (rst_n) n_ts_clear += int'(ts_clear);
    if (clear_mask != '0) last_mask <= clear_mask;
  end

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

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) cs = 1; we = 1; addr = a; wdata = d;
    @(negedge clk) cs = 0; we = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk) cs = 1; we = 0; addr = a;
    @(negedge clk) cs = 0;
    check(rvalid, "no rvalid");
    d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    for (int i = 0; i < 16; i++) count[i] = 16'(100 + i);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(16'h000F, d); check(d == 32'd3000, $sformatf("reset cycle length %0d", d));
    rd(16'h000B, d); check(d == 32'd30, "reset static slots");
    // configuration registers
    wr(16'h000A, 32'd40); wr(16'h000B, 32'd4); wr(16'h000C, 32'd6); wr(16'h000D, 32'd12);
    wr(16'h000E, 32'd9); wr(16'h000F, 32'd300); wr(16'h0010, 32'd2); wr(16'h0004, 32'd11);
    wr(16'h0006, 32'd22); wr(16'h0007, 32'd33);
    check(static_slot_mt == 40 && n_static == 4 && minislot_mt == 6 && n_minislots == 12 &&
          symwin_mt == 9 && cycle_mt == 300 && static_plen == 2, "schedule outputs");
    check(frame_rd == 11 && bit_rd == 22 && replay_end == 33, "pointer outputs");
    rd(16'h000D, d); check(d == 32'd12, "read back minislots");
    rd(16'h0007, d); check(d == 32'd33, "read back replay end");
    // control: enables stay, start and clear pulse once
    wr(16'h0000, 32'h0000_042D);
    @(negedge clk);
    check(mon_frame_en && !mon_bit_en && sched_en && replay_sync, "enables");
    check(n_start == 1 && n_ts_clear == 1, "control pulses");
    check(!replay_start && !ts_clear, "pulses one clock only");
    rd(16'h0000, d); check(d == 32'h0000_0505, $sformatf("CTRL read %h", d));
    // flags
    wr(16'h0001, 32'h0000_00F0); @(negedge clk); check(last_mask == 16'h00F0, "write one to clear");
    rd(16'h0001, d); check(d == 32'h0009_A5C3, $sformatf("FLAGS read %h", d));
    rd(16'h0002, d); check(d == 32'h01020304, "TS read");
    rd(16'h0003, d); check(d == 32'd17, "FRAME_WR read");
    rd(16'h0005, d); check(d == 32'd33, "BIT_WR read");
    rd(16'h0008, d); check(d == 32'd5, "RPL_PTR read");
    rd(16'h0009, d); check(d == 32'd2, "OVF read");
    rd(16'h0011, d); check(d == {13'd0, 2'd1, 6'd42, 11'd77}, $sformatf("POS read %h", d));
    rd(16'h0013, d); check(d == 32'd4, "bit packets read");
    rd(16'h0027, d); check(d == 32'd107, "counter 7 read");
    // DPRAM window
    for (int i = 0; i < 8; i++) wr(16'h8000 + 16'(i), 32'hD0D0_0000 + 32'(i));
    check(mem[3] == 32'hD0D0_0003, "DPRAM write");
    for (int i = 0; i < 8; i++) begin
      rd(16'h8000 + 16'(i), d); check(d == 32'hD0D0_0000 + 32'(i), "DPRAM read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
