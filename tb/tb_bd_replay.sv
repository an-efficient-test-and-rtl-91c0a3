// tb_bd_replay: places a bit-level packet (timestamp 100) and a frame-level
// packet (timestamp 400) in a memory model and replays them. Checks: the
// bit-level samples come out one per tick from timestamp 100; the frame comes
// out, starting at timestamp 400, coded exactly like the reference coder
// (TSS of 5 bits, FSS, BSS, bytes, FES) at 8 clocks per bit; packet count,
// done and the final pointer. Then the bit-level packet is replayed again in
// cycle-aligned mode with timestamp 20: nothing may be sent before the
// cycle-start pulse, and the packet must start 20 ticks after it. Grants are
// withheld at random.
module tb_bd_replay;
  import bd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, tick = 1'b0;
  logic sync_cycle = 1'b0, cycle_start = 1'b0;
  logic [31:0] ts = '0;
  logic req, gnt, rvalid;
  mem_req_t req_data;
  logic [31:0] rdata;
  logic txd, txen, busy, done, underrun;
  logic [15:0] rd_ptr, pkt_count, end_ptr;
  logic [31:0] mem [64];
  int checks = 0, failures = 0, n_done = 0;
  logic bit_samples[$];
  logic [31:0] bit_first_ts, frame_first_ts, sync_first_ts, cs_ts;
  logic sync_samples[$];
  logic frame_clk[$];
  logic prev_txen;
  int mode;   // 0: bit packet expected, 1: frame packet

  tb_fr_coder fr_ref ();

  bd_replay dut (.clk, .rst_n, .region_base(16'd0), .region_size(16'd64), .end_ptr,
    .start, .stop(1'b0), .sync_cycle, .cycle_start, .tick, .ts, .req, .req_data, .gnt, .rvalid, .rdata, .txd, .txen,
    .busy, .done, .rd_ptr, .pkt_count, .underrun);

  always #5 clk = ~clk;

  // timestamp: one tick every 3 clocks
  initial forever begin
    repeat (2) @(negedge clk);
    @(negedge clk) tick = 1'b1; ts = ts + 1;
    @(negedge clk) tick = 1'b0;
  end
  // memory model with random grant delay
  always @(negedge clk) gnt <= req && ($urandom % 2 == 0);
  always @(posedge clk) begin
    rvalid <= req && gnt;
    if (req && gnt) rdata <= mem[req_data.addr[5:0]];
  end
  // observe the line
  always @(posedge clk) if (rst_n) begin
    if (txen && !prev_txen) begin
      if (mode == 0) bit_first_ts = ts;
      else if (mode == 1) frame_first_ts = ts;
      else sync_first_ts = ts;
    end
    if (mode == 0 && tick && txen) bit_samples.push_back(txd);
    if (mode == 1 && txen) frame_clk.push_back(txd);
    if (mode == 2 && tick && txen) sync_samples.push_back(txd);
    if (!txen && prev_txen) mode++;
    prev_txen = txen;
    n_done += int'(done);
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [7:0] pl[$];
    logic [7:0] fr[$];
    logic code[$];
    logic [47:0] bits48;
    mode = 0; prev_txen = 1'b0;
    // bit-level packet: 6 bytes at timestamp 100
    bits48 = 48'hC3_5A_F0_0F_81_7E;
    mem[0] = {ID_BIT_A, 8'h00, 16'd6};
    mem[1] = 32'd100;
    mem[2] = bits48[31:0];
    mem[3] = {16'd0, bits48[47:32]};
    // frame-level packet: frame ID 7, 4 payload bytes, at timestamp 400
    pl = {8'hDE, 8'hAD, 8'hBE, 8'hEF};
    fr_ref.build_frame(1'b0, 1'b0, 1'b1, 11'd7, 6'd1, pl, FCRC_INIT_A, fr);
    mem[4] = {ID_FRAME_A, 8'h00, 16'(fr.size())};
    mem[5] = 32'd400;
    for (int w = 0; w < 3; w++)
      mem[6 + w] = {fr[4*w+3], fr[4*w+2], fr[4*w+1], fr[4*w]};
    end_ptr = 16'd9;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    wait (n_done == 1);
    repeat (20) @(negedge clk);
    // bit-level check
    check(bit_first_ts == 32'd100 || bit_first_ts == 32'd101,
          $sformatf("bit packet started at ts %0d", bit_first_ts));
    check(bit_samples.size() == 48, $sformatf("%0d samples, want 48", bit_samples.size()));
    for (int i = 0; i < 48 && i < bit_samples.size(); i++)
      check(bit_samples[i] == bits48[i], $sformatf("sample %0d", i));
    // frame-level check: one bit per 8 clocks, sampled mid-bit
    fr_ref.code_frame(fr, 5, -1, 1'b0, code);
    check(frame_first_ts == 32'd400 || frame_first_ts == 32'd401,
          $sformatf("frame started at ts %0d", frame_first_ts));
    check(frame_clk.size() == 8 * code.size(),
          $sformatf("frame lasted %0d clocks, want %0d", frame_clk.size(), 8 * code.size()));
    for (int i = 0; i < code.size() && 8 * i + 4 < frame_clk.size(); i++)
      check(frame_clk[8 * i + 4] == code[i], $sformatf("coded bit %0d", i));
    check(pkt_count == 16'd2 && rd_ptr == 16'd9 && !busy && !underrun, "final state");
    // cycle-aligned replay of the bit-level packet, 20 ticks after the cycle start
    mem[1] = 32'd20;
    end_ptr = 16'd4;
    sync_cycle = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (300) @(negedge clk);
    check(busy && !txen && mode == 2, "cycle-aligned replay did not wait for the cycle start");
    cycle_start = 1'b1; cs_ts = ts;
    @(negedge clk) cycle_start = 1'b0;
    wait (n_done == 2);
    repeat (20) @(negedge clk);
    check(sync_first_ts == cs_ts + 20 || sync_first_ts == cs_ts + 21,
          $sformatf("aligned packet started at ts %0d, cycle start at %0d", sync_first_ts, cs_ts));
    check(sync_samples.size() == 48, $sformatf("%0d aligned samples, want 48", sync_samples.size()));
    for (int i = 0; i < 48 && i < sync_samples.size(); i++)
      check(sync_samples[i] == bits48[i], $sformatf("aligned sample %0d", i));
    check(pkt_count == 16'd3 && rd_ptr == 16'd4 && !busy, "final state after aligned replay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
