// tb_bd_bit_recorder: drives a sampled line with three bursts of random
// samples separated by idle and checks, against a model of the packing and
// end rule, the start timestamps, the packed bytes and where each packet
// ends. A second instance with MAX_BYTES = 3 checks the length limit.
module tb_bd_bit_recorder;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, rxd = 1'b1;
  logic [31:0] ts = '0;
  logic pkt_start, byte_valid, pkt_end, s_start, s_valid, s_end;
  logic [7:0] pkt_id, byte_data, s_id, s_data;
  logic [31:0] pkt_ts, s_ts;
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  logic [31:0] got_ts[$];
  int got_len[$], cur_len, s_bytes, s_pkts, s_cur, s_max;
  logic samples[$];

  bd_bit_recorder dut (.clk, .rst_n, .enable(1'b1), .tick, .ts, .rxd, .wr_busy(1'b0),
    .pkt_start, .pkt_id, .pkt_ts, .byte_valid, .byte_data, .pkt_end);
  bd_bit_recorder #(.MAX_BYTES(3), .PKT_ID(8'h12)) dut_s (.clk, .rst_n, .enable(1'b1), .tick,
    .ts, .rxd, .wr_busy(1'b0), .pkt_start(s_start), .pkt_id(s_id), .pkt_ts(s_ts),
    .byte_valid(s_valid), .byte_data(s_data), .pkt_end(s_end));

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (pkt_start) begin got_ts.push_back(pkt_ts); cur_len = 0; end
    if (byte_valid) begin got.push_back(byte_data); cur_len++; end
    if (pkt_end) got_len.push_back(cur_len);
    if (s_start) s_cur = 0;
    if (s_valid) begin s_bytes++; s_cur++; if (s_cur > s_max) s_max = s_cur; end
    if (s_end) s_pkts++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL: %s", what); end
  endtask

  // one sample per tick, ticks 3 clocks apart
  task automatic sample(input logic v);
    @(negedge clk) rxd = v; tick = 1'b1; ts = ts + 1;
    @(negedge clk) tick = 1'b0;
    @(negedge clk);
  endtask

  initial begin
    logic [31:0] want_ts[$];
    logic [7:0] want[$];
    int want_len[$];
    int ones, n;
    logic [7:0] b;
    cur_len = 0; s_bytes = 0; s_pkts = 0; s_cur = 0; s_max = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5; i++) sample(1'b1);
    for (int burst = 0; burst < 3; burst++) begin
      // model: packet starts at the first low sample
      want_ts.push_back(ts + 1);
      samples = {};
      for (int i = 0; i < 20 + 17 * burst; i++) samples.push_back((i == 0) ? 1'b0 : 1'($urandom));
      for (int i = 0; i < 100; i++) samples.push_back(1'b1);
      // model of the end rule: first byte boundary with 32 trailing ones
      ones = 0; n = 0;
      for (int i = 0; i < samples.size(); i++) begin
        ones = samples[i] ? ones + 1 : 0;
        b[i % 8] = samples[i];
        if (i % 8 == 7) begin
          want.push_back(b); n++;
          if (ones >= 32) break;
        end
      end
      want_len.push_back(n);
      foreach (samples[i]) sample(samples[i]);
    end
    repeat (10) @(negedge clk);
    check(got_ts.size() == 3 && got_len.size() == 3, $sformatf("%0d packets", got_len.size()));
    for (int p = 0; p < 3 && p < got_len.size(); p++) begin
      check(got_ts[p] == want_ts[p], $sformatf("packet %0d ts %0d want %0d", p, got_ts[p], want_ts[p]));
      check(got_len[p] == want_len[p], $sformatf("packet %0d len %0d want %0d", p, got_len[p], want_len[p]));
    end
    check(got.size() == want.size(), "byte count");
    for (int i = 0; i < want.size() && i < got.size(); i++)
      check(got[i] == want[i], $sformatf("byte %0d %h want %h", i, got[i], want[i]));
    check(pkt_id == 8'h11 && s_id == 8'h12, "packet identifiers");
    check(s_pkts > 3 && s_max == 3, $sformatf("limited: %0d packets, longest %0d bytes", s_pkts, s_max));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
