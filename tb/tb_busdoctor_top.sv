// tb_busdoctor_top: end-to-end test of the BusDoctor at its default
// parameters, driven like the test campaign it was built for.
//
// A bus traffic generator drives FlexRay frames into rxd at planned
// macroticks of a small schedule (3 static slots of 40 us, 20 minislots of
// 10 us, a 20 us symbol window, 400 us cycle). The line is a wired AND of the
// generator and the BusDoctor's own transmitter, so replayed traffic is seen
// by its receiver. A host model uses the register and DPRAM interface.
//   cycle 0       good static and dynamic frames
//   cycles 1-15   one deviation each, in the order of the 15 experiments of
//                 the campaign (BSS, TSS, header CRC, frame CRC, FES,
//                 boundary + and -, symbol window, NIT, two frames in a slot,
//                 null frame and sync bit in the dynamic segment, frame ID,
//                 cycle count, static payload length)
//   cycle 16      a symbol in the symbol window
// After each cycle the sticky flags must hold the experiment's BusDoctor flag
// and standard flag, and nothing outside its allowed set. Then: the recorded
// frame and bit packets are read back and compared with the sent frames and
// their send times; the first frame packet and the first bit packet are
// replayed (frame level and bit level) and must be received and recorded
// again with the same bytes; a frame placed 3 us into the cycle is replayed
// in cycle-aligned mode and must be received as a valid frame 3 us after
// the next cycle start; a long burst with nobody reading must overflow
// the bit region. Every mechanism is counted and must occur at least once.
module tb_busdoctor_top;
  import bd_pkg::*;

  localparam int MT = 80;                 // clocks per macrotick
  localparam int CYC = 400;               // macroticks per cycle
  localparam int FRAME_BASE = 0, BIT_BASE = 1024, REPLAY_BASE = 3072;

  logic clk = 1'b0, rst_n = 1'b0;
  logic drv = 1'b1, rxd, txd, txen;
  logic host_cs = 1'b0, host_we = 1'b0, host_rvalid;
  logic [15:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  flags_t flag_pins;
  logic [3:0] vss_pins;
  int checks = 0, failures = 0;
  longint cc = 0, cc_w = 0;
  int pin_count [16];
  int n_arb_conflict = 0;
  bit cs_arm = 1'b0;
  logic [31:0] cs_ts;

  typedef logic bitq_t[$];
  typedef logic [7:0] byteq_t[$];

  busdoctor_top dut (.clk, .rst_n, .rxd, .txd, .txen, .host_cs, .host_we, .host_addr,
    .host_wdata, .host_rdata, .host_rvalid, .flag_pins, .vss_pins);

  tb_fr_coder fr_ref ();

  assign rxd = drv & (txen ? txd : 1'b1);

  always #6.25 clk = ~clk;

  always @(posedge clk) begin
    cc++;
    if (rst_n) begin
      for (int i = 0; i < 16; i++) pin_count[i] += int'(flag_pins[i]);
      if (int'(dut.req[0]) + int'(dut.req[1]) + int'(dut.req[2]) > 1) n_arb_conflict++;
      if (cs_arm && dut.cycle_start) begin cs_ts = dut.ts; cs_arm = 1'b0; end
    end
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- host model ----------------
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk) host_cs = 1; host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk) host_cs = 0; host_we = 0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk) host_cs = 1; host_we = 0; host_addr = a;
    @(negedge clk) host_cs = 0;
    d = host_rdata;
  endtask

  function automatic logic [15:0] mem_a(input int word);
    return 16'h8000 | 16'(word);
  endfunction

  // read the packet at word offset off of a region
  task automatic read_pkt(input int base, input int size, input int off,
                          output logic [7:0] id, output logic [31:0] ts,
                          output byteq_t bytes, output int next);
    logic [31:0] w;
    int len;
    rd(mem_a(base + off), w);
    id = w[31:24]; len = int'(w[15:0]);
    rd(mem_a(base + (off + 1) % size), ts);
    bytes = {};
    for (int i = 0; i < (len + 3) / 4; i++) begin
      rd(mem_a(base + (off + 2 + i) % size), w);
      for (int k = 0; k < 4; k++) if (4 * i + k < len) bytes.push_back(w[8*k +: 8]);
    end
    next = (off + 2 + (len + 3) / 4) % size;
  endtask

  // ---------------- bus traffic generator ----------------
  task automatic send_bits(input bitq_t q);
    foreach (q[i]) begin
      drv = q[i];
      repeat (8) @(negedge clk);
    end
    drv = 1'b1;
  endtask

  task automatic wait_mt(input int m);
    while (cc < cc_w + longint'(m) * MT) @(negedge clk);
  endtask

  // timestamp expected at the current clock (40 ns = 3.2 clocks)
  function automatic longint ts_now();
    return ((cc - cc_w - 1) * 25) / 80;
  endfunction

  byteq_t first_frame;
  longint first_ts;
  int n_frames_sent = 0;

  task automatic frame_at(input int m, input logic sync, input logic nfi, input int fid,
                          input int cyc, input int plen_bytes, input int tss,
                          input int bad_bss, input bit bad_fes, input int flip_byte);
    byteq_t pl, fr;
    bitq_t q;
    pl = {};
    for (int i = 0; i < plen_bytes; i++) pl.push_back(nfi ? 8'(17 * i + fid) : 8'h00);
    fr_ref.build_frame(sync, 1'b0, nfi, 11'(fid), 6'(cyc), pl, FCRC_INIT_A, fr);
    if (flip_byte >= 0) fr[flip_byte] = fr[flip_byte] ^ 8'h10;
    fr_ref.code_frame(fr, tss, bad_bss, bad_fes, q);
    wait_mt(m);
    if (n_frames_sent == 0) begin first_frame = fr; first_ts = ts_now(); end
    if (tss >= 3) n_frames_sent++;
    send_bits(q);
  endtask

  task automatic symbol_at(input int m);
    bitq_t q;
    for (int i = 0; i < 35; i++) q.push_back(1'b0);
    wait_mt(m);
    send_bits(q);
  endtask

  function automatic flags_t fl(input flag_e f);
    flags_t v;
    v = '0; v[f] = 1'b1;
    return v;
  endfunction

  function automatic logic [3:0] vss_of(input flags_t f);
    logic [3:0] v;
    v[VSS_VALID]   = |(f & VALID_MASK);
    v[VSS_SYNTAX]  = |(f & SYNTAX_MASK);
    v[VSS_CONTENT] = |(f & CONTENT_MASK);
    v[VSS_BVIOL]   = |(f & BVIOL_MASK);
    return v;
  endfunction

  // ---------------- the campaign ----------------
  initial begin
    logic [31:0] d, ts_got;
    logic [7:0] id;
    byteq_t bytes, bit_pkt;
    flags_t must, may;
    int B, off, nxt, n_pkts, wr_ptr, bit_len;
    logic [31:0] bit_ts;
    int replay_words;
    int mech_frame_pkt, mech_bit_pkt, mech_replay_frame, mech_replay_bit, mech_overflow;
    int mech_replay_sync;
    byteq_t pl, sync_frame;
    string names [16] = '{"CODERR", "TSSVIOL", "HCRCERR", "FCRCERR", "FESERR", "SYMB", "VCE",
                          "BVIOL", "SWVIOL", "NITVIOL", "SOVERR", "NERR", "SSERR", "FIDERR",
                          "CCERR", "SPLERR"};
    foreach (pin_count[i]) pin_count[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // schedule: 3 x 40 static, 20 x 10 dynamic, 20 symbol window, cycle 400
    wr(16'h0A, 32'd40); wr(16'h0B, 32'd3); wr(16'h0C, 32'd10); wr(16'h0D, 32'd20);
    wr(16'h0E, 32'd20); wr(16'h0F, 32'(CYC)); wr(16'h10, 32'd2);
    // monitors and schedule on, timestamp cleared, in one write
    @(negedge clk) host_cs = 1; host_we = 1; host_addr = 16'h00; host_wdata = 32'h27;
    @(posedge clk) cc_w = cc;
    @(negedge clk) host_cs = 0; host_we = 0;

    for (int c = 0; c <= 16; c++) begin
      B = CYC * c;
      frame_at(B + 3, 1'b1, 1'b1, 1, c, 4, 5, -1, 1'b0, -1);        // good frame, slot 1
      must = fl(F_VCE); may = '0;
      unique case (c)
        0:  frame_at(B + 122, 1'b0, 1'b1, 4, c, 8, 5, -1, 1'b0, -1);  // good dynamic frame
        1:  begin frame_at(B + 43, 0, 1, 2, c, 4, 5, 3, 0, -1);  must |= fl(F_CODERR);  end
        2:  begin frame_at(B + 43, 0, 1, 2, c, 4, 1, -1, 0, -1); must |= fl(F_TSSVIOL); end
        3:  begin frame_at(B + 43, 0, 1, 2, c, 4, 5, -1, 0, 1);  must |= fl(F_HCRCERR); end
        4:  begin frame_at(B + 43, 0, 1, 2, c, 4, 5, -1, 0, 6);  must |= fl(F_FCRCERR); end
        5:  begin frame_at(B + 43, 0, 1, 2, c, 4, 5, -1, 1, -1); must |= fl(F_FESERR);  end
        6:  begin frame_at(B + 70, 0, 1, 2, c, 4, 5, -1, 0, -1); must |= fl(F_BVIOL);   end
        7:  begin frame_at(B + 75, 0, 1, 3, c, 4, 5, -1, 0, -1); must |= fl(F_BVIOL);
                  may = fl(F_FIDERR); end
        8:  begin symbol_at(B + 338); must |= fl(F_SWVIOL); may = fl(F_SYMB); end
        9:  begin frame_at(B + 350, 0, 1, 23, c, 4, 5, -1, 0, -1); must |= fl(F_NITVIOL);
                  may = fl(F_FIDERR); end
        10: begin frame_at(B + 42, 0, 1, 2, c, 4, 5, -1, 0, -1);
                  frame_at(B + 60, 0, 1, 2, c, 4, 5, -1, 0, -1); must |= fl(F_SOVERR); end
        11: begin frame_at(B + 122, 0, 0, 4, c, 4, 5, -1, 0, -1); must |= fl(F_NERR);  end
        12: begin frame_at(B + 122, 1, 1, 4, c, 4, 5, -1, 0, -1); must |= fl(F_SSERR); end
        13: begin frame_at(B + 43, 0, 1, 9, c, 4, 5, -1, 0, -1);  must |= fl(F_FIDERR); end
        14: begin frame_at(B + 43, 0, 1, 2, c + 1, 4, 5, -1, 0, -1); must |= fl(F_CCERR); end
        15: begin frame_at(B + 43, 0, 1, 2, c, 6, 5, -1, 0, -1);  must |= fl(F_SPLERR); end
        16: begin symbol_at(B + 322); must |= fl(F_SYMB); end
        default: ;
      endcase
      wait_mt(B + CYC - 8);
      rd(16'h01, d);
      check((d[15:0] & must) == must && (d[15:0] & ~(must | may)) == '0,
            $sformatf("cycle %0d: flags %h, must %h, may %h", c, d[15:0], must, may));
      check((d[19:16] & vss_of(must)) == vss_of(must),
            $sformatf("cycle %0d: standard flags %b, want %b", c, d[19:16], vss_of(must)));
      wr(16'h01, 32'h0000_FFFF);
    end

    // ---- recorded frames ----
    rd(16'h03, d); wr_ptr = int'(d);
    rd(16'h12, d); n_pkts = int'(d);
    check(n_pkts == n_frames_sent, $sformatf("%0d frame packets, %0d frames sent", n_pkts, n_frames_sent));
    mech_frame_pkt = n_pkts;
    read_pkt(FRAME_BASE, 1024, 0, id, ts_got, bytes, nxt);
    check(id == ID_FRAME_A, "frame packet identifier");
    check(bytes == first_frame, "first frame packet content differs from the sent frame");
    check(longint'(ts_got) >= first_ts && longint'(ts_got) <= first_ts + 8,
          $sformatf("first frame timestamp %0d, sent at %0d", ts_got, first_ts));
    off = 0;
    for (int i = 0; i < n_pkts; i++) read_pkt(FRAME_BASE, 1024, off, id, ts_got, bytes, off);
    check(off == wr_ptr, "frame packets do not end at the write pointer");
    wr(16'h04, 32'(wr_ptr));                      // host consumed them

    // ---- recorded bit-level traffic ----
    rd(16'h13, d); mech_bit_pkt = int'(d);
    check(mech_bit_pkt >= n_frames_sent, $sformatf("%0d bit packets", mech_bit_pkt));
    read_pkt(BIT_BASE, 2048, 0, id, bit_ts, bit_pkt, nxt);
    check(id == ID_BIT_A, "bit packet identifier");
    check(longint'(bit_ts) >= first_ts && longint'(bit_ts) <= first_ts + 8,
          $sformatf("first bit packet timestamp %0d, sent at %0d", bit_ts, first_ts));
    // about 2.5 samples per bit: the TSS gives at least 10 low samples first
    check(bit_pkt.size() > 40 && bit_pkt[0] == 8'h00, $sformatf("bit packet of %0d bytes", bit_pkt.size()));
    bit_len = bit_pkt.size();

    // ---- replay: first frame at frame level, first bit packet at bit level ----
    wr(16'h00, 32'h03);                           // schedule off, monitors on
    wr(16'h01, 32'h0000_FFFF);
    rd(16'h02, d);
    wr(mem_a(REPLAY_BASE + 0), {ID_FRAME_A, 8'h00, 16'(first_frame.size())});
    wr(mem_a(REPLAY_BASE + 1), d + 32'd500);
    for (int i = 0; i < (first_frame.size() + 3) / 4; i++) begin
      logic [31:0] w;
      w = '0;
      for (int k = 0; k < 4; k++) if (4 * i + k < first_frame.size()) w[8*k +: 8] = first_frame[4*i+k];
      wr(mem_a(REPLAY_BASE + 2 + i), w);
    end
    replay_words = 2 + (first_frame.size() + 3) / 4;
    wr(mem_a(REPLAY_BASE + replay_words), {ID_BIT_A, 8'h00, 16'(bit_len)});
    wr(mem_a(REPLAY_BASE + replay_words + 1), d + 32'd2000);
    for (int i = 0; i < (bit_len + 3) / 4; i++) begin
      logic [31:0] w;
      w = '0;
      for (int k = 0; k < 4; k++) if (4 * i + k < bit_len) w[8*k +: 8] = bit_pkt[4*i+k];
      wr(mem_a(REPLAY_BASE + replay_words + 2 + i), w);
    end
    replay_words += 2 + (bit_len + 3) / 4;
    wr(16'h07, 32'(replay_words));
    wr(16'h00, 32'h0B);                           // monitors on, replay start
    repeat (4000 * 4) @(negedge clk);
    rd(16'h00, d); check(!d[8] && !d[9], "replay still busy or underrun");
    rd(16'h14, d); check(d == 32'd2, $sformatf("%0d packets replayed", d));
    rd(16'h12, d);
    check(int'(d) == n_pkts + 2, $sformatf("%0d frame packets after replay", d));
    read_pkt(FRAME_BASE, 1024, wr_ptr, id, ts_got, bytes, nxt);
    mech_replay_frame = int'(bytes == first_frame);
    check(bytes == first_frame, "frame-level replay not received as the original frame");
    read_pkt(FRAME_BASE, 1024, nxt, id, ts_got, bytes, nxt);
    mech_replay_bit = int'(bytes == first_frame);
    check(bytes == first_frame, "bit-level replay not received as the original frame");
    rd(16'h01, d); check(d[F_VCE] && d[15:0] == fl(F_VCE), $sformatf("flags after replay %h", d[15:0]));

    // ---- cycle-aligned replay: slot-1 frame of cycle 1, 75 ticks (3 us) into the cycle ----
    wr(16'h00, 32'h03);
    wr(16'h01, 32'h0000_FFFF);
    pl = {};
    for (int i = 0; i < 4; i++) pl.push_back(8'(17 * i + 1));
    fr_ref.build_frame(1'b1, 1'b0, 1'b1, 11'd1, 6'd1, pl, FCRC_INIT_A, sync_frame);
    wr(mem_a(REPLAY_BASE + 0), {ID_FRAME_A, 8'h00, 16'(sync_frame.size())});
    wr(mem_a(REPLAY_BASE + 1), 32'd75);
    for (int i = 0; i < (sync_frame.size() + 3) / 4; i++) begin
      logic [31:0] w;
      w = '0;
      for (int k = 0; k < 4; k++) if (4 * i + k < sync_frame.size()) w[8*k +: 8] = sync_frame[4*i+k];
      wr(mem_a(REPLAY_BASE + 2 + i), w);
    end
    wr(16'h07, 32'(2 + (sync_frame.size() + 3) / 4));
    cs_arm = 1'b1;
    wr(16'h00, 32'h40F);                          // monitors, schedule, aligned replay start
    repeat (CYC * MT + 400 * MT / 10) @(negedge clk);
    rd(16'h14, d); check(d == 32'd3, $sformatf("%0d packets replayed after aligned replay", d));
    read_pkt(FRAME_BASE, 1024, nxt, id, ts_got, bytes, nxt);
    check(bytes == sync_frame, "aligned replay not received as the original frame");
    check(!cs_arm && ts_got >= cs_ts + 32'd75 && ts_got <= cs_ts + 32'd80,
          $sformatf("aligned frame received at ts %0d, cycle start at %0d", ts_got, cs_ts));
    rd(16'h01, d);
    check(d[15:0] == fl(F_VCE), $sformatf("flags after aligned replay %h", d[15:0]));
    mech_replay_sync = int'(bytes == sync_frame && d[15:0] == fl(F_VCE));

    // ---- overflow: a long burst while nobody reads the bit region ----
    wr(16'h00, 32'h02);                           // bit monitor only
    for (int i = 0; i < 70000; i++) begin
      drv = i[0] | i[3];
      repeat (3) @(negedge clk);
    end
    drv = 1'b1;
    repeat (400) @(negedge clk);
    rd(16'h09, d);
    mech_overflow = int'(d[1]);
    check(d[1] && !d[0], $sformatf("overflow flags %b", d[1:0]));

    // ---- mechanisms ----
    for (int i = 0; i < 16; i++) begin
      rd(16'h20 + 16'(i), d);
      $display("flag %-8s counter %0d, pin pulses %0d", names[i], d, pin_count[i]);
      check(d != 0, $sformatf("flag %s never raised", names[i]));
      check(int'(d) == pin_count[i], $sformatf("flag %s counter differs from pin", names[i]));
    end
    $display("frame packets %0d, bit packets %0d, frame replay %0d, bit replay %0d, aligned replay %0d, overflow %0d, arbiter conflicts %0d",
             mech_frame_pkt, mech_bit_pkt, mech_replay_frame, mech_replay_bit, mech_replay_sync,
             mech_overflow, n_arb_conflict);
    check(mech_frame_pkt > 0 && mech_bit_pkt > 0, "no packets recorded");
    check(mech_replay_frame > 0 && mech_replay_bit > 0 && mech_replay_sync > 0,
          "replay mechanisms not seen");
    check(mech_overflow > 0, "overflow never happened");
    check(n_arb_conflict > 0, "arbiter never had two requests at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
