// tb_busdoctor_campaign: the fault-injection campaign of the BusDoctor, run
// against the complete design at its default parameters and scored the way
// the campaign is scored: by counting flags.
//
// The 15 experiments run one after the other on a small schedule (3 static
// slots of 40 us, 20 minislots of 10 us, a 20 us symbol window, 400 us
// cycle). Each experiment injects its deviation once per cycle, in as many
// cycles as its number of deviations divided by 39 (6 to 28 cycles), next to
// a correct frame in static slot 1. Before an experiment the flag counters
// are cleared. After it, the BusDoctor counter of the experiment's flag must
// equal the number of deviations injected, the valid-frame counter must have
// counted every correct frame, and the pin of the matching standard flag
// must have pulsed at least once per deviation. Flags outside the
// experiment's expected set must stay at zero.
module tb_busdoctor_campaign;
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
  int vss_count [4];

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
      for (int i = 0; i < 4; i++) vss_count[i] += int'(vss_pins[i]);
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
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
  typedef struct { int dev; flag_e flag; int vss; } exp_t;
  exp_t exps [1:15];

  // one deviation of experiment e in the cycle starting at macrotick B
  task automatic deviation(input int e, input int B, input int c);
    unique case (e)
      1:  frame_at(B + 43, 0, 1, 2, c, 4, 5, 3, 0, -1);
      2:  frame_at(B + 43, 0, 1, 2, c, 4, 1, -1, 0, -1);
      3:  frame_at(B + 43, 0, 1, 2, c, 4, 5, -1, 0, 1);
      4:  frame_at(B + 43, 0, 1, 2, c, 4, 5, -1, 0, 6);
      5:  frame_at(B + 43, 0, 1, 2, c, 4, 5, -1, 1, -1);
      6:  frame_at(B + 70, 0, 1, 2, c, 4, 5, -1, 0, -1);
      7:  frame_at(B + 75, 0, 1, 3, c, 4, 5, -1, 0, -1);
      8:  symbol_at(B + 338);
      9:  frame_at(B + 350, 0, 1, 23, c, 4, 5, -1, 0, -1);
      10: begin frame_at(B + 42, 0, 1, 2, c, 4, 5, -1, 0, -1);
                frame_at(B + 60, 0, 1, 2, c, 4, 5, -1, 0, -1); end
      11: frame_at(B + 122, 0, 0, 4, c, 4, 5, -1, 0, -1);
      12: frame_at(B + 122, 1, 1, 4, c, 4, 5, -1, 0, -1);
      13: frame_at(B + 43, 0, 1, 9, c, 4, 5, -1, 0, -1);
      14: frame_at(B + 43, 0, 1, 2, c + 1, 4, 5, -1, 0, -1);
      15: frame_at(B + 43, 0, 1, 2, c, 6, 5, -1, 0, -1);
      default: ;
    endcase
  endtask

  initial begin
    logic [31:0] d;
    int c, k, vss_before;
    flags_t may;
    int seen [16];
    string names [16] = '{"CODERR", "TSSVIOL", "HCRCERR", "FCRCERR", "FESERR", "SYMB", "VCE",
                          "BVIOL", "SWVIOL", "NITVIOL", "SOVERR", "NERR", "SSERR", "FIDERR",
                          "CCERR", "SPLERR"};
    // deviations per experiment as in the campaign summary, and the flags
    exps[1]  = '{234, F_CODERR, VSS_SYNTAX};   exps[2]  = '{234, F_TSSVIOL, VSS_SYNTAX};
    exps[3]  = '{234, F_HCRCERR, VSS_SYNTAX};  exps[4]  = '{234, F_FCRCERR, VSS_SYNTAX};
    exps[5]  = '{234, F_FESERR, VSS_SYNTAX};   exps[6]  = '{1092, F_BVIOL, VSS_BVIOL};
    exps[7]  = '{468, F_BVIOL, VSS_BVIOL};     exps[8]  = '{46, F_SWVIOL, VSS_BVIOL};
    exps[9]  = '{46, F_NITVIOL, VSS_BVIOL};    exps[10] = '{78, F_SOVERR, VSS_BVIOL};
    exps[11] = '{78, F_NERR, VSS_CONTENT};     exps[12] = '{156, F_SSERR, VSS_CONTENT};
    exps[13] = '{78, F_FIDERR, VSS_CONTENT};   exps[14] = '{46, F_CCERR, VSS_CONTENT};
    exps[15] = '{234, F_SPLERR, VSS_CONTENT};
    foreach (pin_count[i]) pin_count[i] = 0;
    foreach (vss_count[i]) vss_count[i] = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    wr(16'h0A, 32'd40); wr(16'h0B, 32'd3); wr(16'h0C, 32'd10); wr(16'h0D, 32'd20);
    wr(16'h0E, 32'd20); wr(16'h0F, 32'(CYC)); wr(16'h10, 32'd2);
    @(negedge clk) host_cs = 1; host_we = 1; host_addr = 16'h00; host_wdata = 32'h27;
    @(posedge clk) cc_w = cc;
    @(negedge clk) host_cs = 0; host_we = 0;

    c = 0;
    for (int e = 1; e <= 15; e++) begin
      k = (exps[e].dev + 38) / 39;
      may = '0;
      if (e == 7 || e == 9) may = fl(F_FIDERR);
      if (e == 8) may = fl(F_SYMB);
      vss_before = vss_count[exps[e].vss];
      wr(16'h00, 32'h67);                           // keep enables, clear counters
      for (int i = 0; i < k; i++) begin
        frame_at(CYC * c + 3, 1'b1, 1'b1, 1, c, 4, 5, -1, 1'b0, -1);   // correct frame, slot 1
        deviation(e, CYC * c, c);
        c++;
        wait_mt(CYC * c - 8);
      end
      rd(16'h20 + 16'(exps[e].flag), d);
      $display("experiment %0d: %0d deviations, %s counted %0d, standard flag pulses %0d",
               e, k, names[exps[e].flag], d, vss_count[exps[e].vss] - vss_before);
      check(int'(d) == k, $sformatf("experiment %0d: %s counted %0d, injected %0d",
                                    e, names[exps[e].flag], d, k));
      seen[exps[e].flag] += int'(d);
      check(vss_count[exps[e].vss] - vss_before >= k,
            $sformatf("experiment %0d: standard flag pulsed %0d times", e, vss_count[exps[e].vss] - vss_before));
      // the correct slot-1 frame of every cycle must still count as valid
      rd(16'h20 + 16'(F_VCE), d);
      check(int'(d) >= k, $sformatf("experiment %0d: %0d valid frames, want at least %0d", e, d, k));
      for (int f = 0; f < 16; f++) begin
        if (f == int'(exps[e].flag) || f == int'(F_VCE) || may[f]) continue;
        rd(16'h20 + 16'(f), d);
        check(d == 0, $sformatf("experiment %0d: unexpected %s x%0d", e, names[f], d));
      end
    end
    for (int f = 0; f < 16; f++)
      if (f != int'(F_VCE) && f != int'(F_SYMB))
        check(seen[f] > 0, $sformatf("flag %s never counted", names[f]));
    $display("%0d cycles in the campaign", c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
