// tb_bd_error_check: drives decoder and schedule events directly and checks
// that exactly the expected diagnosis flags are raised, one clock later.
module tb_bd_error_check;
  import bd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sched_en = 1'b1;
  logic bus_idle, tss_start, frame_start, hdr_valid, frame_ok;
  logic coderr, tssviol, hcrcerr, fcrcerr, feserr, symb;
  fr_header_t hdr;
  seg_e seg;
  logic [10:0] slot_id;
  logic [5:0] cycle;
  logic slot_start, seg_start;
  flags_t flags;
  int checks = 0, failures = 0;

  bd_error_check dut (.clk, .rst_n, .sched_en, .static_plen(7'd8), .bus_idle, .tss_start,
    .frame_start, .hdr_valid, .hdr, .frame_ok, .coderr, .tssviol, .hcrcerr, .fcrcerr,
    .feserr, .symb, .seg, .slot_id, .cycle, .slot_start, .seg_start, .flags);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic quiet();
    {tss_start, frame_start, hdr_valid, frame_ok} = '0;
    {coderr, tssviol, hcrcerr, fcrcerr, feserr, symb} = '0;
    {slot_start, seg_start} = '0;
  endtask

  // apply the inputs set by the caller for one clock, then compare flags
  task automatic step(input flags_t want, input string what);
    @(posedge clk); #1;
    quiet();
    checks++;
    if (flags !== want) begin
      failures++;
      $display("FAIL: %s: flags %h want %h", what, flags, want);
    end
  endtask

  function automatic flags_t fl(input flag_e f);
    flags_t v;
    v = '0; v[f] = 1'b1;
    return v;
  endfunction

  function automatic fr_header_t mkhdr(input int fid, input int cyc, input int plen,
                                       input bit nfi, input bit sync, input bit startup);
    fr_header_t h;
    h = '0;
    h.fid = 11'(fid); h.cyc = 6'(cyc); h.plen = 7'(plen);
    h.nfi = nfi; h.sync = sync; h.startup = startup;
    return h;
  endfunction

  initial begin
    quiet();
    bus_idle = 1'b1; seg = SEG_STATIC; slot_id = 11'd2; cycle = 6'd5; hdr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // syntax flags pass straight through
    coderr = 1'b1;  step(fl(F_CODERR), "CODERR");
    tssviol = 1'b1; step(fl(F_TSSVIOL), "TSSVIOL");
    hcrcerr = 1'b1; step(fl(F_HCRCERR), "HCRCERR");
    fcrcerr = 1'b1; step(fl(F_FCRCERR), "FCRCERR");
    feserr = 1'b1;  step(fl(F_FESERR), "FESERR");
    symb = 1'b1;    step(fl(F_SYMB), "SYMB");

    // good static frame in slot 2, cycle 5
    slot_start = 1'b1; step('0, "slot start, bus idle");
    bus_idle = 1'b0; tss_start = 1'b1; step('0, "tss");
    frame_start = 1'b1; step('0, "frame start");
    hdr = mkhdr(2, 5, 8, 1, 0, 0); hdr_valid = 1'b1; step('0, "good header");
    frame_ok = 1'b1; step(fl(F_VCE), "VCE for a good frame");
    bus_idle = 1'b1;

    // content errors in the static segment
    slot_id = 11'd3; slot_start = 1'b1; step('0, "slot 3");
    frame_start = 1'b1; step('0, "frame start slot 3");
    hdr = mkhdr(4, 6, 7, 1, 0, 0); hdr_valid = 1'b1;
    step(fl(F_FIDERR) | fl(F_CCERR) | fl(F_SPLERR), "FIDERR+CCERR+SPLERR");
    frame_ok = 1'b1; step('0, "no VCE after a content error");

    // second frame in the same slot
    frame_start = 1'b1; step(fl(F_SOVERR), "SOVERR");

    // dynamic segment: null frame, sync and startup bits, no length check
    seg = SEG_DYNAMIC; slot_id = 11'd9; slot_start = 1'b1; seg_start = 1'b1;
    step('0, "dynamic segment start");
    frame_start = 1'b1; step('0, "dynamic frame start");
    hdr = mkhdr(9, 5, 3, 0, 0, 0); hdr_valid = 1'b1; step(fl(F_NERR), "NERR");
    slot_id = 11'd10; slot_start = 1'b1; step('0, "slot 10");
    frame_start = 1'b1; step('0, "frame start slot 10");
    hdr = mkhdr(10, 5, 3, 1, 1, 1); hdr_valid = 1'b1; step(fl(F_SSERR), "SSERR");

    // boundary violations
    bus_idle = 1'b0;
    slot_id = 11'd11; slot_start = 1'b1; step(fl(F_BVIOL), "BVIOL at slot boundary");
    seg = SEG_SYMBOL; seg_start = 1'b1; step(fl(F_BVIOL), "BVIOL at dynamic end");
    seg = SEG_NIT; seg_start = 1'b1; step(fl(F_SWVIOL), "SWVIOL at symbol window end");
    bus_idle = 1'b1;
    tss_start = 1'b1; step(fl(F_NITVIOL), "NITVIOL");

    // with the schedule off only syntax flags and VCE are left
    sched_en = 1'b0;
    seg = SEG_STATIC; frame_start = 1'b1; step('0, "frame start, schedule off");
    hdr = mkhdr(99, 1, 1, 1, 0, 0); hdr_valid = 1'b1; step('0, "no content check when off");
    frame_ok = 1'b1; step(fl(F_VCE), "VCE when off");
    bus_idle = 1'b0; slot_start = 1'b1; step('0, "no BVIOL when off");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
