// tb_bd_frame_decoder: feeds coded FlexRay frames bit by bit into the
// decoder and checks the decoded bytes and header, frame_ok, and each syntax
// flag for a frame broken in the matching way (bad BSS, short TSS, corrupted
// header, corrupted payload, bad FES, long low phase = symbol). Frames and
// CRCs come from the reference builder tb_fr_coder.


module tb_bd_frame_decoder;
  import bd_pkg::*;

  typedef logic bitq_t[$];
  typedef logic [7:0] byteq_t[$];

  tb_fr_coder fr_ref ();


  logic clk = 1'b0, rst_n = 1'b0;
  logic bit_valid = 1'b0, bit_val = 1'b1;
  logic idle, tss_start, frame_start, byte_valid, hdr_valid, frame_end, frame_ok;
  logic [7:0] byte_data;
  fr_header_t hdr;
  logic coderr, tssviol, hcrcerr, fcrcerr, feserr, symb;
  int checks = 0, failures = 0;
  int n_ok, n_cod, n_tss, n_hcrc, n_fcrc, n_fes, n_sym, n_end, n_hdr;
  logic [7:0] got[$];

  bd_frame_decoder dut (.clk, .rst_n, .bit_valid, .bit_val, .idle, .tss_start,
    .frame_start, .byte_valid, .byte_data, .hdr_valid, .hdr, .frame_end, .frame_ok,
    .coderr, .tssviol, .hcrcerr, .fcrcerr, .feserr, .symb);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (byte_valid) got.push_back(byte_data);
    n_ok += int'(frame_ok); n_cod += int'(coderr); n_tss += int'(tssviol);
    n_hcrc += int'(hcrcerr); n_fcrc += int'(fcrcerr); n_fes += int'(feserr);
    n_sym += int'(symb); n_end += int'(frame_end); n_hdr += int'(hdr_valid);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_bits(input bitq_t q);
    foreach (q[i]) begin
      @(negedge clk); bit_valid = 1'b1; bit_val = q[i];
      @(negedge clk); bit_valid = 1'b0;
      repeat (2) @(negedge clk);
    end
  endtask

  task automatic send_coded(input byteq_t b, input int tss, input int bad_bss, input bit bad_fes);
    bitq_t q;
    fr_ref.code_frame(b, tss, bad_bss, bad_fes, q);
    send_bits(q);
  endtask

  task automatic idle_bits(input int n);
    bitq_t q;
    for (int i = 0; i < n; i++) q.push_back(1'b1);
    send_bits(q);
  endtask

  task automatic clear_counts();
    repeat (3) @(negedge clk);
    {n_ok, n_cod, n_tss, n_hcrc, n_fcrc, n_fes, n_sym, n_end, n_hdr} = '0;
    got = {};
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byteq_t pl, fr, bad;
    bitq_t  q;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    idle_bits(12);
    check(idle, "not idle after 12 recessive bits");

    // 1: good frame, 8-byte payload, sync bit set
    pl = {8'h11, 8'h22, 8'h33, 8'h44, 8'hA5, 8'h5A, 8'hFF, 8'h00};
    fr_ref.build_frame(1'b1, 1'b0, 1'b1, 11'd5, 6'd3, pl, FCRC_INIT_A, fr);
    clear_counts();
    send_coded(fr, 5, -1, 1'b0); idle_bits(12); clear_counts_keep();
    check(n_ok == 1 && n_end == 1, $sformatf("good frame: ok=%0d end=%0d", n_ok, n_end));
    check(n_cod + n_tss + n_hcrc + n_fcrc + n_fes + n_sym == 0, "good frame raised an error");
    check(got.size() == fr.size(), $sformatf("good frame: %0d bytes, want %0d", got.size(), fr.size()));
    for (int i = 0; i < fr.size() && i < got.size(); i++)
      check(got[i] == fr[i], $sformatf("byte %0d: %h want %h", i, got[i], fr[i]));
    check(n_hdr == 1 && hdr.fid == 11'd5 && hdr.cyc == 6'd3 && hdr.plen == 7'd4 &&
          hdr.sync && !hdr.startup && hdr.nfi, "header fields");

    // 2: byte start sequence broken in byte 2
    clear_counts();
    send_coded(fr, 5, 2, 1'b0); idle_bits(12); clear_counts_keep();
    check(n_cod == 1 && n_ok == 0 && n_end == 1, "bad BSS: CODERR expected");

    // 3: TSS of one bit
    clear_counts();
    send_coded(fr, 1, -1, 1'b0); idle_bits(12); clear_counts_keep();
    check(n_tss == 1 && n_ok == 0, "short TSS: TSSVIOL expected");

    // 4: corrupted frame ID (header CRC no longer matches)
    bad = fr; bad[1] = bad[1] ^ 8'h04;
    clear_counts();
    send_coded(bad, 5, -1, 1'b0); idle_bits(12); clear_counts_keep();
    check(n_hcrc == 1 && n_ok == 0 && n_hdr == 0, "header corrupted: HCRCERR expected");

    // 5: corrupted payload byte
    bad = fr; bad[7] = bad[7] ^ 8'h80;
    clear_counts();
    send_coded(bad, 5, -1, 1'b0); idle_bits(12); clear_counts_keep();
    check(n_fcrc == 1 && n_ok == 0 && n_hdr == 1, "payload corrupted: FCRCERR expected");

    // 6: frame end sequence high
    clear_counts();
    send_coded(fr, 5, -1, 1'b1); idle_bits(12); clear_counts_keep();
    check(n_fes == 1 && n_ok == 0, "bad FES: FESERR expected");

    // 7: symbol: 35 low bits
    clear_counts();
    q = {};
    for (int i = 0; i < 35; i++) q.push_back(1'b0);
    send_bits(q); idle_bits(12); clear_counts_keep();
    check(n_sym == 1 && n_tss == 0 && n_end == 0, "long low phase: SYMB expected");

    // 8: null frame, no payload, in the next frame still decodes fine
    pl = {};
    fr_ref.build_frame(1'b0, 1'b0, 1'b0, 11'd40, 6'd63, pl, FCRC_INIT_A, fr);
    clear_counts();
    send_coded(fr, 7, -1, 1'b0); idle_bits(12); clear_counts_keep();
    check(n_ok == 1 && got.size() == 8 && !hdr.nfi && hdr.fid == 11'd40, "null frame");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clear_counts_keep();
    repeat (3) @(negedge clk);
  endtask
endmodule
