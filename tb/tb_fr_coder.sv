// tb_fr_coder: reference FlexRay frame builder for the testbenches, used
// through hierarchical function calls on an instance.
//
// build_frame makes the bytes of a frame (5 header bytes with header CRC,
// payload, 3 frame CRC bytes); code_frame turns bytes into the bits on the
// wire (TSS, FSS, BSS per byte, FES), with options to break the coding. The
// CRCs are computed by polynomial division over an explicit bit list,
// independently of the design's serial CRC registers.
module tb_fr_coder;

  // remainder of (init register, then the message bits) divided by poly
  function automatic logic [31:0] crc_div(input logic msg[$], input int n,
                                          input logic [31:0] poly, input logic [31:0] init);
    logic [31:0] r;
    logic top;
    r = init;
    foreach (msg[i]) begin
      top = r[n-1] ^ msg[i];
      r = (r << 1) & ((32'd1 << n) - 1);
      if (top) r = r ^ poly;
    end
    return r;
  endfunction

  function automatic void build_frame(input logic sync, input logic startup,
                                      input logic nfi, input logic [10:0] fid,
                                      input logic [5:0] cyc, input logic [7:0] payload[$],
                                      input logic [23:0] finit, output logic [7:0] out[$]);
    logic hb[$];
    logic all[$];
    logic [39:0] h;
    logic [10:0] hcrc;
    logic [23:0] fcrc;
    logic [6:0]  plen;
    out = {};
    plen = 7'(payload.size() / 2);
    hb.push_back(sync); hb.push_back(startup);
    for (int i = 10; i >= 0; i--) hb.push_back(fid[i]);
    for (int i = 6; i >= 0; i--) hb.push_back(plen[i]);
    hcrc = 11'(crc_div(hb, 11, 32'h385, 32'h01A));
    h = {1'b0, 1'b0, nfi, sync, startup, fid, plen, hcrc, cyc};
    for (int b = 4; b >= 0; b--) out.push_back(h[8*b +: 8]);
    foreach (payload[i]) out.push_back(payload[i]);
    foreach (out[i]) for (int k = 7; k >= 0; k--) all.push_back(out[i][k]);
    fcrc = 24'(crc_div(all, 24, 32'h5D6DCB, {8'd0, finit}));
    out.push_back(fcrc[23:16]); out.push_back(fcrc[15:8]); out.push_back(fcrc[7:0]);
  endfunction

  // wire coding; bad_bss: index of the byte whose BSS low bit is sent high
  // (-1 for none); bad_fes sends the FES low bit high
  function automatic void code_frame(input logic [7:0] bytes[$], input int tss_len,
                                     input int bad_bss, input bit bad_fes,
                                     output logic q[$]);
    q = {};
    for (int i = 0; i < tss_len; i++) q.push_back(1'b0);
    q.push_back(1'b1);                              // FSS
    foreach (bytes[i]) begin
      q.push_back(1'b1);
      q.push_back((i == bad_bss) ? 1'b1 : 1'b0);    // BSS
      for (int k = 7; k >= 0; k--) q.push_back(bytes[i][k]);
    end
    q.push_back(bad_fes ? 1'b1 : 1'b0);             // FES
    q.push_back(1'b1);
  endfunction

endmodule
