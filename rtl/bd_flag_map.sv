// bd_flag_map: folds the sixteen BusDoctor flags into the four status flags
// of a standard FlexRay controller and keeps sticky copies for the host.
//
// The grouping is the one of the test campaign: CODERR, TSSVIOL, HCRCERR,
// FCRCERR and FESERR are syntax errors; BVIOL, SWVIOL, NITVIOL and SOVERR are
// boundary violations; NERR, SSERR, FIDERR, CCERR and SPLERR are content
// errors; VCE is a valid frame. SYMB has no standard counterpart. Sticky
// registers and per-flag event counters (COUNT_W bits, saturating) are this
// design's additions so that software can report which flags were raised.
//
// Interface: flags_in is a pulse vector. vss_pulse and pin_flags are the same
// events one clock later, for external pins. clear_mask clears sticky bits
// (write-one-to-clear from the host) and clear_cnt clears all counters.
module bd_flag_map
  import bd_pkg::*;
#(
  parameter int unsigned COUNT_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flags_t             flags_in,
  input  flags_t             clear_mask,
  input  logic               clear_cnt,
  output flags_t             pin_flags,
  output logic [3:0]         vss_pulse,
  output flags_t             sticky,
  output logic [3:0]         vss_sticky,
  output logic [COUNT_W-1:0] count [16]
);
  logic [3:0] vss_d;

  always_comb begin
    vss_d = '0;
    vss_d[VSS_VALID]   = |(flags_in & VALID_MASK);
    vss_d[VSS_SYNTAX]  = |(flags_in & SYNTAX_MASK);
    vss_d[VSS_CONTENT] = |(flags_in & CONTENT_MASK);
    vss_d[VSS_BVIOL]   = |(flags_in & BVIOL_MASK);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pin_flags <= '0; vss_pulse <= '0; sticky <= '0; vss_sticky <= '0;
      for (int i = 0; i < 16; i++) count[i] <= '0;
    end else begin
      pin_flags  <= flags_in;
      vss_pulse  <= vss_d;
      sticky     <= (sticky & ~clear_mask) | flags_in;
      vss_sticky <= (vss_sticky & ~{|(clear_mask & BVIOL_MASK), |(clear_mask & CONTENT_MASK),
                                     |(clear_mask & SYNTAX_MASK), |(clear_mask & VALID_MASK)}) | vss_d;
      for (int i = 0; i < 16; i++) begin
        if (clear_cnt) count[i] <= '0;
        else if (flags_in[i] && count[i] != '1) count[i] <= count[i] + 1'b1;
      end
    end
  end

endmodule
