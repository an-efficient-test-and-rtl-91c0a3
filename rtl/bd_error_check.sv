// bd_error_check: collects the sixteen BusDoctor diagnosis flags.
//
// The syntax flags come straight from the frame decoder. This block adds the
// checks that need the schedule:
//   content  (at the header of each frame)
//     FIDERR  frame ID differs from the slot the frame started in
//     CCERR   cycle count differs from the local cycle counter
//     SPLERR  static-segment frame whose payload length is not the
//             configured static payload length
//     NERR    null frame in the dynamic segment
//     SSERR   sync or startup bit set in the dynamic segment
//   timing
//     BVIOL   bus not idle when a static slot or a segment boundary passes
//     SWVIOL  bus not idle at the end of the symbol window
//     NITVIOL a transmission starts in the network idle time
//     SOVERR  a second frame starts within one slot
//   VCE       a frame ends without syntax or content error
// The flag names and their meaning are the document's; the exact trigger
// conditions above are this design's reading of them. Schedule-based checks
// are made only while sched_en is high.
//
// Interface: inputs are the one-clock pulses of bd_frame_decoder and
// bd_schedule. flags is a one-clock pulse vector (bit order of bd_pkg::flag_e)
// issued one clock after the event.
module bd_error_check
  import bd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sched_en,
  input  logic [6:0]  static_plen,
  // decoder
  input  logic        bus_idle,
  input  logic        tss_start,
  input  logic        frame_start,
  input  logic        hdr_valid,
  input  fr_header_t  hdr,
  input  logic        frame_ok,
  input  logic        coderr,
  input  logic        tssviol,
  input  logic        hcrcerr,
  input  logic        fcrcerr,
  input  logic        feserr,
  input  logic        symb,
  // schedule
  input  seg_e        seg,
  input  logic [10:0] slot_id,
  input  logic [5:0]  cycle,
  input  logic        slot_start,
  input  logic        seg_start,
  output flags_t      flags
);
  seg_e        seg_f;
  logic [10:0] slot_f;
  logic [5:0]  cycle_f;
  logic        content_bad;
  logic [1:0]  frames_in_slot;
  flags_t      f;

  always_comb begin
    f = '0;
    f[F_CODERR]  = coderr;
    f[F_TSSVIOL] = tssviol;
    f[F_HCRCERR] = hcrcerr;
    f[F_FCRCERR] = fcrcerr;
    f[F_FESERR]  = feserr;
    f[F_SYMB]    = symb;
    f[F_VCE]     = frame_ok && !content_bad;
    if (sched_en) begin
      if (hdr_valid) begin
        f[F_FIDERR] = (hdr.fid != slot_f);
        f[F_CCERR]  = (hdr.cyc != cycle_f);
        f[F_SPLERR] = (seg_f == SEG_STATIC) && (hdr.plen != static_plen);
        f[F_NERR]   = (seg_f == SEG_DYNAMIC) && !hdr.nfi;
        f[F_SSERR]  = (seg_f == SEG_DYNAMIC) && (hdr.sync || hdr.startup);
      end
      f[F_BVIOL]   = !bus_idle && (slot_start || (seg_start && seg != SEG_NIT));
      f[F_SWVIOL]  = !bus_idle && seg_start && (seg == SEG_NIT);
      f[F_NITVIOL] = tss_start && (seg == SEG_NIT);
      f[F_SOVERR]  = frame_start && (frames_in_slot != 2'd0);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seg_f <= SEG_STATIC; slot_f <= '0; cycle_f <= '0;
      content_bad <= 1'b0; frames_in_slot <= '0; flags <= '0;
    end else begin
      flags <= f;
      if (frame_start) begin
        seg_f <= seg; slot_f <= slot_id; cycle_f <= cycle;
        content_bad <= 1'b0;
      end
      if (hdr_valid && |(f & CONTENT_MASK)) content_bad <= 1'b1;
      if (slot_start)
        frames_in_slot <= frame_start ? 2'd1 : 2'd0;
      else if (frame_start && frames_in_slot != 2'd3)
        frames_in_slot <= frames_in_slot + 2'd1;
    end
  end
endmodule
