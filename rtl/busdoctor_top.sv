// busdoctor_top: the FPGA logic of a BusDoctor tester node for one FlexRay
// channel.
//
// A BusDoctor listens to the FlexRay bus, diagnoses what it sees with sixteen
// fault flags, records the traffic for a host processor, and can inject
// logged traffic back into the bus. Its parts, all following the document's
// architecture:
//   receive      bd_bit_strobe -> bd_frame_decoder (syntax flags)
//   diagnosis    bd_schedule + bd_error_check (timing and content flags),
//                bd_flag_map (standard vSS flags, sticky flags, counters,
//                external flag pins)
//   monitoring   frame level: decoded frame bytes -> bd_pkt_writer;
//                bit level: bd_bit_recorder -> bd_pkt_writer
//   injection    bd_replay (replay of logged packets at their timestamps,
//                absolute or counted from the next cycle start)
//   exchange     bd_arbiter -> bd_dpram <- bd_host_if (host processor)
//   time base    bd_timestamp (32 bits, 40 ns)
// The DPRAM is split into three ring regions: frame packets (first quarter),
// bit packets (middle half) and replay packets (last quarter); this split,
// the register map and the single channel per instance are this design's.
// The host processor, its software and the bus driver (physical layer) are
// outside: the host bus and rxd/txd/txen are brought out as ports.
//
// Interface: clk is the 80 MHz sample clock (8 samples per 10 Mbit/s bit),
// rst_n an asynchronous active-low reset. rxd is the receive line from the
// bus driver, txd/txen the transmit line and its enable. The host bus is
// word-addressed with one clock read latency (see bd_host_if). flag_pins and
// vss_pins pulse for one clock per diagnosed event.
module busdoctor_top
  import bd_pkg::*;
#(
  parameter int unsigned DPRAM_DEPTH = 4096,   // 32-bit words
  parameter bit          CHANNEL_B   = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // FlexRay bus driver
  input  logic        rxd,
  output logic        txd,
  output logic        txen,
  // host processor
  input  logic        host_cs,
  input  logic        host_we,
  input  logic [15:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  output logic        host_rvalid,
  // diagnosis pins
  output flags_t      flag_pins,
  output logic [3:0]  vss_pins
);
  localparam logic [15:0] FRAME_BASE  = 16'(0);
  localparam logic [15:0] FRAME_SIZE  = 16'(DPRAM_DEPTH / 4);
  localparam logic [15:0] BIT_BASE    = 16'(DPRAM_DEPTH / 4);
  localparam logic [15:0] BIT_SIZE    = 16'(DPRAM_DEPTH / 2);
  localparam logic [15:0] REPLAY_BASE = 16'(3 * DPRAM_DEPTH / 4);
  localparam logic [15:0] REPLAY_SIZE = 16'(DPRAM_DEPTH / 4);

  // time base
  logic        ts_tick, ts_clear;
  logic [31:0] ts;

  bd_timestamp u_ts (.clk, .rst_n, .clear(ts_clear), .tick(ts_tick), .ts);

  // receive path
  logic rx_voted, bit_valid, bit_val;

  bd_bit_strobe u_strobe (.clk, .rst_n, .rxd, .voted(rx_voted), .bit_valid, .bit_val);

  logic       bus_idle, tss_start, frame_start, byte_valid, hdr_valid, frame_end, frame_ok;
  logic [7:0] byte_data;
  fr_header_t hdr;
  logic       coderr, tssviol, hcrcerr, fcrcerr, feserr, symb;

  bd_frame_decoder #(.FCRC_INIT(CHANNEL_B ? FCRC_INIT_B : FCRC_INIT_A)) u_dec (
    .clk, .rst_n, .bit_valid, .bit_val, .idle(bus_idle), .tss_start, .frame_start,
    .byte_valid, .byte_data, .hdr_valid, .hdr, .frame_end, .frame_ok,
    .coderr, .tssviol, .hcrcerr, .fcrcerr, .feserr, .symb);

  // configuration and status
  logic        mon_frame_en, mon_bit_en, sched_en, replay_start, replay_stop, replay_sync;
  logic        clear_cnt, clear_ovf;
  flags_t      clear_mask;
  logic [15:0] frame_rd, bit_rd, replay_end;
  logic [15:0] static_slot_mt, symwin_mt, cycle_mt;
  logic [10:0] n_static, n_minislots;
  logic [7:0]  minislot_mt;
  logic [6:0]  static_plen;

  // schedule and diagnosis
  seg_e        seg;
  logic [10:0] slot_id;
  logic [5:0]  cycle;
  logic        slot_start, seg_start, cycle_start;

  bd_schedule u_sched (
    .clk, .rst_n, .enable(sched_en), .static_slot_mt, .n_static, .minislot_mt,
    .n_minislots, .symwin_mt, .cycle_mt, .bus_idle, .seg, .slot_id, .cycle,
    .slot_start, .seg_start, .cycle_start);

  flags_t flags;

  bd_error_check u_chk (
    .clk, .rst_n, .sched_en, .static_plen, .bus_idle, .tss_start, .frame_start,
    .hdr_valid, .hdr, .frame_ok, .coderr, .tssviol, .hcrcerr, .fcrcerr, .feserr,
    .symb, .seg, .slot_id, .cycle, .slot_start, .seg_start, .flags);

  flags_t      sticky;
  logic [3:0]  vss_sticky;
  logic [15:0] count [16];

  bd_flag_map u_map (
    .clk, .rst_n, .flags_in(flags), .clear_mask, .clear_cnt, .pin_flags(flag_pins),
    .vss_pulse(vss_pins), .sticky, .vss_sticky, .count);

  // monitoring: frame level
  logic [31:0] frame_ts;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         frame_ts <= '0;
    else if (tss_start) frame_ts <= ts;

  logic        req [3];
  mem_req_t    rq  [3];
  logic        gnt [3];
  logic        rvalid [3];
  logic [31:0] arb_rdata;

  logic [15:0] frame_wr, frame_pkts, bit_wr, bit_pkts;
  logic        frame_ovf, bit_ovf, frame_busy, bit_busy;

  bd_pkt_writer u_frame_wr (
    .clk, .rst_n, .region_base(FRAME_BASE), .region_size(FRAME_SIZE), .rd_ptr(frame_rd),
    .clear_ovf, .pkt_start(frame_start && mon_frame_en),
    .pkt_id(CHANNEL_B ? ID_FRAME_B : ID_FRAME_A), .pkt_ts(frame_ts),
    .byte_valid, .byte_data, .pkt_end(frame_end), .busy(frame_busy),
    .req(req[0]), .req_data(rq[0]), .gnt(gnt[0]),
    .wr_ptr(frame_wr), .overflow(frame_ovf), .pkt_count(frame_pkts));

  // monitoring: bit level
  logic        b_start, b_valid, b_end;
  logic [7:0]  b_id, b_data;
  logic [31:0] b_ts;

  bd_bit_recorder #(.PKT_ID(CHANNEL_B ? ID_BIT_B : ID_BIT_A)) u_bitrec (
    .clk, .rst_n, .enable(mon_bit_en), .tick(ts_tick), .ts, .rxd(rx_voted),
    .wr_busy(bit_busy), .pkt_start(b_start), .pkt_id(b_id), .pkt_ts(b_ts),
    .byte_valid(b_valid), .byte_data(b_data), .pkt_end(b_end));

  bd_pkt_writer u_bit_wr (
    .clk, .rst_n, .region_base(BIT_BASE), .region_size(BIT_SIZE), .rd_ptr(bit_rd),
    .clear_ovf, .pkt_start(b_start), .pkt_id(b_id), .pkt_ts(b_ts),
    .byte_valid(b_valid), .byte_data(b_data), .pkt_end(b_end), .busy(bit_busy),
    .req(req[1]), .req_data(rq[1]), .gnt(gnt[1]),
    .wr_ptr(bit_wr), .overflow(bit_ovf), .pkt_count(bit_pkts));

  // injection
  logic        replay_busy, replay_done, replay_underrun;
  logic [15:0] replay_ptr, replay_pkts;

  bd_replay u_replay (
    .clk, .rst_n, .region_base(REPLAY_BASE), .region_size(REPLAY_SIZE),
    .end_ptr(replay_end), .start(replay_start), .stop(replay_stop),
    .sync_cycle(replay_sync), .cycle_start, .tick(ts_tick), .ts,
    .req(req[2]), .req_data(rq[2]), .gnt(gnt[2]), .rvalid(rvalid[2]), .rdata(arb_rdata),
    .txd, .txen, .busy(replay_busy), .done(replay_done), .rd_ptr(replay_ptr),
    .pkt_count(replay_pkts), .underrun(replay_underrun));

  // DPRAM and its two sides
  logic        a_en, a_we;
  logic [15:0] a_addr;
  logic [31:0] a_wdata, a_rdata;

  bd_arbiter #(.N(3)) u_arb (
    .clk, .rst_n, .req, .rq, .gnt, .rvalid, .rdata(arb_rdata),
    .mem_en(a_en), .mem_we(a_we), .mem_addr(a_addr), .mem_wdata(a_wdata),
    .mem_rdata(a_rdata));

  logic        b_en, b_we;
  logic [15:0] b_addr;
  logic [31:0] b_wdata, b_rdata;

  bd_dpram #(.DEPTH(DPRAM_DEPTH)) u_dpram (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  bd_host_if u_host (
    .clk, .rst_n, .cs(host_cs), .we(host_we), .addr(host_addr), .wdata(host_wdata),
    .rdata(host_rdata), .rvalid(host_rvalid),
    .mem_en(b_en), .mem_we(b_we), .mem_addr(b_addr), .mem_wdata(b_wdata),
    .mem_rdata(b_rdata),
    .mon_frame_en, .mon_bit_en, .sched_en, .replay_start, .replay_stop, .replay_sync, .ts_clear,
    .clear_cnt, .clear_ovf, .clear_mask, .frame_rd, .bit_rd, .replay_end,
    .static_slot_mt, .n_static, .minislot_mt, .n_minislots, .symwin_mt, .cycle_mt,
    .static_plen, .sticky, .vss_sticky, .ts, .frame_wr, .bit_wr, .replay_ptr,
    .replay_busy, .replay_underrun, .overflow({bit_ovf, frame_ovf}), .seg, .cycle,
    .slot_id, .frame_pkts, .bit_pkts, .replay_pkts, .count);

  // the frame and bit writers never read
  assert property (@(posedge clk) disable iff (!rst_n) !(req[0] && !rq[0].we))
    else $error("frame writer issued a read");
endmodule
