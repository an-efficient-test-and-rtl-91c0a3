// bd_host_if: configuration and data interface between the host processor
// and the BusDoctor logic.
//
// The processor sees one word-addressed space. With addr[15] set it reaches
// the DPRAM directly (port B), where recorded packets are read and replay
// packets are written. Otherwise addr[7:0] selects a register:
//   0x00 CTRL     W  [0] frame monitor on  [1] bit monitor on  [2] schedule on
//                    [3] replay start  [4] replay stop  [5] clear timestamp
//                    [6] clear flag counters  [7] clear overflow   ([3]-[7] pulse)
//                    [10] replay aligned to the cycle start
//                 R  [2:0] and [10] as written, [8] replay busy,
//                    [9] replay underrun
//   0x01 FLAGS    R  [15:0] sticky BusDoctor flags, [19:16] sticky vSS flags
//                 W  write one to clear
//   0x02 TS       R  timestamp
//   0x03 FRAME_WR R  frame region write pointer   0x04 FRAME_RD RW read pointer
//   0x05 BIT_WR   R  bit region write pointer     0x06 BIT_RD   RW read pointer
//   0x07 RPL_END  RW replay end pointer           0x08 RPL_PTR  R  replay pointer
//   0x09 OVF      R  [0] frame region, [1] bit region overflow
//   0x0A..0x10    RW static slot, static slots, minislot, minislots,
//                    symbol window, cycle length (macroticks), static payload
//                    length (16-bit words)
//   0x11 POS      R  {seg[1:0], cycle[5:0], slot[10:0]}
//   0x12..0x14    R  packets: frame region, bit region, replayed
//   0x20..0x2F    R  event counter of flag 0..15
// A configuration and data interface in front of the processor is the
// document's; the register map, the reset values and the use of addr[15]
// are this design's. The reset schedule is a 3000-macrotick (3 ms) cycle,
// the cycle length of the test campaign.
//
// Timing: a write takes effect at the clock edge of the request; read data
// appears with rvalid one clock after the request.
module bd_host_if
  import bd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // host bus
  input  logic        cs,
  input  logic        we,
  input  logic [15:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  // DPRAM port B
  output logic        mem_en,
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata,
  // control
  output logic        mon_frame_en,
  output logic        mon_bit_en,
  output logic        sched_en,
  output logic        replay_start,
  output logic        replay_stop,
  output logic        replay_sync,
  output logic        ts_clear,
  output logic        clear_cnt,
  output logic        clear_ovf,
  output flags_t      clear_mask,
  output logic [15:0] frame_rd,
  output logic [15:0] bit_rd,
  output logic [15:0] replay_end,
  output logic [15:0] static_slot_mt,
  output logic [10:0] n_static,
  output logic [7:0]  minislot_mt,
  output logic [10:0] n_minislots,
  output logic [15:0] symwin_mt,
  output logic [15:0] cycle_mt,
  output logic [6:0]  static_plen,
  // status
  input  flags_t      sticky,
  input  logic [3:0]  vss_sticky,
  input  logic [31:0] ts,
  input  logic [15:0] frame_wr,
  input  logic [15:0] bit_wr,
  input  logic [15:0] replay_ptr,
  input  logic        replay_busy,
  input  logic        replay_underrun,
  input  logic [1:0]  overflow,
  input  seg_e        seg,
  input  logic [5:0]  cycle,
  input  logic [10:0] slot_id,
  input  logic [15:0] frame_pkts,
  input  logic [15:0] bit_pkts,
  input  logic [15:0] replay_pkts,
  input  logic [15:0] count [16]
);
  logic        reg_wr, reg_rd, mem_sel_q;
  logic [31:0] reg_q;

  assign reg_wr = cs && we && !addr[15];
  assign reg_rd = cs && !we && !addr[15];

  assign mem_en    = cs && addr[15];
  assign mem_we    = we;
  assign mem_addr  = {1'b0, addr[14:0]};
  assign mem_wdata = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {mon_frame_en, mon_bit_en, sched_en, replay_sync} <= '0;
      {replay_start, replay_stop, ts_clear, clear_cnt, clear_ovf} <= '0;
      clear_mask <= '0;
      frame_rd <= '0; bit_rd <= '0; replay_end <= '0;
      static_slot_mt <= 16'd50;  n_static <= 11'd30;
      minislot_mt    <= 8'd5;    n_minislots <= 11'd200;
      symwin_mt      <= 16'd50;  cycle_mt <= 16'd3000;
      static_plen    <= 7'd8;
      rvalid <= 1'b0; mem_sel_q <= 1'b0; reg_q <= '0;
    end else begin
      {replay_start, replay_stop, ts_clear, clear_cnt, clear_ovf} <= '0;
      clear_mask <= '0;
      if (reg_wr) begin
        unique case (addr[7:0])
          8'h00: begin
            {sched_en, mon_bit_en, mon_frame_en} <= wdata[2:0];
            replay_sync <= wdata[10];
            {clear_ovf, clear_cnt, ts_clear, replay_stop, replay_start} <= wdata[7:3];
          end
          8'h01: clear_mask <= wdata[15:0];
          8'h04: frame_rd <= wdata[15:0];
          8'h06: bit_rd <= wdata[15:0];
          8'h07: replay_end <= wdata[15:0];
          8'h0A: static_slot_mt <= wdata[15:0];
          8'h0B: n_static <= wdata[10:0];
          8'h0C: minislot_mt <= wdata[7:0];
          8'h0D: n_minislots <= wdata[10:0];
          8'h0E: symwin_mt <= wdata[15:0];
          8'h0F: cycle_mt <= wdata[15:0];
          8'h10: static_plen <= wdata[6:0];
          default: ;
        endcase
      end
      rvalid    <= cs && !we;
      mem_sel_q <= addr[15];
      if (reg_rd) begin
        unique casez (addr[7:0])
          8'h00: reg_q <= {21'd0, replay_sync, replay_underrun, replay_busy, 5'd0, sched_en, mon_bit_en, mon_frame_en};
          8'h01: reg_q <= {12'd0, vss_sticky, sticky};
          8'h02: reg_q <= ts;
          8'h03: reg_q <= {16'd0, frame_wr};
          8'h04: reg_q <= {16'd0, frame_rd};
          8'h05: reg_q <= {16'd0, bit_wr};
          8'h06: reg_q <= {16'd0, bit_rd};
          8'h07: reg_q <= {16'd0, replay_end};
          8'h08: reg_q <= {16'd0, replay_ptr};
          8'h09: reg_q <= {30'd0, overflow};
          8'h0A: reg_q <= {16'd0, static_slot_mt};
          8'h0B: reg_q <= {21'd0, n_static};
          8'h0C: reg_q <= {24'd0, minislot_mt};
          8'h0D: reg_q <= {21'd0, n_minislots};
          8'h0E: reg_q <= {16'd0, symwin_mt};
          8'h0F: reg_q <= {16'd0, cycle_mt};
          8'h10: reg_q <= {25'd0, static_plen};
          8'h11: reg_q <= {13'd0, seg, cycle, slot_id};
          8'h12: reg_q <= {16'd0, frame_pkts};
          8'h13: reg_q <= {16'd0, bit_pkts};
          8'h14: reg_q <= {16'd0, replay_pkts};
          8'b0010_????: reg_q <= {16'd0, count[addr[3:0]]};
          default: reg_q <= '0;
        endcase
      end
    end
  end

  assign rdata = mem_sel_q ? mem_rdata : reg_q;
endmodule
