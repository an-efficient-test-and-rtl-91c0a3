// bd_schedule: communication cycle timer of the monitor.
//
// A FlexRay communication cycle is a repeating schedule: a static segment of
// equal static slots (TDMA), a dynamic segment of minislots for arbitrated
// traffic, a symbol window and the network idle time (NIT). This block counts
// macroticks through the cycle and tells the checker which segment, slot and
// cycle the bus is in, and when a boundary is crossed.
//
// The segment layout comes from FlexRay; the way it is tracked here is this
// design's simplification: the timer starts with the first cycle when enable
// rises and then runs free, with no clock synchronisation to the cluster. In
// the dynamic segment the slot number advances at a minislot boundary only
// while the bus is idle, so a frame stretches its dynamic slot.
//
// Interface: configuration is static while enable is high, lengths in
// macroticks, a macrotick being MT_CLKS clocks. Outputs change on a macrotick
// edge; slot_start, seg_start and cycle_start pulse for one clock there.
// The pulses mark boundaries the timer crosses, so the cycle that begins when
// enable rises has no cycle_start pulse; the first one starts cycle 1. slot_id counts from 1 as in FlexRay; cycle counts 0..63.
module bd_schedule
  import bd_pkg::*;
#(
  parameter int unsigned MT_CLKS = 80       // 1 us macrotick at 80 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [15:0] static_slot_mt,
  input  logic [10:0] n_static,
  input  logic [7:0]  minislot_mt,
  input  logic [10:0] n_minislots,
  input  logic [15:0] symwin_mt,
  input  logic [15:0] cycle_mt,
  input  logic        bus_idle,
  output seg_e        seg,
  output logic [10:0] slot_id,
  output logic [5:0]  cycle,
  output logic        slot_start,
  output logic        seg_start,
  output logic        cycle_start
);
  localparam int unsigned PW = $clog2(MT_CLKS + 1);

  logic [PW-1:0] pre;
  logic          mt_tick;
  logic [15:0]   mt_cnt;      // macrotick in cycle
  logic [15:0]   slot_cnt;    // macrotick in current static slot / minislot
  logic [10:0]   mini_cnt;    // minislot index in dynamic segment
  logic [26:0]   static_end, dyn_end, sym_end;

  assign static_end = 27'(static_slot_mt) * 27'(n_static);
  assign dyn_end    = static_end + 27'(minislot_mt) * 27'(n_minislots);
  assign sym_end    = dyn_end + 27'(symwin_mt);

  assign mt_tick = (pre == PW'(MT_CLKS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pre <= '0; mt_cnt <= '0; slot_cnt <= '0; mini_cnt <= '0;
      seg <= SEG_STATIC; slot_id <= 11'd1; cycle <= '0;
      {slot_start, seg_start, cycle_start} <= '0;
    end else if (!enable) begin
      pre <= '0; mt_cnt <= '0; slot_cnt <= '0; mini_cnt <= '0;
      seg <= SEG_STATIC; slot_id <= 11'd1; cycle <= '0;
      {slot_start, seg_start, cycle_start} <= '0;
    end else begin
      {slot_start, seg_start, cycle_start} <= '0;
      pre <= mt_tick ? '0 : pre + PW'(1);
      if (mt_tick) begin
        if (mt_cnt + 16'd1 >= cycle_mt) begin
          // new communication cycle
          mt_cnt <= '0; slot_cnt <= '0; mini_cnt <= '0;
          seg <= SEG_STATIC; slot_id <= 11'd1; cycle <= cycle + 6'd1;
          {slot_start, seg_start, cycle_start} <= 3'b111;
        end else begin
          mt_cnt   <= mt_cnt + 16'd1;
          slot_cnt <= slot_cnt + 16'd1;
          unique case (seg)
            SEG_STATIC: begin
              if (27'(mt_cnt) + 27'd1 >= static_end) begin
                seg <= SEG_DYNAMIC; slot_cnt <= '0; mini_cnt <= '0;
                slot_id <= n_static + 11'd1;
                {slot_start, seg_start} <= 2'b11;
              end else if (slot_cnt + 16'd1 == static_slot_mt) begin
                slot_cnt <= '0; slot_id <= slot_id + 11'd1; slot_start <= 1'b1;
              end
            end
            SEG_DYNAMIC: begin
              if (27'(mt_cnt) + 27'd1 >= dyn_end) begin
                seg <= SEG_SYMBOL; seg_start <= 1'b1;
              end else if (slot_cnt + 16'd1 == 16'(minislot_mt)) begin
                slot_cnt <= '0; mini_cnt <= mini_cnt + 11'd1;
                if (bus_idle) begin
                  slot_id <= slot_id + 11'd1; slot_start <= 1'b1;
                end
              end
            end
            SEG_SYMBOL: begin
              if (27'(mt_cnt) + 27'd1 >= sym_end) begin
                seg <= SEG_NIT; seg_start <= 1'b1;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
