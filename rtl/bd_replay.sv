// bd_replay: injects logged packets into the bus at their timestamps.
//
// The host places packets, in the same layout bd_pkt_writer uses, into the
// replay region of the DPRAM, sets end_ptr behind the last one and pulses
// start. The unit then walks the packets in order. For each it reads the head
// and the timestamp, prefetches the first content word and waits until the
// running timestamp reaches the packet's. Then:
//   bit-level packet    each content bit is driven on txd for one 40 ns
//                       timestamp tick, first sample in bit 0, as recorded;
//   frame-level packet  the content bytes (header, payload and CRC, as the
//                       frame decoder delivers them) are coded the FlexRay
//                       way at one bit per BIT_CLKS clocks: TSS of TSS_BITS
//                       zeros, FSS, BSS before each byte, byte MSB first,
//                       FES.
// With sync_cycle set when start arrives, the unit first waits for the next
// cycle_start of the local schedule and takes packet timestamps as offsets
// from the timestamp of that moment, so a log can be placed into the slots
// of the time-triggered part of the cycle; otherwise timestamps are absolute.
// Replay of both abstraction levels and a trigger that aligns injected
// traffic with the schedule are the document's; the packet layout, the TSS
// length, the cycle-start reference and the rule that a late packet is sent
// at once are this design's choices. One content word is
// prefetched, so one DPRAM read per 32 samples keeps the output gap-free.
//
// Interface: reads go through req/gnt and come back with rvalid one clock
// after the grant. txen is high while a packet is driven; txd idles high.
// rd_ptr is the offset of the packet being replayed; done pulses when the
// unit reaches end_ptr.
module bd_replay
  import bd_pkg::*;
#(
  parameter int unsigned BIT_CLKS = 8,
  parameter int unsigned TSS_BITS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] region_base,
  input  logic [15:0] region_size,
  input  logic [15:0] end_ptr,
  input  logic        start,
  input  logic        stop,
  input  logic        sync_cycle,
  input  logic        cycle_start,
  input  logic        tick,
  input  logic [31:0] ts,
  // memory side
  output logic        req,
  output mem_req_t    req_data,
  input  logic        gnt,
  input  logic        rvalid,
  input  logic [31:0] rdata,
  // bus side
  output logic        txd,
  output logic        txen,
  // status
  output logic        busy,
  output logic        done,
  output logic [15:0] rd_ptr,
  output logic [15:0] pkt_count,
  output logic        underrun
);
  typedef enum logic [2:0] {R_IDLE, R_ARM, R_RDHDR, R_WHDR, R_RDTS, R_WTS, R_WAIT, R_PLAY} rstate_e;
  typedef enum logic [2:0] {P_TSS, P_FSS, P_BSS1, P_BSS0, P_DATA, P_FES0, P_FES1, P_END} phase_e;

  localparam int unsigned BW = $clog2(BIT_CLKS + 1);

  rstate_e     st;
  phase_e      ph;
  logic [7:0]  id_q;
  logic [15:0] len_q;
  logic [31:0] ts_q;
  logic [31:0] base_q;        // timestamp the packet times count from
  logic [15:0] fetch_off;     // next content word to fetch
  logic [15:0] words_left;    // content words not fetched yet
  logic [31:0] cur, nxt;
  logic        nxt_valid, inflight;
  logic [4:0]  bitpos;        // bit mode: sample index in cur
  logic [1:0]  lane;          // frame mode: byte in cur
  logic [2:0]  dbit;          // frame mode: bit in byte, MSB first
  logic [3:0]  tss_cnt;
  logic [23:0] left;          // samples (bit mode) or bytes (frame mode) left
  logic [BW-1:0] pre;
  logic        btick;
  logic        want_fetch, hdr_phase;

  function automatic logic [15:0] add(input logic [15:0] x, input logic [15:0] n,
                                      input logic [15:0] size);
    logic [16:0] s;
    s = {1'b0, x} + {1'b0, n};
    return (s >= {1'b0, size}) ? 16'(s - {1'b0, size}) : s[15:0];
  endfunction

  assign hdr_phase  = (st == R_RDHDR) || (st == R_RDTS);
  assign want_fetch = (st == R_WAIT || st == R_PLAY) && !nxt_valid && !inflight &&
                      (words_left != 16'd0);
  assign req        = hdr_phase || want_fetch;
  assign req_data.we    = 1'b0;
  assign req_data.wdata = '0;
  assign req_data.addr  = region_base + ((st == R_RDHDR) ? rd_ptr :
                                         (st == R_RDTS)  ? add(rd_ptr, 16'd1, region_size) :
                                                           fetch_off);
  assign btick = (pre == BW'(BIT_CLKS - 1));
  assign busy  = (st != R_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE; ph <= P_TSS; id_q <= '0; len_q <= '0; ts_q <= '0; base_q <= '0;
      fetch_off <= '0; words_left <= '0; cur <= '0; nxt <= '0;
      nxt_valid <= 1'b0; inflight <= 1'b0; bitpos <= '0; lane <= '0; dbit <= '0;
      tss_cnt <= '0; left <= '0; pre <= '0;
      txd <= 1'b1; txen <= 1'b0; done <= 1'b0; rd_ptr <= '0; pkt_count <= '0;
      underrun <= 1'b0;
    end else begin
      done <= 1'b0;
      pre  <= btick ? '0 : pre + BW'(1);
      // content prefetch
      if (want_fetch && gnt) begin
        inflight  <= 1'b1;
        fetch_off <= add(fetch_off, 16'd1, region_size);
        words_left <= words_left - 16'd1;
      end
      if (inflight && rvalid) begin
        inflight  <= 1'b0;
        nxt       <= rdata;
        nxt_valid <= 1'b1;
      end

      if (stop) begin
        st <= R_IDLE; txen <= 1'b0; txd <= 1'b1; nxt_valid <= 1'b0;
        inflight <= 1'b0; words_left <= '0;
      end else begin
        unique case (st)
          R_IDLE: if (start) begin
            rd_ptr <= '0; underrun <= 1'b0; base_q <= '0;
            if (end_ptr == 16'd0) done <= 1'b1;
            else st <= sync_cycle ? R_ARM : R_RDHDR;
          end
          R_ARM: if (cycle_start) begin
            base_q <= ts;
            st     <= R_RDHDR;
          end
          R_RDHDR: if (gnt) st <= R_WHDR;
          R_WHDR: if (rvalid) begin
            id_q  <= rdata[31:24];
            len_q <= rdata[15:0];
            st    <= R_RDTS;
          end
          R_RDTS: if (gnt) st <= R_WTS;
          R_WTS: if (rvalid) begin
            ts_q       <= rdata;
            fetch_off  <= add(rd_ptr, 16'd2, region_size);
            words_left <= (len_q + 16'd3) >> 2;
            nxt_valid  <= 1'b0;
            st         <= R_WAIT;
          end
          R_WAIT: begin
            // start once the time has come and the first word is at hand
            if ($signed(ts - base_q - ts_q) >= 0 && (nxt_valid || len_q == 16'd0)) begin
              st <= R_PLAY; cur <= nxt; nxt_valid <= 1'b0;
              bitpos <= '0; lane <= '0; dbit <= 3'd7; tss_cnt <= '0;
              pre <= BW'(BIT_CLKS - 1); ph <= P_TSS;   // first bit at once
              if (is_bit_level(id_q)) left <= {5'd0, len_q, 3'b000};
              else                    left <= {8'd0, len_q};
            end
          end
          R_PLAY: begin
            if (is_bit_level(id_q)) begin
              if (tick) begin
                if (left == '0) begin
                  txen <= 1'b0; txd <= 1'b1; ph <= P_END;
                end else begin
                  txen   <= 1'b1;
                  txd    <= cur[bitpos];
                  bitpos <= bitpos + 5'd1;
                  left   <= left - 24'd1;
                  if (bitpos == 5'd31 && left != 24'd1) begin
                    if (!nxt_valid) underrun <= 1'b1;
                    cur <= nxt; nxt_valid <= 1'b0;
                  end
                end
              end
            end else if (btick) begin
              txen <= 1'b1;
              unique case (ph)
                P_TSS: begin
                  txd <= 1'b0;
                  tss_cnt <= tss_cnt + 4'd1;
                  if (tss_cnt == 4'(TSS_BITS - 1)) ph <= P_FSS;
                end
                P_FSS:  begin txd <= 1'b1; ph <= (left == '0) ? P_FES0 : P_BSS1; end
                P_BSS1: begin txd <= 1'b1; ph <= P_BSS0; end
                P_BSS0: begin txd <= 1'b0; ph <= P_DATA; dbit <= 3'd7; end
                P_DATA: begin
                  txd  <= cur[8*lane + int'(dbit)];
                  dbit <= dbit - 3'd1;
                  if (dbit == 3'd0) begin
                    left <= left - 24'd1;
                    lane <= lane + 2'd1;
                    ph   <= (left == 24'd1) ? P_FES0 : P_BSS1;
                    if (lane == 2'd3 && left != 24'd1) begin
                      if (!nxt_valid) underrun <= 1'b1;
                      cur <= nxt; nxt_valid <= 1'b0;
                    end
                  end
                end
                P_FES0: begin txd <= 1'b0; ph <= P_FES1; end
                P_FES1: begin txd <= 1'b1; ph <= P_END; end
                default: begin txd <= 1'b1; txen <= 1'b0; end
              endcase
            end
            if (ph == P_END && (is_bit_level(id_q) ? tick : btick) && !inflight) begin
              txen <= 1'b0; txd <= 1'b1;
              pkt_count <= pkt_count + 16'd1;
              rd_ptr <= add(rd_ptr, 16'd2 + ((len_q + 16'd3) >> 2), region_size);
              if (add(rd_ptr, 16'd2 + ((len_q + 16'd3) >> 2), region_size) == end_ptr) begin
                st <= R_IDLE; done <= 1'b1;
              end else begin
                st <= R_RDHDR;
              end
            end
          end
          default: st <= R_IDLE;
        endcase
      end
    end
  end
endmodule
