// bd_pkt_writer: wraps recorded data into logfile packets and writes them to
// a ring buffer region of the DPRAM.
//
// A packet is an identifier, a length, a 32-bit timestamp of its start and
// the content bytes, which is the logfile format; the word layout in memory
// is this design's choice:
//   word 0   {identifier[7:0], 8'h00, length in bytes[15:0]}
//   word 1   timestamp
//   word 2.. content, four bytes per word, first byte in bits 7:0
// On pkt_start two words are reserved for the head; content words follow as
// they fill; on pkt_end the last partial word, then the head and the
// timestamp are written, and only when the timestamp word has reached the
// DPRAM does wr_ptr move past the packet, so the host never sees half a
// packet. The host frees space by advancing rd_ptr. A packet that does not
// fit is dropped whole and overflow is set.
//
// Interface: offsets are in words from region_base, modulo region_size.
// Memory writes go out through req/gnt (one word per grant) from a
// FIFO_DEPTH-entry queue. After pkt_end the writer needs three clocks before
// it accepts the next pkt_start; bytes may come at most one per clock.
module bd_pkt_writer
  import bd_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] region_base,
  input  logic [15:0] region_size,
  input  logic [15:0] rd_ptr,
  input  logic        clear_ovf,
  // packet stream
  input  logic        pkt_start,
  input  logic [7:0]  pkt_id,
  input  logic [31:0] pkt_ts,
  input  logic        byte_valid,
  input  logic [7:0]  byte_data,
  input  logic        pkt_end,
  output logic        busy,
  // memory side
  output logic        req,
  output mem_req_t    req_data,
  input  logic        gnt,
  // status
  output logic [15:0] wr_ptr,
  output logic        overflow,
  output logic [15:0] pkt_count
);
  typedef struct packed {
    logic        commit;
    logic [15:0] ptr_after;
    logic [15:0] off;
    logic [31:0] data;
  } entry_t;

  typedef enum logic [2:0] {W_IDLE, W_ACTIVE, W_FLUSH, W_HDR, W_TS} wstate_e;

  localparam int unsigned QW = $clog2(FIFO_DEPTH);

  entry_t        q [FIFO_DEPTH];
  logic [QW-1:0] q_rd, q_wr;
  logic [QW:0]   q_cnt;
  logic          q_full;
  logic          push, pop;
  entry_t        push_e;

  wstate_e     st;
  logic [15:0] cur, start, cur_commit;
  logic [15:0] len;
  logic [1:0]  lane;
  logic [31:0] acc;
  logic        dropping;
  logic [7:0]  id_q;
  logic [31:0] ts_q;

  function automatic logic [15:0] inc(input logic [15:0] x, input logic [15:0] size);
    return (x + 16'd1 >= size) ? 16'd0 : x + 16'd1;
  endfunction

  // words still free in the ring; one slot stays empty to tell full from empty
  logic [15:0] used, free_words;
  assign used       = (cur >= rd_ptr) ? cur - rd_ptr : cur + region_size - rd_ptr;
  assign free_words = region_size - 16'd1 - used;

  assign q_full = (q_cnt == (QW+1)'(FIFO_DEPTH));
  assign req    = (q_cnt != '0);
  assign pop    = req && gnt;
  assign req_data.we    = 1'b1;
  assign req_data.addr  = region_base + q[q_rd].off;
  assign req_data.wdata = q[q_rd].data;
  assign busy   = (st != W_IDLE && st != W_ACTIVE);

  always_comb begin
    push   = 1'b0;
    push_e = '0;
    unique case (st)
      W_ACTIVE: if (byte_valid && !dropping && lane == 2'd3 && !pkt_start) begin
        push = !q_full && free_words != 16'd0;
        push_e.off  = cur;
        push_e.data = {byte_data, acc[23:0]};
      end
      W_FLUSH: if (!dropping && lane != 2'd0) begin
        push = !q_full;
        push_e.off  = cur;
        push_e.data = acc;
      end
      W_HDR: if (!dropping) begin
        push = !q_full;
        push_e.off  = start;
        push_e.data = {id_q, 8'h00, len};
      end
      W_TS: if (!dropping) begin
        push = !q_full;
        push_e.commit    = 1'b1;
        push_e.ptr_after = cur;
        push_e.off       = inc(start, region_size);
        push_e.data      = ts_q;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_rd <= '0; q_wr <= '0; q_cnt <= '0;
      st <= W_IDLE; cur <= '0; start <= '0; cur_commit <= '0; len <= '0;
      lane <= '0; acc <= '0; dropping <= 1'b0; id_q <= '0; ts_q <= '0;
      wr_ptr <= '0; overflow <= 1'b0; pkt_count <= '0;
      for (int i = 0; i < int'(FIFO_DEPTH); i++) q[i] <= '0;
    end else begin
      // queue
      if (push) begin
        q[q_wr] <= push_e;
        q_wr    <= (q_wr == QW'(FIFO_DEPTH - 1)) ? '0 : q_wr + QW'(1);
      end
      if (pop) begin
        q_rd <= (q_rd == QW'(FIFO_DEPTH - 1)) ? '0 : q_rd + QW'(1);
        if (q[q_rd].commit) begin
          wr_ptr    <= q[q_rd].ptr_after;
          pkt_count <= pkt_count + 16'd1;
        end
      end
      q_cnt <= q_cnt + (QW+1)'(push) - (QW+1)'(pop);
      if (clear_ovf) overflow <= 1'b0;

      unique case (st)
        W_IDLE, W_ACTIVE: begin
          if (pkt_start) begin
            st <= W_ACTIVE; id_q <= pkt_id; ts_q <= pkt_ts;
            len <= '0; lane <= '0; acc <= '0;
            // an unfinished packet is abandoned
            if (free_words < 16'd2 || (st == W_ACTIVE && cur != cur_commit)) begin
              if (free_words < 16'd2) overflow <= 1'b1;
              dropping <= (free_words < 16'd2);
              start    <= cur_commit;
              cur      <= (free_words < 16'd2) ? cur_commit : inc(inc(cur_commit, region_size), region_size);
            end else begin
              dropping <= 1'b0;
              start    <= cur;
              cur      <= inc(inc(cur, region_size), region_size);
            end
          end else if (st == W_ACTIVE) begin
            if (byte_valid && !dropping) begin
              len  <= len + 16'd1;
              lane <= lane + 2'd1;
              acc[8*lane +: 8] <= byte_data;
              if (lane == 2'd3) begin
                acc <= '0;
                if (free_words == 16'd0 || q_full) begin
                  dropping <= 1'b1; overflow <= 1'b1;
                end else begin
                  cur <= inc(cur, region_size);
                end
              end
            end
            if (pkt_end) st <= W_FLUSH;
          end
        end
        W_FLUSH: begin
          if (dropping) st <= W_HDR;
          else if (lane == 2'd0) st <= W_HDR;
          else if (free_words == 16'd0) begin
            dropping <= 1'b1; overflow <= 1'b1; st <= W_HDR;
          end else if (push) begin
            cur <= inc(cur, region_size); st <= W_HDR;
          end
        end
        W_HDR: begin
          if (dropping || push) st <= W_TS;
        end
        W_TS: begin
          if (dropping) begin
            cur <= cur_commit; st <= W_IDLE;
          end else if (push) begin
            cur_commit <= cur; st <= W_IDLE;
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end
endmodule
