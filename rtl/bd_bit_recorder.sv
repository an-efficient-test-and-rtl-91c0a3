// bd_bit_recorder: records the raw receive line as bit-level packets.
//
// At every timestamp tick (40 ns) the receive line is sampled. A packet
// starts with the first low sample on an idle line, carrying that tick's
// timestamp, and its content is the sampled values, eight per byte, first
// sample in bit 0. It ends, on a byte boundary, once END_IDLE consecutive
// high samples have been taken, or when it reaches MAX_BYTES. That bit-level
// packets hold sampled binary values with a 40 ns timestamp and a length of
// up to 2^16 bytes is the document's; the start and end rule is this
// design's own.
//
// Interface: rxd should be the synchronised, filtered line. The packet stream
// (pkt_start, byte_valid, pkt_end) goes to bd_pkt_writer; a new packet is
// only started while wr_busy is low.
module bd_bit_recorder #(
  parameter int unsigned END_IDLE  = 32,
  parameter int unsigned MAX_BYTES = 65535,
  parameter logic [7:0]  PKT_ID    = bd_pkg::ID_BIT_A
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        tick,
  input  logic [31:0] ts,
  input  logic        rxd,
  input  logic        wr_busy,
  output logic        pkt_start,
  output logic [7:0]  pkt_id,
  output logic [31:0] pkt_ts,
  output logic        byte_valid,
  output logic [7:0]  byte_data,
  output logic        pkt_end
);
  logic        active;
  logic [2:0]  cnt;
  logic [6:0]  sh;
  logic [15:0] ones;
  logic [15:0] len;
  logic [15:0] ones_next;

  assign pkt_id    = PKT_ID;
  assign ones_next = rxd ? ((ones == 16'hFFFF) ? ones : ones + 16'd1) : 16'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; cnt <= '0; sh <= '0; ones <= '0; len <= '0;
      pkt_start <= 1'b0; pkt_ts <= '0; byte_valid <= 1'b0; byte_data <= '0;
      pkt_end <= 1'b0;
    end else begin
      pkt_start <= 1'b0; byte_valid <= 1'b0; pkt_end <= 1'b0;
      if (tick) begin
        if (!active) begin
          if (enable && !rxd && !wr_busy) begin
            active <= 1'b1; pkt_start <= 1'b1; pkt_ts <= ts;
            sh <= 7'd0; cnt <= 3'd1; ones <= '0; len <= '0;
          end
        end else begin
          ones <= ones_next;
          if (cnt == 3'd7) begin
            byte_valid <= 1'b1;
            byte_data  <= {rxd, sh};
            len        <= len + 16'd1;
            if (ones_next >= 16'(END_IDLE) || len + 16'd1 == 16'(MAX_BYTES) || !enable) begin
              pkt_end <= 1'b1; active <= 1'b0;
            end
          end else begin
            sh[cnt] <= rxd;
          end
          cnt <= cnt + 3'd1;
        end
      end
    end
  end
endmodule
