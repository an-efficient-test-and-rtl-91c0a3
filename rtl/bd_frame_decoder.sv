// bd_frame_decoder: FlexRay frame decoder with syntax diagnosis.
//
// Takes the strobed bit stream of one channel and follows the FlexRay frame
// coding: channel idle (IDLE_BITS ones), transmission start sequence (TSS, a
// run of zeros), frame start sequence (FSS, one 1), then each byte as a byte
// start sequence (BSS, 1 then 0) and eight data bits, most significant first,
// and finally the frame end sequence (FES, 0 then 1). The five header bytes
// give the payload length, so the decoder knows where the 3-byte frame CRC
// ends. Header CRC (CRC-11 over sync, startup, frame ID and length) and frame
// CRC (CRC-24 over header and payload) are checked by running the received
// check bits through the same register and testing for a zero remainder.
//
// It reports the BusDoctor's syntax flags: CODERR (bad BSS), TSSVIOL (TSS too
// short or too long), HCRCERR, FCRCERR, FESERR, and SYMB for a low phase of
// at least SYM_MIN bits (a collision avoidance or wakeup symbol). The flag
// names are the document's; which line condition raises each, the TSS limits
// and the symbol length are this design's reading of the FlexRay protocol.
// After any error the decoder waits for the channel to be idle again.
//
// Interface: bit_valid/bit_val from bd_bit_strobe. All outputs are pulses one
// clock after the bit that causes them, except idle and hdr. hdr holds the
// last header and is valid from the hdr_valid pulse on (only sent when the
// header CRC is right). frame_end pulses once for every frame that began,
// together with frame_ok or one error flag.
module bd_frame_decoder
  import bd_pkg::*;
#(
  parameter int unsigned IDLE_BITS = 11,
  parameter int unsigned TSS_MIN   = 3,
  parameter int unsigned TSS_MAX   = 15,
  parameter int unsigned SYM_MIN   = 30,
  parameter logic [23:0] FCRC_INIT = FCRC_INIT_A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_valid,
  input  logic       bit_val,
  output logic       idle,
  output logic       tss_start,
  output logic       frame_start,
  output logic       byte_valid,
  output logic [7:0] byte_data,
  output logic       hdr_valid,
  output fr_header_t hdr,
  output logic       frame_end,
  output logic       frame_ok,
  output logic       coderr,
  output logic       tssviol,
  output logic       hcrcerr,
  output logic       fcrcerr,
  output logic       feserr,
  output logic       symb
);
  typedef enum logic [2:0] {
    S_WAIT_IDLE, S_IDLE, S_TSS, S_BSS1, S_BSS0, S_DATA, S_FES0, S_FES1
  } state_e;

  state_e      state;
  logic [5:0]  run;        // ones while waiting for idle, zeros in the TSS
  logic [2:0]  bitcnt;
  logic [7:0]  shreg;
  logic [8:0]  bytecnt;    // bytes received so far
  logic [8:0]  nbytes;     // total bytes of this frame, known after header
  logic [39:0] hdr_sh;
  logic [10:0] hcrc;
  logic [23:0] fcrc;
  logic [5:0]  hbit;       // header bit index 0..39

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT_IDLE;
      run <= '0; bitcnt <= '0; shreg <= '0; bytecnt <= '0; nbytes <= '0;
      hdr_sh <= '0; hcrc <= HCRC_INIT; fcrc <= FCRC_INIT; hbit <= '0;
      hdr <= '0;
      {tss_start, frame_start, byte_valid, hdr_valid, frame_end, frame_ok} <= '0;
      {coderr, tssviol, hcrcerr, fcrcerr, feserr, symb} <= '0;
      byte_data <= '0;
    end else begin
      {tss_start, frame_start, byte_valid, hdr_valid, frame_end, frame_ok} <= '0;
      {coderr, tssviol, hcrcerr, fcrcerr, feserr, symb} <= '0;
      if (bit_valid) begin
        unique case (state)
          S_WAIT_IDLE: begin
            if (!bit_val) run <= '0;
            else if (run == 6'(IDLE_BITS - 1)) state <= S_IDLE;
            else run <= run + 6'd1;
          end
          S_IDLE: if (!bit_val) begin
            state     <= S_TSS;
            run       <= 6'd1;
            tss_start <= 1'b1;
          end
          S_TSS: begin
            if (!bit_val) begin
              if (run == 6'(SYM_MIN - 1)) begin
                symb  <= 1'b1;
                run   <= '0;
                state <= S_WAIT_IDLE;
              end else begin
                run <= run + 6'd1;
              end
            end else if (run >= 6'(TSS_MIN) && run <= 6'(TSS_MAX)) begin
              state       <= S_BSS1;      // this 1 is the FSS
              frame_start <= 1'b1;
              bytecnt <= '0; nbytes <= 9'd8; hbit <= '0;
              hcrc <= HCRC_INIT; fcrc <= FCRC_INIT;
            end else begin
              tssviol <= 1'b1;
              run     <= 6'd1;
              state   <= S_WAIT_IDLE;
            end
          end
          S_BSS1: begin
            if (bit_val) state <= S_BSS0;
            else begin
              coderr <= 1'b1; frame_end <= 1'b1; run <= '0; state <= S_WAIT_IDLE;
            end
          end
          S_BSS0: begin
            if (!bit_val) begin
              state <= S_DATA; bitcnt <= '0;
            end else begin
              coderr <= 1'b1; frame_end <= 1'b1; run <= 6'd1; state <= S_WAIT_IDLE;
            end
          end
          S_DATA: begin
            shreg <= {shreg[6:0], bit_val};
            fcrc  <= fcrc_step(fcrc, bit_val);
            if (bytecnt < 9'd5) begin
              hdr_sh <= {hdr_sh[38:0], bit_val};
              hbit   <= hbit + 6'd1;
              if (hbit >= 6'd3 && hbit <= 6'd33) hcrc <= hcrc_step(hcrc, bit_val);
            end
            bitcnt <= bitcnt + 3'd1;
            if (bitcnt == 3'd7) begin
              byte_valid <= 1'b1;
              byte_data  <= {shreg[6:0], bit_val};
              bytecnt    <= bytecnt + 9'd1;
              state      <= S_BSS1;
              if (bytecnt == 9'd4) begin
                // header complete: hcrc already holds the remainder of
                // header bits 3..33 (data and check bits)
                if (hcrc == 11'd0) begin
                  hdr       <= fr_header_t'({hdr_sh[38:0], bit_val});
                  hdr_valid <= 1'b1;
                  nbytes    <= 9'd8 + {1'b0, hdr_sh[22:16], 1'b0};
                end else begin
                  hcrcerr <= 1'b1; frame_end <= 1'b1; run <= '0; state <= S_WAIT_IDLE;
                end
              end else if (bytecnt + 9'd1 == nbytes) begin
                if (fcrc_step(fcrc, bit_val) == 24'd0) state <= S_FES0;
                else begin
                  fcrcerr <= 1'b1; frame_end <= 1'b1; run <= '0; state <= S_WAIT_IDLE;
                end
              end
            end
          end
          S_FES0: begin
            if (!bit_val) state <= S_FES1;
            else begin
              feserr <= 1'b1; frame_end <= 1'b1; run <= 6'd1; state <= S_WAIT_IDLE;
            end
          end
          S_FES1: begin
            frame_end <= 1'b1;
            run       <= bit_val ? 6'd1 : 6'd0;
            state     <= S_WAIT_IDLE;
            if (bit_val) frame_ok <= 1'b1;
            else         feserr   <= 1'b1;
          end
          default: state <= S_WAIT_IDLE;
        endcase
      end
    end
  end

  assign idle = (state == S_IDLE);
endmodule
