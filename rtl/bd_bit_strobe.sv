// bd_bit_strobe: recovers the bit stream from the oversampled RxD line.
//
// The receive line is synchronised with two flip-flops, filtered by a
// majority vote over the last VOTE_WIN samples, and a bit counter strobes the
// voted value once per bit, STROBE_POS samples after the last falling edge of
// the voted signal. Every falling edge restarts the counter, so the strobe
// follows the transmitter's clock at each byte start sequence. This follows
// the usual FlexRay bit timing (8 samples per bit, 5-sample vote, strobe at
// sample 5); the document itself only says that the hardware handles the
// encoded and decoded bits next to the physical layer.
//
// Interface: rxd is the raw receive line (idle high). bit_valid pulses once
// per bit with bit_val; voted is the filtered line, for idle detection.
module bd_bit_strobe #(
  parameter int unsigned SAMPLES_PER_BIT = 8,
  parameter int unsigned VOTE_WIN        = 5,
  parameter int unsigned STROBE_POS      = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic rxd,
  output logic voted,
  output logic bit_valid,
  output logic bit_val
);
  localparam int unsigned CW = $clog2(SAMPLES_PER_BIT);

  logic [1:0]          sync_q;
  logic [VOTE_WIN-1:0] win;
  logic [CW-1:0]       cnt;
  logic                voted_q;
  logic                voted_d;

  always_comb begin
    int unsigned ones;
    ones = 0;
    for (int i = 0; i < int'(VOTE_WIN); i++) ones += int'(win[i]);
    voted_d = (ones > VOTE_WIN / 2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q    <= 2'b11;
      win       <= '1;
      voted_q   <= 1'b1;
      cnt       <= '0;
      bit_valid <= 1'b0;
      bit_val   <= 1'b1;
    end else begin
      sync_q    <= {sync_q[0], rxd};
      win       <= {win[VOTE_WIN-2:0], sync_q[1]};
      voted_q   <= voted_d;
      bit_valid <= 1'b0;
      if (voted_q && !voted_d) begin
        cnt <= CW'(1);               // falling edge: resynchronise
      end else begin
        if (cnt == CW'(STROBE_POS)) begin
          bit_valid <= 1'b1;
          bit_val   <= voted_q;
        end
        cnt <= (cnt == CW'(SAMPLES_PER_BIT - 1)) ? '0 : cnt + CW'(1);
      end
    end
  end

  assign voted = voted_q;
endmodule
