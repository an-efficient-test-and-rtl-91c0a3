// bd_timestamp: free-running 32-bit timestamp with a 40 ns granularity.
//
// Every recorded packet carries the value of this counter at its start, and
// the replay unit waits for it before injecting a packet. The 32-bit width
// and the 40 ns step are those of the logfile format; the way the step is
// made from the system clock is this design's own: a phase accumulator adds
// TS_RATE every clock and issues a tick whenever it passes CLK_RATE, so any
// clock works. With the default 80 MHz clock (FlexRay's 8 samples per
// 10 Mbit/s bit) and 25 MHz tick rate, ticks come 3 or 4 clocks apart and
// average exactly 40 ns.
//
// Interface: clear restarts the count at zero; tick is high for one clock
// each time ts increments (ts already shows the new value in that clock).
module bd_timestamp #(
  parameter int unsigned CLK_RATE = 80,  // system clock, MHz
  parameter int unsigned TS_RATE  = 25   // timestamp rate, MHz (1 / 40 ns)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  output logic        tick,
  output logic [31:0] ts
);
  localparam int unsigned AW = $clog2(CLK_RATE + TS_RATE + 1);

  logic [AW-1:0] acc;
  logic [AW:0]   acc_next;

  assign acc_next = {1'b0, acc} + AW'(TS_RATE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      ts   <= '0;
      tick <= 1'b0;
    end else if (clear) begin
      acc  <= '0;
      ts   <= '0;
      tick <= 1'b0;
    end else if (acc_next >= (AW+1)'(CLK_RATE)) begin
      acc  <= AW'(acc_next - (AW+1)'(CLK_RATE));
      ts   <= ts + 32'd1;
      tick <= 1'b1;
    end else begin
      acc  <= AW'(acc_next);
      tick <= 1'b0;
    end
  end

  initial assert (TS_RATE <= CLK_RATE) else $error("timestamp rate above clock rate");
endmodule
