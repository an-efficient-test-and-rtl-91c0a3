// bd_dpram: dual-port RAM that couples the FlexRay logic to the processor.
//
// Port A belongs to the fabric logic (through bd_arbiter), port B to the
// host's configuration and data interface. Both ports are synchronous with
// one clock of read latency and may access any word in the same clock; when
// both write one word in the same clock, port B (the host) wins. The DPRAM
// as the exchange point is the document's; its size and width are this
// design's choice (DEPTH 32-bit words).
module bd_dpram #(
  parameter int unsigned DEPTH = 4096
) (
  input  logic        clk,
  input  logic        a_en,
  input  logic        a_we,
  input  logic [15:0] a_addr,
  input  logic [31:0] a_wdata,
  output logic [31:0] a_rdata,
  input  logic        b_en,
  input  logic        b_we,
  input  logic [15:0] b_addr,
  input  logic [31:0] b_wdata,
  output logic [31:0] b_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we && !(b_en && b_we && b_addr[AW-1:0] == a_addr[AW-1:0]))
        mem[a_addr[AW-1:0]] <= a_wdata;
      a_rdata <= mem[a_addr[AW-1:0]];
    end
    if (b_en) begin
      if (b_we) mem[b_addr[AW-1:0]] <= b_wdata;
      b_rdata <= mem[b_addr[AW-1:0]];
    end
  end
endmodule
