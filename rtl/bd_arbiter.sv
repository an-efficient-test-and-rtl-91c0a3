// bd_arbiter: shares the fabric-side DPRAM port between the monitoring and
// injection modules.
//
// The document has a dedicated bus arbiter between these modules and the
// DPRAM; its policy is not given, so this one is a plain round-robin: each
// clock at most one requester is granted, starting the search one past the
// last winner, so no requester waits more than N-1 grants. A grant is
// combinational in the clock of the request; a granted read returns its
// word one clock later with rvalid to the same requester.
//
// Interface: req[i]/rq[i] from requester i, gnt[i] back; mem_* drive a
// synchronous single-port RAM port with one clock read latency.
module bd_arbiter
  import bd_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req   [N],
  input  mem_req_t    rq    [N],
  output logic        gnt   [N],
  output logic        rvalid[N],
  output logic [31:0] rdata,
  output logic        mem_en,
  output logic        mem_we,
  output logic [15:0] mem_addr,
  output logic [31:0] mem_wdata,
  input  logic [31:0] mem_rdata
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last, win;
  logic          any;
  logic [IW-1:0] rd_owner;
  logic          rd_pend;

  always_comb begin
    any = 1'b0;
    win = last;
    for (int k = 1; k <= int'(N); k++) begin
      int idx;
      idx = (int'(last) + k) % int'(N);
      if (!any && req[idx]) begin
        any = 1'b1;
        win = IW'(idx);
      end
    end
    for (int i = 0; i < int'(N); i++) gnt[i] = any && (win == IW'(i));
    mem_en    = any;
    mem_we    = any && rq[win].we;
    mem_addr  = rq[win].addr;
    mem_wdata = rq[win].wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last <= IW'(N - 1); rd_pend <= 1'b0; rd_owner <= '0;
    end else begin
      if (any) last <= win;
      rd_pend  <= any && !rq[win].we;
      rd_owner <= win;
    end
  end

  always_comb
    for (int i = 0; i < int'(N); i++) rvalid[i] = rd_pend && (rd_owner == IW'(i));
  assign rdata = mem_rdata;

  // only one grant per clock
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt_vec()))
    else $error("arbiter granted more than one requester");

  function automatic logic [N-1:0] gnt_vec();
    for (int i = 0; i < int'(N); i++) gnt_vec[i] = gnt[i];
  endfunction
endmodule
