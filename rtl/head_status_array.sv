// head_status_array: shift-position bookkeeping for every DWM block cluster.
//
// The memory runs a lazy shifting policy: a cluster is left wherever the last
// access moved it, so its current offset from the initial position has to be
// remembered. This array holds one WIDTH-bit offset per cluster, WIDTH being
// ceil(log2(DOMAINS/2)). It is built from flip-flops split into BANKS banks;
// only the bank addressed by a write is enabled, so the other banks can be
// clock gated. Flip-flops, banks and the entry width follow the design; the
// number of banks and the use of the top index bits as bank select are this
// implementation's choices.
//
// Timing: the read is combinational from raddr_i. A write (we_i) takes effect
// at the next rising clock edge. Reset (rst_ni low, asynchronous) clears every
// entry to 0, the initial position, matching a memory whose tapes are aligned
// at power-up.
module head_status_array #(
  parameter int unsigned ENTRIES = 2048,  // number of clusters
  parameter int unsigned WIDTH   = 2,     // bits per entry
  parameter int unsigned BANKS   = 8      // power of two, divides ENTRIES
) (
  input  logic                       clk_i,
  input  logic                       rst_ni,
  input  logic [$clog2(ENTRIES)-1:0] raddr_i,
  output logic [WIDTH-1:0]           rdata_o,
  input  logic                       we_i,
  input  logic [$clog2(ENTRIES)-1:0] waddr_i,
  input  logic [WIDTH-1:0]           wdata_i,
  output logic [BANKS-1:0]           bank_we_o   // per-bank write enable (clock-gate enable)
);

  localparam int unsigned AW    = $clog2(ENTRIES);
  localparam int unsigned BW    = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int unsigned DEPTH = ENTRIES / BANKS;
  localparam int unsigned LW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] rd_bank [BANKS];
  logic [BW-1:0]    rbank, wbank;
  logic [LW-1:0]    rline, wline;

  if (BANKS > 1) begin : g_bsel
    assign rbank = raddr_i[AW-1 -: BW];
    assign wbank = waddr_i[AW-1 -: BW];
  end else begin : g_bsel1
    assign rbank = '0;
    assign wbank = '0;
  end
  assign rline = LW'(raddr_i);
  assign wline = LW'(waddr_i);

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];

    assign bank_we_o[b] = we_i && (wbank == BW'(b));

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
      end else if (bank_we_o[b]) begin
        mem[wline] <= wdata_i;
      end
    end

    assign rd_bank[b] = mem[rline];
  end

  assign rdata_o = rd_bank[rbank];

endmodule
