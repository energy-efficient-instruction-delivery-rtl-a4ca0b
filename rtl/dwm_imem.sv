// dwm_imem: behavioural model of the domain wall instruction memory.
//
// This is a model of a magnetic nanotape macro, not logic to synthesize into
// gates; it is written in synthesizable style so that the whole subsystem can
// be simulated and elaborated. It models the state the real part has: the
// stored words and the physical shift position of every cluster.
//
// Organisation (follows the design): MEM_BYTES of storage in clusters (DBCs)
// of TAPES tapes (TAPES = 32, one instruction bit per tape) and DOMAINS
// effective domains per tape, so a cluster holds DOMAINS 32-bit words. All
// tapes of a cluster shift, and are read, together. Each tape has a
// read-write port at effective domain 0 and a read-only port at domain D/2;
// D/2-1 overhead domains at one end let the tapes move up to D/2-1 positions
// away from the initial one. At head position s the read-write port sees
// domain s and the read-only port sees domain D/2+s.
//
// Interface and timing (this implementation's choice):
//  * shift_i: moves cluster shift_dbc_i one domain in shift_dir_i at the
//    clock edge. A shift beyond the overhead domains would destroy data; the
//    model leaves the position unchanged and raises the sticky shift_err_o.
//  * rd_i: reads cluster rd_dbc_i through port rd_port_i at its current
//    position; the word is on rdata_o after the next clock edge.
//  * load_we_i: writes word load_addr_i directly. It stands for loading the
//    program image before execution; how the lower halves would be written
//    through the read-write port is not modelled.
// Reset puts every cluster at its initial position; stored words keep their
// values (the memory is non-volatile) and are not reset.
module dwm_imem
  import shrimp_pkg::*;
#(
  parameter int unsigned DOMAINS   = 8,
  parameter int unsigned MEM_BYTES = 65536,
  parameter int unsigned TAPES     = 32,
  localparam int unsigned WORDS = MEM_BYTES / 4,
  localparam int unsigned NDBC  = WORDS / DOMAINS,
  localparam int unsigned CW    = $clog2(NDBC),
  localparam int unsigned DW    = $clog2(DOMAINS),
  localparam int unsigned HW    = DW - 1,
  localparam int unsigned WW    = $clog2(WORDS)
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  logic             shift_i,
  input  shift_dir_e       shift_dir_i,
  input  logic [CW-1:0]    shift_dbc_i,
  input  logic             rd_i,
  input  logic [CW-1:0]    rd_dbc_i,
  input  dwm_port_e        rd_port_i,
  output logic [TAPES-1:0] rdata_o,
  input  logic             load_we_i,
  input  logic [WW-1:0]    load_addr_i,
  input  logic [TAPES-1:0] load_data_i,
  output logic             shift_err_o
);

  logic [TAPES-1:0] cells [WORDS];
  logic [HW-1:0]    pos   [NDBC];

  logic [HW-1:0] spos, rpos;
  logic          over;
  assign spos = pos[shift_dbc_i];
  assign rpos = pos[rd_dbc_i];
  assign over = (shift_dir_i == SHIFT_UP) ? (spos == HW'(DOMAINS / 2 - 1)) : (spos == '0);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int i = 0; i < NDBC; i++) pos[i] <= '0;
      shift_err_o <= 1'b0;
    end else if (shift_i) begin
      if (over) shift_err_o <= 1'b1;
      else if (shift_dir_i == SHIFT_UP) pos[shift_dbc_i] <= spos + HW'(1);
      else pos[shift_dbc_i] <= spos - HW'(1);
    end
  end

  always_ff @(posedge clk_i) begin
    if (load_we_i) cells[load_addr_i] <= load_data_i;
  end

  always_ff @(posedge clk_i) begin
    if (rd_i) rdata_o <= cells[{rd_dbc_i, (rd_port_i == PORT_R), rpos}];
  end

endmodule
