// dwm_shift_ctrl: shift control unit between the fetch bus and the DWM.
//
// A fetch request carries a byte address. The unit splits it into a cluster
// (DBC) index and a domain index. Under the static port policy every domain
// has one fixed access port: domains 0..D/2-1 are read through the read-write
// port, domains D/2..D-1 through the read-only port at the tape midpoint, so
// the head position the cluster needs is the domain index modulo D/2. The
// unit reads the cluster's current position from the head status array and
// compares it with the needed one.
//
//  * Equal: the request is granted in the same cycle and the DWM read is
//    issued; the word arrives with rvalid_o one cycle later.
//  * Different: the unit shifts the cluster one domain towards the needed
//    position and writes the new position back to the head status array. The
//    request stays pending; it is re-evaluated next cycle.
//
// A fetch that needs k shifts is therefore granted k cycles later than an
// aligned one: one cycle per shift, as the design assumes. The cluster is left
// where the read happened (lazy policy). Address decoding, static port
// selection, lazy policy and the per-cycle shift latency follow the design;
// the request/grant/valid bus (the protocol of the core's instruction port)
// and shifting one step per cycle with a write-back each step are this
// implementation's choices. Address bits above the memory size are ignored.
//
// Bus rule (checked by assertion): while req_i is high and gnt_o low, addr_i
// must not change.
module dwm_shift_ctrl
  import shrimp_pkg::*;
#(
  parameter int unsigned DOMAINS   = 8,      // effective domains per tape
  parameter int unsigned MEM_BYTES = 65536,  // memory capacity
  parameter int unsigned AW        = 32,     // fetch address width
  localparam int unsigned NDBC = MEM_BYTES / (4 * DOMAINS),
  localparam int unsigned CW   = $clog2(NDBC),      // cluster index bits
  localparam int unsigned DW   = $clog2(DOMAINS),   // domain index bits
  localparam int unsigned HW   = DW - 1             // head position bits
) (
  input  logic            clk_i,
  input  logic            rst_ni,
  // fetch bus
  input  logic            req_i,
  input  logic [AW-1:0]   addr_i,
  output logic            gnt_o,
  output logic            rvalid_o,
  // cluster addressed by the request: head status read and write index,
  // and the cluster the DWM shifts or reads
  output logic [CW-1:0]   dbc_o,
  // head status array
  input  logic [HW-1:0]   hs_rdata_i,
  output logic            hs_we_o,
  output logic [HW-1:0]   hs_wdata_o,
  // DWM commands
  output logic            shift_o,
  output shift_dir_e      shift_dir_o,
  output logic            rd_o,
  output dwm_port_e       rd_port_o,
  output logic [HW-1:0]   shift_need_o   // shifts still needed by the pending request
);

  logic [CW-1:0] dbc;
  logic [DW-1:0] domain;
  logic [HW-1:0] target, cur;
  logic          aligned, up;

  assign dbc     = addr_i[CW+DW+1:DW+2];
  assign domain  = addr_i[DW+1:2];
  assign target  = domain[HW-1:0];
  assign cur     = hs_rdata_i;
  assign aligned = (cur == target);
  assign up      = (target > cur);

  assign dbc_o = dbc;

  always_comb begin
    gnt_o        = 1'b0;
    rd_o         = 1'b0;
    shift_o      = 1'b0;
    hs_we_o      = 1'b0;
    shift_dir_o  = up ? SHIFT_UP : SHIFT_DOWN;
    hs_wdata_o   = up ? cur + HW'(1) : cur - HW'(1);
    shift_need_o = up ? target - cur : cur - target;
    if (req_i) begin
      if (aligned) begin
        gnt_o = 1'b1;
        rd_o  = 1'b1;
      end else begin
        shift_o = 1'b1;
        hs_we_o = 1'b1;
      end
    end
  end

  assign rd_port_o   = domain[DW-1] ? PORT_R : PORT_RW;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) rvalid_o <= 1'b0;
    else         rvalid_o <= gnt_o;
  end

  // A pending request keeps its address.
  logic          pend_q;
  logic [AW-1:0] pend_addr_q;
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pend_q      <= 1'b0;
      pend_addr_q <= '0;
    end else begin
      pend_q      <= req_i && !gnt_o;
      pend_addr_q <= addr_i;
    end
  end
  a_addr_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    pend_q |-> (req_i && addr_i == pend_addr_q));

endmodule
