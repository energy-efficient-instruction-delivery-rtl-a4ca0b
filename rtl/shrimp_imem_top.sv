// shrimp_imem_top: SHRIMP instruction delivery subsystem.
//
// Everything between a RISC-V core's fetch stage and a domain wall
// instruction scratchpad: the fetch address unit with SHRIMP sequencing
// (shrimp_fetch), the shift control unit (dwm_shift_ctrl), the banked head
// status array (head_status_array) and the DWM itself (dwm_imem, a
// behavioural model). The core is outside; its fetch-side signals are ports.
// The arrangement follows the SHRIMP system of the design: 64 KiB of DWM,
// clusters of 32 tapes, one read-write and one read-only port per tape, lazy
// shifting tracked by a head status array next to the memory, and the
// increment/decrement address logic in the fetch path.
//
// Core interface: instr_valid_o/instr_rdata_o/instr_addr_o with instr_ready_i;
// in the cycle an instruction is taken, branch_i/branch_target_i redirect
// fetching (taken branches and jumps). Program loading: load_we_i writes one
// 32-bit word at word index load_addr_i, meant to be used while fetch_en_i is
// low. shift_o/shift_dir_o show each one-cycle shift of a cluster; shift_err_o
// is set if a shift ever ran past the overhead domains.
//
// Timing: an instruction whose cluster is already aligned arrives one cycle
// after its request; each shift needed adds one cycle.
module shrimp_imem_top
  import shrimp_pkg::*;
#(
  parameter int unsigned DOMAINS   = 8,      // effective domains per tape
  parameter int unsigned MEM_BYTES = 65536,  // instruction memory capacity
  parameter int unsigned HS_BANKS  = 8,      // head status array banks
  parameter int unsigned AW        = 32,
  localparam int unsigned WW = $clog2(MEM_BYTES / 4)
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          fetch_en_i,
  input  logic [AW-1:0] boot_addr_i,
  output logic          instr_valid_o,
  output logic [31:0]   instr_rdata_o,
  output logic [AW-1:0] instr_addr_o,
  input  logic          instr_ready_i,
  input  logic          branch_i,
  input  logic [AW-1:0] branch_target_i,
  input  logic          load_we_i,
  input  logic [WW-1:0] load_addr_i,
  input  logic [31:0]   load_data_i,
  output logic          shift_o,
  output shift_dir_e    shift_dir_o,
  output logic          shift_err_o,
  output logic          seq_lower_o,
  output logic          seq_split_o,
  output logic          seq_dbc_o,
  output logic [$clog2(DOMAINS)-2:0] shift_need_o,  // shifts the pending fetch still needs
  output logic [HS_BANKS-1:0] hs_bank_we_o          // head status bank write enables
);

  localparam int unsigned NDBC = MEM_BYTES / (4 * DOMAINS);
  localparam int unsigned CW   = $clog2(NDBC);
  localparam int unsigned HW   = $clog2(DOMAINS) - 1;

  logic          req, gnt, rvalid;
  logic [AW-1:0] addr;
  logic [31:0]   rdata;

  logic [CW-1:0] dbc;
  logic [HW-1:0] hs_rdata, hs_wdata;
  logic          hs_we, rd;
  dwm_port_e     rd_port;

  shrimp_fetch #(.DOMAINS(DOMAINS), .AW(AW)) u_fetch (
    .clk_i, .rst_ni, .fetch_en_i, .boot_addr_i,
    .instr_valid_o, .instr_rdata_o, .instr_addr_o, .instr_ready_i,
    .branch_i, .branch_target_i,
    .req_o(req), .addr_o(addr), .gnt_i(gnt), .rvalid_i(rvalid), .rdata_i(rdata),
    .seq_lower_o, .seq_split_o, .seq_dbc_o
  );

  dwm_shift_ctrl #(.DOMAINS(DOMAINS), .MEM_BYTES(MEM_BYTES), .AW(AW)) u_ctrl (
    .clk_i, .rst_ni,
    .req_i(req), .addr_i(addr), .gnt_o(gnt), .rvalid_o(rvalid),
    .dbc_o(dbc), .hs_rdata_i(hs_rdata),
    .hs_we_o(hs_we), .hs_wdata_o(hs_wdata),
    .shift_o, .shift_dir_o,
    .rd_o(rd), .rd_port_o(rd_port),
    .shift_need_o
  );

  head_status_array #(.ENTRIES(NDBC), .WIDTH(HW), .BANKS(HS_BANKS)) u_hsa (
    .clk_i, .rst_ni,
    .raddr_i(dbc), .rdata_o(hs_rdata),
    .we_i(hs_we), .waddr_i(dbc), .wdata_i(hs_wdata),
    .bank_we_o(hs_bank_we_o)
  );

  dwm_imem #(.DOMAINS(DOMAINS), .MEM_BYTES(MEM_BYTES)) u_dwm (
    .clk_i, .rst_ni,
    .shift_i(shift_o), .shift_dir_i(shift_dir_o), .shift_dbc_i(dbc),
    .rd_i(rd), .rd_dbc_i(dbc), .rd_port_i(rd_port), .rdata_o(rdata),
    .load_we_i, .load_addr_i, .load_data_i,
    .shift_err_o
  );

endmodule
