// shrimp_fetch: instruction fetch address unit with SHRIMP sequencing.
//
// Holds the fetch program counter and drives the instruction bus towards the
// memory. After an instruction is handed to the core, the next address is
// either the branch target the core returns in the same cycle or the SHRIMP
// sequential successor from shrimp_next_pc (pc+4 in an upper cluster half,
// pc-4 in a lower one, with the implicit jumps at the half ends). The
// increment/decrement selection follows the design; the rest of the unit is
// this implementation's own simple fetch stage with one request in flight.
//
// Memory side: req_o/addr_o are held until gnt_i; the
// word follows on rdata_i with rvalid_i one cycle after the grant.
// Core side: instr_valid_o/instr_rdata_o/instr_addr_o present one
// instruction; it is taken in a cycle with instr_ready_i high, and in that
// cycle branch_i/branch_target_i say where fetching continues. When the core
// is not ready, the word is held in a register and no new request is made.
//
// Timing: with an aligned memory one instruction per cycle is delivered; the
// next request leaves in the same cycle as the handshake (combinational path
// from rvalid_i and the core's branch decision to req_o/addr_o). Fetching
// starts at boot_addr_i when fetch_en_i is high; fetch_en_i low stops new
// requests after the current one.
module shrimp_fetch #(
  parameter int unsigned DOMAINS = 8,
  parameter int unsigned AW      = 32
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          fetch_en_i,
  input  logic [AW-1:0] boot_addr_i,
  // core side
  output logic          instr_valid_o,
  output logic [31:0]   instr_rdata_o,
  output logic [AW-1:0] instr_addr_o,
  input  logic          instr_ready_i,
  input  logic          branch_i,
  input  logic [AW-1:0] branch_target_i,
  // memory side
  output logic          req_o,
  output logic [AW-1:0] addr_o,
  input  logic          gnt_i,
  input  logic          rvalid_i,
  input  logic [31:0]   rdata_i,
  // sequencing events, for observation
  output logic          seq_lower_o,   // sequential step taken in a lower half (decrement)
  output logic          seq_split_o,   // implicit upper->lower jump taken
  output logic          seq_dbc_o      // implicit jump to the next cluster taken
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_HOLD} state_e;

  state_e        state_q, state_d;
  logic [AW-1:0] pc_q, pc_d;          // address to request in S_REQ
  logic [AW-1:0] cur_q, cur_d;        // address of the instruction in flight / held
  logic [31:0]   hold_q;
  logic [AW-1:0] seq_pc, next_pc;
  logic          seq_lower, seq_split, seq_dbc;
  logic          take;

  shrimp_next_pc #(.DOMAINS(DOMAINS), .AW(AW)) u_next (
    .pc_i        (cur_q),
    .next_pc_o   (seq_pc),
    .lower_half_o(seq_lower),
    .split_jump_o(seq_split),
    .dbc_jump_o  (seq_dbc)
  );

  assign instr_valid_o = (state_q == S_WAIT && rvalid_i) || state_q == S_HOLD;
  assign instr_rdata_o = (state_q == S_HOLD) ? hold_q : rdata_i;
  assign instr_addr_o  = cur_q;
  assign take          = instr_valid_o && instr_ready_i;
  assign next_pc       = branch_i ? branch_target_i : seq_pc;

  assign seq_lower_o = take && !branch_i && seq_lower && !seq_dbc;
  assign seq_split_o = take && !branch_i && seq_split;
  assign seq_dbc_o   = take && !branch_i && seq_dbc;

  always_comb begin
    state_d = state_q;
    pc_d    = pc_q;
    cur_d   = cur_q;
    req_o   = 1'b0;
    addr_o  = pc_q;
    unique case (state_q)
      S_IDLE: begin
        pc_d = boot_addr_i;
        if (fetch_en_i) state_d = S_REQ;
      end
      S_REQ: begin
        if (fetch_en_i) begin
          req_o = 1'b1;
          if (gnt_i) begin
            state_d = S_WAIT;
            cur_d   = pc_q;
          end
        end
      end
      S_WAIT, S_HOLD: begin
        if (take) begin
          if (fetch_en_i) begin
            req_o  = 1'b1;
            addr_o = next_pc;
            if (gnt_i) begin
              state_d = S_WAIT;
              cur_d   = next_pc;
            end else begin
              state_d = S_REQ;
              pc_d    = next_pc;
            end
          end else begin
            state_d = S_REQ;
            pc_d    = next_pc;
          end
        end else if (instr_valid_o) begin
          state_d = S_HOLD;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      cur_q   <= '0;
      hold_q  <= '0;
    end else begin
      state_q <= state_d;
      pc_q    <= pc_d;
      cur_q   <= cur_d;
      if (state_q == S_WAIT && rvalid_i) hold_q <= rdata_i;
    end
  end

  a_rvalid_expected: assert property (@(posedge clk_i) disable iff (!rst_ni)
    rvalid_i |-> state_q == S_WAIT);

endmodule
