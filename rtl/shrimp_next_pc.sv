// shrimp_next_pc: sequential next-fetch-address logic for SHRIMP placement.
//
// Code is laid out in DWM block clusters (DBCs) of DOMAINS instruction words.
// The first half of a cluster (the "upper" half, read through the read-write
// port) holds instructions in ascending address order; the second half (the
// "lower" half, read through the read-only port) holds them reversed. One
// address bit, word-address bit log2(DOMAINS)-1, tells the halves apart and
// selects whether the sequential successor is pc+4 or pc-4; this follows the
// design. Reading a cluster front to back therefore visits domains
// 0,1,..,D/2-1 and then D-1,D-2,..,D/2, which leaves the tapes back in their
// initial position.
//
// At the two ends of that walk the successor is not adjacent in the address
// space, and the logic branches implicitly: after the last upper-half word
// (domain D/2-1) it continues at the last word of the cluster (domain D-1),
// and after the last lower-half word (domain D/2) it continues at domain 0 of
// the next cluster. Both are detected from the domain bits alone. The design
// calls for a hardware branch when sequential code leaves a fully filled
// cluster; treating both ends of the walk this way is this implementation's
// reading of it.
//
// Purely combinational. Addresses are byte addresses of 32-bit instructions.
module shrimp_next_pc #(
  parameter int unsigned DOMAINS = 8,   // effective domains per tape
  parameter int unsigned AW      = 32   // address width
) (
  input  logic [AW-1:0] pc_i,
  output logic [AW-1:0] next_pc_o,
  output logic          lower_half_o,   // pc_i lies in the lower (reversed) half
  output logic          split_jump_o,   // implicit jump upper half -> lower half
  output logic          dbc_jump_o      // implicit jump to the next cluster
);

  localparam int unsigned DW = $clog2(DOMAINS);     // domain index bits
  localparam int unsigned HALF_BIT = DW + 1;        // byte-address bit of the half select

  logic [DW-1:0] domain;
  logic [AW-1:0] dbc_base;

  assign domain       = pc_i[DW+1:2];
  assign lower_half_o = pc_i[HALF_BIT];
  assign dbc_base     = {pc_i[AW-1:DW+2], {(DW + 2){1'b0}}};

  always_comb begin
    split_jump_o = 1'b0;
    dbc_jump_o   = 1'b0;
    if (!lower_half_o) begin
      if (domain == DW'(DOMAINS / 2 - 1)) begin
        split_jump_o = 1'b1;
        next_pc_o    = dbc_base + AW'((DOMAINS - 1) * 4);
      end else begin
        next_pc_o    = pc_i + AW'(4);
      end
    end else begin
      if (domain == DW'(DOMAINS / 2)) begin
        dbc_jump_o   = 1'b1;
        next_pc_o    = dbc_base + AW'(DOMAINS * 4);
      end else begin
        next_pc_o    = pc_i - AW'(4);
      end
    end
  end

endmodule
