// tb_shrimp_next_pc: checks the SHRIMP sequential successor for clusters of
// 8 and 64 domains. The reference walks each cluster in its read order
// (domains 0..D/2-1 ascending, then D-1..D/2 descending, then the next
// cluster) and expects every address to map to the one after it in that walk.
module tb_shrimp_next_pc;
  int checks = 0, failures = 0;

  logic [31:0] pc8, nxt8, pc64, nxt64;
  logic lo8, sp8, dj8, lo64, sp64, dj64;

  shrimp_next_pc #(.DOMAINS(8))  dut8  (.pc_i(pc8),  .next_pc_o(nxt8),  .lower_half_o(lo8),
                                        .split_jump_o(sp8),  .dbc_jump_o(dj8));
  shrimp_next_pc #(.DOMAINS(64)) dut64 (.pc_i(pc64), .next_pc_o(nxt64), .lower_half_o(lo64),
                                        .split_jump_o(sp64), .dbc_jump_o(dj64));

  // Read order position -> domain
  function automatic int order_dom(int d, int i);
    return (i < d / 2) ? i : d - 1 - (i - d / 2);
  endfunction

  task automatic check_walk(int d, logic [31:0] base);
    logic [31:0] a, e;
    for (int i = 0; i < d; i++) begin
      a = base + 32'(order_dom(d, i) * 4);
      e = (i == d - 1) ? base + 32'(d * 4) : base + 32'(order_dom(d, i + 1) * 4);
      if (d == 8) begin pc8 = a; end else begin pc64 = a; end
      #1;
      checks++;
      if (d == 8) begin
        if (nxt8 !== e || lo8 !== (i >= d / 2) || sp8 !== (i == d / 2 - 1) || dj8 !== (i == d - 1)) begin
          failures++;
          $display("FAIL d=8 pc=%h next=%h exp=%h lo=%b sp=%b dj=%b", a, nxt8, e, lo8, sp8, dj8);
        end
      end else begin
        if (nxt64 !== e || lo64 !== (i >= d / 2) || sp64 !== (i == d / 2 - 1) || dj64 !== (i == d - 1)) begin
          failures++;
          $display("FAIL d=64 pc=%h next=%h exp=%h", a, nxt64, e);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc8 = '0; pc64 = '0;
    for (int c = 0; c < 64; c++) check_walk(8, 32'(c * 32));
    for (int c = 0; c < 16; c++) check_walk(64, 32'(c * 256));
    for (int r = 0; r < 200; r++) begin
      check_walk(8,  {$urandom} & 32'hFFFF_FFE0 & 32'h0000_FFFF);
      check_walk(64, {$urandom} & 32'hFFFF_FF00 & 32'h0000_FFFF);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
