// tb_shrimp_imem_top_d64: end-to-end run of the SHRIMP instruction delivery
// subsystem with 64 domains per tape (64 KiB), the other tape length evaluated for the design.
//
// The testbench places a small program by the SHRIMP rules and loads it:
//  * cluster 0: straight-line code filling the cluster (read order: upper
//    half ascending, lower half descending), falling through to cluster 1;
//  * cluster 1: a 4-instruction loop body split in two halves with a split
//    jump J0 in the upper half and a fall-through jump J1 in the lower half,
//    the rest padded with NOPs; 5 iterations;
//  * cluster 2: a loop filling the whole cluster, no split jump, its back
//    branch in the last lower-half word; 3 iterations, then fall-through to
//    cluster 3 by the implicit next-cluster step;
//  * cluster 3: two instructions and a jump to the last cluster;
//  * last cluster: a short loop left in linear order (below the split
//    threshold), more code across the half boundary, then EBREAK.
// A core model in the testbench executes the control flow: JAL always jumps;
// a conditional branch is taken rs1-field times and then falls through;
// EBREAK ends the run. It stalls at random.
//
// The reference keeps its own head position per cluster. For every fetched
// instruction it checks the address, the word, and that it arrives exactly
// 1 + (needed shifts) cycles after the previous one was taken. It counts the
// mechanisms of the design and fails if one never happened: upward and
// downward shifts, aligned fetches, decrementing steps in a lower half, the
// implicit upper-to-lower and next-cluster steps, taken branches, core
// stalls, head status writes in more than one bank, and loop back-edges into
// a fully filled SHRIMP cluster, which must need no shift at all.
module tb_shrimp_imem_top_d64;
  import shrimp_pkg::*;
  localparam int D = 64;
  localparam int BYTES = 65536;
  localparam int WORDS = BYTES / 4;
  localparam int NDBC = WORDS / D;
  localparam int BANKS = 8;

  int checks = 0, failures = 0;

  logic clk = 0, rst_ni = 0;
  logic fetch_en, valid, ready, branch;
  logic [31:0] rdata, iaddr, target;
  logic lwe;
  logic [$clog2(WORDS)-1:0] laddr;
  logic [31:0] ldata;
  logic shift, serr, ev_lower, ev_split, ev_dbc;
  shift_dir_e sdir;
  logic [$clog2(D)-2:0] need;
  logic [BANKS-1:0] bank_we;

  shrimp_imem_top #(.DOMAINS(D)) dut (
    .clk_i(clk), .rst_ni, .fetch_en_i(fetch_en), .boot_addr_i(32'h0),
    .instr_valid_o(valid), .instr_rdata_o(rdata), .instr_addr_o(iaddr),
    .instr_ready_i(ready), .branch_i(branch), .branch_target_i(target),
    .load_we_i(lwe), .load_addr_i(laddr), .load_data_i(ldata),
    .shift_o(shift), .shift_dir_o(sdir), .shift_err_o(serr),
    .seq_lower_o(ev_lower), .seq_split_o(ev_split), .seq_dbc_o(ev_dbc),
    .shift_need_o(need), .hs_bank_we_o(bank_we));

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20 * D * 100 + 50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- encoding
  localparam logic [31:0] EBREAK = 32'h0010_0073;
  localparam logic [31:0] NOP    = 32'h0000_0013;

  function automatic logic [31:0] enc_addi(int tag);
    return {12'(tag), 5'd0, 3'd0, 5'd1, 7'h13};
  endfunction
  function automatic logic [31:0] enc_jal(int off);
    logic [20:0] o = 21'(off);
    return {o[20], o[10:1], o[11], o[19:12], 5'd0, 7'h6F};
  endfunction
  function automatic logic [31:0] enc_bne(int off, int trips);
    logic [12:0] o = 13'(off);
    return {o[12], o[10:5], 5'd0, 5'(trips), 3'b001, o[4:1], o[11], 7'h63};
  endfunction
  function automatic int dec_j(logic [31:0] i);
    return int'({{11{i[31]}}, i[31], i[19:12], i[20], i[30:21], 1'b0});
  endfunction
  function automatic int dec_b(logic [31:0] i);
    return int'({{19{i[31]}}, i[31], i[7], i[30:25], i[11:8], 1'b0});
  endfunction

  // ---------------------------------------------------------------- program
  logic [31:0] img [WORDS];
  int used [$];

  function automatic int waddr(int c, int dom);
    return c * D + dom;
  endfunction
  function automatic int baddr(int c, int dom);
    return 4 * waddr(c, dom);
  endfunction
  // domain of the i-th word in cluster read order
  function automatic int rd_dom(int i);
    return (i < D / 2) ? i : D - 1 - (i - D / 2);
  endfunction

  task automatic build_program();
    int tag = 1;
    int far = NDBC - 1;
    foreach (used[k]) ;
    used = '{0, 1, 2, 3, far};
    foreach (used[k]) for (int w = 0; w < D; w++) img[waddr(used[k], w)] = NOP;
    // cluster 0: straight-line code
    for (int i = 0; i < D; i++) img[waddr(0, rd_dom(i))] = enc_addi(tag++);
    // cluster 1: split 4-instruction loop (a0 a1 | a2 bne), 5 iterations
    img[waddr(1, 0)]         = enc_addi(tag++);                                     // a0
    img[waddr(1, 1)]         = enc_addi(tag++);                                     // a1
    img[waddr(1, 2)]         = enc_jal(baddr(1, D / 2 + 2) - baddr(1, 2));          // J0
    img[waddr(1, D / 2 + 2)] = enc_addi(tag++);                                     // a2
    img[waddr(1, D / 2 + 1)] = enc_bne(baddr(1, 0) - baddr(1, D / 2 + 1), 4);       // loop
    img[waddr(1, D / 2)]     = enc_jal(baddr(2, 0) - baddr(1, D / 2));              // J1
    // cluster 2: full-cluster loop, 3 iterations
    for (int i = 0; i < D - 1; i++) img[waddr(2, rd_dom(i))] = enc_addi(tag++);
    img[waddr(2, D / 2)] = enc_bne(baddr(2, 0) - baddr(2, D / 2), 2);
    // cluster 3: jump to the last cluster
    img[waddr(3, 0)] = enc_addi(tag++);
    img[waddr(3, 1)] = enc_addi(tag++);
    img[waddr(3, 2)] = enc_jal(baddr(far, 0) - baddr(3, 2));
    // last cluster: short linear loop, then code over the half boundary
    img[waddr(far, 0)] = enc_addi(tag++);
    img[waddr(far, 1)] = enc_addi(tag++);
    img[waddr(far, 2)] = enc_bne(baddr(far, 0) - baddr(far, 2), 1);
    for (int d = 3; d < D / 2; d++) img[waddr(far, d)] = enc_addi(tag++);
    img[waddr(far, D - 1)] = enc_addi(tag++);
    img[waddr(far, D - 2)] = EBREAK;
  endtask

  // ---------------------------------------------------------------- reference
  int ref_pos [NDBC];
  int trips [int];

  function automatic int ref_next(int a);
    int dom = (a / 4) % D;
    int base = a - 4 * dom;
    if (dom < D / 2 - 1) return a + 4;
    if (dom == D / 2 - 1) return base + (D - 1) * 4;
    if (dom > D / 2) return a - 4;
    return base + D * 4;
  endfunction

  // shifts needed to fetch byte address a; updates the reference positions
  function automatic int ref_fetch(int a);
    int c = a / (4 * D), s = (a / 4) % (D / 2), n;
    n = (s > ref_pos[c]) ? s - ref_pos[c] : ref_pos[c] - s;
    ref_pos[c] = s;
    return n;
  endfunction

  int n_up = 0, n_down = 0, n_shift = 0, n_aligned = 0, n_lower = 0, n_split = 0;
  int n_dbc = 0, n_branch = 0, n_stall = 0, n_backedge1 = 0, n_backedge2 = 0, n_instr = 0, exp_shifts = 0;
  logic [BANKS-1:0] banks_seen = '0;

  always @(posedge clk) if (rst_ni) begin
    if (shift) begin
      n_shift++;
      if (sdir == SHIFT_UP) n_up++; else n_down++;
    end
    banks_seen |= bank_we;
  end

  initial begin
    int exp_addr, gap, nsh, off;
    logic halted;
    logic [31:0] held;
    fetch_en = 0; ready = 0; branch = 0; target = 0; lwe = 0; laddr = 0; ldata = 0;
    for (int i = 0; i < NDBC; i++) ref_pos[i] = 0;
    build_program();
    #12 rst_ni = 1;
    // load the program
    foreach (used[k])
      for (int w = 0; w < D; w++) begin
        @(negedge clk);
        lwe = 1; laddr = ($clog2(WORDS))'(waddr(used[k], w)); ldata = img[waddr(used[k], w)];
      end
    @(negedge clk);
    lwe = 0;
    fetch_en = 1;
    exp_addr = 0;
    nsh = ref_fetch(0);
    exp_shifts += nsh;
    gap = -1;  // the first request leaves one cycle after fetch_en_i rises
    halted = 0;
    while (!halted) begin
      while (!valid) begin
        @(negedge clk); gap++;
        if (gap > 4 * D) break;
      end
      n_instr++;
      chk(valid && iaddr == 32'(exp_addr), $sformatf("instr %0d addr %h exp %h", n_instr, iaddr, exp_addr));
      chk(rdata == img[exp_addr / 4], $sformatf("instr %0d at %h: word %h exp %h", n_instr, iaddr, rdata, img[exp_addr / 4]));
      chk(gap == 1 + nsh, $sformatf("instr %0d at %h: %0d cycles, exp %0d", n_instr, iaddr, gap, 1 + nsh));
      if (nsh == 0) n_aligned++;
      if ($urandom_range(0, 3) == 0) begin
        held = rdata;
        ready = 0;
        repeat ($urandom_range(1, 3)) begin
          @(negedge clk);
          chk(valid && rdata == held, "held instruction stable");
        end
        n_stall++;
      end
      // core model: decide the control flow of this instruction
      ready = 1;
      branch = 0;
      if (rdata == EBREAK) begin
        halted = 1;
        fetch_en = 0;
      end else if (rdata[6:0] == 7'h6F) begin
        branch = 1; target = 32'(exp_addr + dec_j(rdata));
      end else if (rdata[6:0] == 7'h63) begin
        if (!trips.exists(exp_addr)) trips[exp_addr] = 0;
        if (trips[exp_addr] < int'(rdata[19:15])) begin
          trips[exp_addr]++;
          branch = 1; target = 32'(exp_addr + dec_b(rdata));
        end else trips[exp_addr] = 0;
      end
      #1;
      if (ev_lower) n_lower++;
      if (ev_split) n_split++;
      if (ev_dbc)   n_dbc++;
      if (branch)   n_branch++;
      exp_addr = branch ? int'(target) : ref_next(exp_addr);
      nsh = ref_fetch(exp_addr);
      if (!halted) exp_shifts += nsh;
      // loop back-edges: into the full cluster 2 the tapes are back at the
      // initial position; the split loop of cluster 1 ends one step away
      if (branch && rdata[6:0] == 7'h63 && exp_addr / (4 * D) == 2) begin
        n_backedge2++;
        chk(nsh == 0, "back-edge into the full SHRIMP cluster needs no shift");
      end
      if (branch && rdata[6:0] == 7'h63 && exp_addr / (4 * D) == 1) begin
        n_backedge1++;
        chk(nsh == 1, "back-edge into the split loop needs one shift");
      end
      @(negedge clk);
      ready = 0; branch = 0;
      gap = 1;
    end
    repeat (3) @(negedge clk);
    chk(n_instr == D + 26 + 3 * D + 3 + 6 + (D / 2 - 3) + 2,
        $sformatf("%0d instructions executed, exp %0d", n_instr, D + 26 + 3 * D + 3 + 6 + (D / 2 - 3) + 2));
    chk(n_shift == exp_shifts, $sformatf("%0d shifts, exp %0d", n_shift, exp_shifts));
    chk(!serr, "no shift past the overhead domains");
    $display("instr=%0d shifts=%0d (up %0d down %0d) aligned=%0d lower=%0d split=%0d dbc=%0d",
             n_instr, n_shift, n_up, n_down, n_aligned, n_lower, n_split, n_dbc);
    $display("branches=%0d stalls=%0d back-edges %0d/%0d hs banks written=%b",
             n_branch, n_stall, n_backedge1, n_backedge2, banks_seen);
    chk(n_up > 0, "upward shift happened");
    chk(n_down > 0, "downward shift happened");
    chk(n_aligned > 0, "aligned fetch happened");
    chk(n_lower > 0, "lower-half decrement happened");
    chk(n_split > 0, "implicit upper-to-lower step happened");
    chk(n_dbc > 0, "implicit next-cluster step happened");
    chk(n_branch > 0, "taken branch happened");
    chk(n_stall > 0, "core stall happened");
    chk($countones(banks_seen) > 1, "head status writes in several banks");
    chk(n_backedge1 == 4 && n_backedge2 == 2, "loop back-edges taken as programmed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
