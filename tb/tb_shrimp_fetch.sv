// tb_shrimp_fetch: runs the fetch unit against a testbench memory that grants
// after a random delay and returns a word derived from the address, and a
// core model that stalls and branches at random. The reference computes every
// expected fetch address itself: the branch target after a taken branch,
// otherwise the next word in the cluster read order (ascending upper half,
// descending lower half, then the next cluster). It checks the delivered
// address and word, that a held word stays stable while the core stalls, and
// that each instruction arrives exactly 1 + grant-delay cycles after the
// previous one was taken.
module tb_shrimp_fetch;
  localparam int D = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_ni = 0;
  logic fetch_en;
  logic valid, ready, branch;
  logic [31:0] rdata, iaddr, target;
  logic req, gnt, rvalid;
  logic [31:0] addr, mdata;
  logic ev_lower, ev_split, ev_dbc;

  shrimp_fetch #(.DOMAINS(D)) dut (
    .clk_i(clk), .rst_ni, .fetch_en_i(fetch_en), .boot_addr_i(32'h0000_0100),
    .instr_valid_o(valid), .instr_rdata_o(rdata), .instr_addr_o(iaddr),
    .instr_ready_i(ready), .branch_i(branch), .branch_target_i(target),
    .req_o(req), .addr_o(addr), .gnt_i(gnt), .rvalid_i(rvalid), .rdata_i(mdata),
    .seq_lower_o(ev_lower), .seq_split_o(ev_split), .seq_dbc_o(ev_dbc));

  always #5 clk = ~clk;

  function automatic logic [31:0] word_of(logic [31:0] a);
    return {a[15:0], ~a[15:0]} ^ 32'h5A3C_0F96;
  endfunction

  function automatic logic [31:0] ref_next(logic [31:0] a);
    int dom = int'(a[4:2]);
    logic [31:0] base = {a[31:5], 5'b0};
    if (dom < D / 2 - 1) return a + 4;
    if (dom == D / 2 - 1) return base + 32'((D - 1) * 4);
    if (dom > D / 2) return a - 4;
    return base + 32'(D * 4);
  endfunction

  // memory model: grant after gnt_delay cycles of a held request
  int gnt_delay = 0, waited = 0, cur_delay = 0;
  logic [31:0] gaddr;
  always_comb gnt = req && (waited >= cur_delay);
  always @(posedge clk) begin
    rvalid <= gnt;
    if (gnt) begin
      mdata <= word_of(addr);
      waited <= 0;
      cur_delay <= gnt_delay;
    end else if (req) waited <= waited + 1;
  end

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_lower = 0, n_split = 0, n_dbc = 0, n_branch = 0, n_stall = 0;

  initial begin
    logic [31:0] exp_addr, held;
    int gap, delay_used;
    fetch_en = 0; ready = 0; branch = 0; target = 0;
    rvalid = 0; mdata = 0;
    #12 rst_ni = 1;
    @(negedge clk);
    fetch_en = 1;
    exp_addr = 32'h100;
    delay_used = 0;
    gap = -1;  // the first request leaves one cycle after fetch_en_i rises
    for (int n = 0; n < 5000; n++) begin
      // wait for the next instruction
      while (!valid) begin
        @(negedge clk); gap++;
        if (gap > 20) break;
      end
      chk(gap == 1 + delay_used, $sformatf("instr %0d arrived after %0d cycles, exp %0d", n, gap, 1 + delay_used));
      chk(iaddr == exp_addr, $sformatf("instr %0d addr %h exp %h", n, iaddr, exp_addr));
      chk(rdata == word_of(exp_addr), $sformatf("instr %0d data %h", n, rdata));
      // stall the core for a while
      if ($urandom_range(0, 4) == 0) begin
        held = rdata;
        ready = 0;
        repeat ($urandom_range(1, 3)) begin
          @(negedge clk);
          chk(valid && rdata == held && iaddr == exp_addr, "held instruction stable");
          chk(!req, "no request while the core stalls");
        end
        n_stall++;
      end
      ready  = 1;
      branch = ($urandom_range(0, 7) == 0);
      target = {16'h0, 14'($urandom), 2'b00};
      gnt_delay = ($urandom_range(0, 2) == 0) ? $urandom_range(1, 3) : 0;
      delay_used = cur_delay;
      #1;
      if (ev_lower) n_lower++;
      if (ev_split) n_split++;
      if (ev_dbc)   n_dbc++;
      if (branch)   n_branch++;
      chk(req && addr == (branch ? target : ref_next(exp_addr)), "next request in the handshake cycle");
      exp_addr = branch ? target : ref_next(exp_addr);
      @(negedge clk);
      ready = 0; branch = 0;
      gap = 1;
    end
    $display("lower=%0d split=%0d dbc=%0d branch=%0d stall=%0d", n_lower, n_split, n_dbc, n_branch, n_stall);
    chk(n_lower > 0 && n_split > 0 && n_dbc > 0 && n_branch > 0 && n_stall > 0, "all events seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
