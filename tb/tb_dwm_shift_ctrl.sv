// tb_dwm_shift_ctrl: drives fetch requests at random addresses into the shift
// control unit, with a reference head status array in the testbench. For each
// request it expects |needed - current| shift cycles, each one step in the
// right direction with the position written back, then a grant with a read on
// the port fixed by the domain's half, and rvalid one cycle after the grant.
module tb_dwm_shift_ctrl;
  import shrimp_pkg::*;
  localparam int D = 8, BYTES = 65536, NDBC = BYTES / (4 * D);
  int checks = 0, failures = 0;

  logic clk = 0, rst_ni = 0;
  logic req, gnt, rvalid;
  logic [31:0] addr;
  logic [10:0] dbc;
  logic [1:0]  hs_rdata, hs_wdata, need;
  logic hs_we, shift, rd;
  shift_dir_e dir;
  dwm_port_e port;
  int ref_pos [NDBC];

  dwm_shift_ctrl #(.DOMAINS(D), .MEM_BYTES(BYTES)) dut (
    .clk_i(clk), .rst_ni, .req_i(req), .addr_i(addr), .gnt_o(gnt), .rvalid_o(rvalid),
    .dbc_o(dbc), .hs_rdata_i(hs_rdata), .hs_we_o(hs_we),
    .hs_wdata_o(hs_wdata), .shift_o(shift), .shift_dir_o(dir),
    .rd_o(rd), .rd_port_o(port), .shift_need_o(need));

  assign hs_rdata = 2'(ref_pos[dbc]);
  always @(posedge clk) if (hs_we) ref_pos[dbc] <= int'(hs_wdata);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_up = 0, n_down = 0, n_zero = 0;

  initial begin
    int c, dom, tgt, start, cycles, p;
    req = 0; addr = 0;
    for (int i = 0; i < NDBC; i++) ref_pos[i] = 0;
    #12 rst_ni = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      c   = (n < 1500) ? $urandom_range(0, 7) : $urandom_range(0, NDBC - 1);
      dom = $urandom_range(0, D - 1);
      addr = 32'(c * D * 4 + dom * 4) | ({$urandom} & 32'hFFFF_0000);
      req = 1;
      tgt = dom % (D / 2);
      start = ref_pos[c];
      cycles = 0;
      #1;
      chk(int'(need) == ((tgt > start) ? tgt - start : start - tgt), "shift amount");
      if (tgt == start) n_zero++; else if (tgt > start) n_up++; else n_down++;
      while (!gnt) begin
        chk(shift && hs_we && !rd && int'(dbc) == c,
            $sformatf("shift cycle %0d for dbc %0d", cycles, c));
        chk(dir == ((tgt > ref_pos[c]) ? SHIFT_UP : SHIFT_DOWN), "shift direction");
        chk(int'(hs_wdata) == ref_pos[c] + ((tgt > ref_pos[c]) ? 1 : -1), "written position");
        @(posedge clk); #1;
        cycles++;
        if (cycles > D) break;
      end
      chk(cycles == ((tgt > start) ? tgt - start : start - tgt),
          $sformatf("dbc %0d dom %0d from %0d: %0d shift cycles", c, dom, start, cycles));
      p = dom / (D / 2);
      chk(rd && !shift && !hs_we && int'(dbc) == c && port == ((p != 0) ? PORT_R : PORT_RW),
          "read command at grant");
      chk(!rvalid, "no rvalid in grant cycle");
      @(posedge clk);
      @(negedge clk); req = ($urandom_range(0, 1) != 0) ? 1'b0 : req;
      if (req) begin
        // a new request can follow directly: reuse the same address
        #1 chk(gnt && rvalid, "back-to-back request to the same word is aligned, rvalid present");
        @(posedge clk);
        @(negedge clk); req = 0;
      end
      #1 chk(rvalid, "rvalid one cycle after grant");
      @(negedge clk);
      #1 chk(!rvalid, "single rvalid per grant");
    end
    chk(n_up > 0 && n_down > 0 && n_zero > 0, "all three cases seen");
    $display("up=%0d down=%0d aligned=%0d", n_up, n_down, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
