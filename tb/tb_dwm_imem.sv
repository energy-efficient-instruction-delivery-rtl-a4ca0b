// tb_dwm_imem: checks the DWM model. Loads random words into a set of
// clusters, then shifts clusters at random (staying within the overhead
// domains) and reads through both ports. The reference keeps its own head
// position per cluster and expects port p at position s to return domain
// p*D/2+s. Also checks the one-cycle read latency, that other clusters do not
// move, and that shifting past either end raises the error flag.
module tb_dwm_imem;
  import shrimp_pkg::*;
  localparam int D = 8, BYTES = 65536, WORDS = BYTES / 4, NDBC = WORDS / D;
  int checks = 0, failures = 0;

  logic clk = 0, rst_ni = 0;
  logic shift; shift_dir_e dir; logic [10:0] sdbc;
  logic rd; logic [10:0] rdbc; dwm_port_e port;
  logic [31:0] rdata;
  logic lwe; logic [13:0] laddr; logic [31:0] ldata;
  logic err;

  logic [31:0] img [WORDS];
  int ref_pos [NDBC];

  dwm_imem #(.DOMAINS(D), .MEM_BYTES(BYTES)) dut (
    .clk_i(clk), .rst_ni, .shift_i(shift), .shift_dir_i(dir), .shift_dbc_i(sdbc),
    .rd_i(rd), .rd_dbc_i(rdbc), .rd_port_i(port), .rdata_o(rdata),
    .load_we_i(lwe), .load_addr_i(laddr), .load_data_i(ldata), .shift_err_o(err));

  always #5 clk = ~clk;

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

  // clusters used by the test: a spread over the whole array
  function automatic int used_dbc(int k);
    return (k * 97) % NDBC;
  endfunction

  initial begin
    int c, p, exp_word;
    shift = 0; rd = 0; lwe = 0; sdbc = 0; rdbc = 0; dir = SHIFT_UP; port = PORT_RW;
    laddr = 0; ldata = 0;
    for (int i = 0; i < NDBC; i++) ref_pos[i] = 0;
    #12 rst_ni = 1;
    // load 64 clusters
    for (int k = 0; k < 64; k++)
      for (int w = 0; w < D; w++) begin
        @(negedge clk);
        lwe = 1; laddr = 14'(used_dbc(k) * D + w); ldata = $urandom;
        img[laddr] = ldata;
      end
    @(negedge clk); lwe = 0;
    chk(!err, "error flag after reset");
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      c = used_dbc($urandom_range(0, 63));
      if ($urandom_range(0, 1) == 0) begin
        // shift one step in a legal direction
        shift = 1; sdbc = 11'(c); rd = 0;
        if (ref_pos[c] == 0) dir = SHIFT_UP;
        else if (ref_pos[c] == D / 2 - 1) dir = SHIFT_DOWN;
        else dir = ($urandom_range(0, 1) != 0) ? SHIFT_UP : SHIFT_DOWN;
        @(posedge clk);
        ref_pos[c] += (dir == SHIFT_UP) ? 1 : -1;
      end else begin
        shift = 0; rd = 1; rdbc = 11'(c); p = $urandom_range(0, 1);
        port = (p != 0) ? PORT_R : PORT_RW;
        exp_word = img[c * D + p * D / 2 + ref_pos[c]];
        @(posedge clk);
        #1;
        chk(rdata == 32'(exp_word), $sformatf("dbc %0d port %0d pos %0d got %h exp %h",
            c, p, ref_pos[c], rdata, exp_word));
      end
    end
    @(negedge clk); shift = 0; rd = 0;
    chk(!err, "no error after legal shifts");
    // run one cluster into the end of its overhead domains
    c = used_dbc(5);
    @(negedge clk); shift = 1; sdbc = 11'(c); dir = SHIFT_UP;
    repeat (D / 2 - 1 - ref_pos[c]) @(negedge clk);
    #1 chk(!err, "no error at the last legal position");
    @(negedge clk); shift = 0;
    chk(err, "error flag after shifting past the end");
    // position unchanged by the refused shift: read both ports
    rd = 1; rdbc = 11'(c); port = PORT_R;
    @(posedge clk); #1;
    chk(rdata == img[c * D + D - 1], "read after refused shift");
    // reset puts all clusters back, and clears the flag
    @(negedge clk); rd = 0; rst_ni = 0; #2 rst_ni = 1;
    chk(!err, "error flag cleared by reset");
    @(negedge clk); rd = 1; rdbc = 11'(c); port = PORT_RW;
    @(posedge clk); #1;
    chk(rdata == img[c * D], "read after reset at initial position");
    @(negedge clk); rd = 0; shift = 1; sdbc = 11'(c); dir = SHIFT_DOWN;
    @(negedge clk); shift = 0;
    chk(err, "error flag after shifting below the initial position");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
