// tb_head_status_array: random writes and reads against a reference array.
// Checks reset to zero, write-then-read, that reads are combinational, and
// that exactly the bank holding the written entry sees its write enable.
module tb_head_status_array;
  localparam int ENTRIES = 2048, WIDTH = 2, BANKS = 8;
  int checks = 0, failures = 0;

  logic clk = 0, rst_ni = 0;
  logic [10:0] raddr, waddr;
  logic [WIDTH-1:0] rdata, wdata;
  logic we;
  logic [BANKS-1:0] bank_we;
  logic [WIDTH-1:0] ref_mem [ENTRIES];

  head_status_array #(.ENTRIES(ENTRIES), .WIDTH(WIDTH), .BANKS(BANKS)) dut (
    .clk_i(clk), .rst_ni, .raddr_i(raddr), .rdata_o(rdata),
    .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .bank_we_o(bank_we));

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

  initial begin
    we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < ENTRIES; i++) ref_mem[i] = '0;
    #12 rst_ni = 1;
    for (int i = 0; i < ENTRIES; i += 37) begin
      raddr = 11'(i); #1;
      chk(rdata == 0, $sformatf("reset entry %0d = %0d", i, rdata));
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 3) != 0);
      waddr = 11'($urandom);
      wdata = WIDTH'($urandom);
      raddr = (n % 3 == 0) ? waddr : 11'($urandom);
      #1;
      chk(rdata == ref_mem[raddr], $sformatf("read %0d got %0d exp %0d", raddr, rdata, ref_mem[raddr]));
      chk(bank_we == (we ? (BANKS'(1) << waddr[10:8]) : '0),
          $sformatf("bank_we %b for addr %h we %b", bank_we, waddr, we));
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      raddr = 11'(i); #1;
      chk(rdata == ref_mem[i], $sformatf("final entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
