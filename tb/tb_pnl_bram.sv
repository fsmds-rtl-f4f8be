// tb_pnl_bram: self-checking test of the single-port block RAM.
//
// Fills every word with a pseudo-random pattern kept in a shadow array, then
// reads all words back in a scrambled order, mixes reads with writes to check
// the read-first behaviour (a write cycle returns the old word), and checks
// that read data appear exactly one cycle after the address.
module tb_pnl_bram;
  import histo_pkg::*;

  localparam int AW = PNL_BRAM_ADDR_SIZE_NB;
  localparam int DW = PNL_BRAM_DBITS_WIDTH_NB;
  localparam int DEPTH = 2**AW;

  logic          clk = 1'b0;
  logic [AW-1:0] addr;
  logic [DW-1:0] din, dout;
  logic          we;

  int checks = 0, failures = 0;
  logic [DW-1:0] shadow [DEPTH];

  pnl_bram dut (.clk(clk), .addr(addr), .din(din), .we(we), .dout(dout));

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; addr = '0; din = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      shadow[a] = DW'($urandom);
      addr = AW'(a); din = shadow[a]; we = 1'b1;
    end
    @(negedge clk); we = 1'b0;
    // read back with a stride that visits every address once
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 2897 + 13) % DEPTH;
      addr = AW'(a);
      @(negedge clk);
      check(dout, shadow[a], $sformatf("read %0d", a));
    end
    // write cycles return the previous contents, then the new word is read
    for (int i = 0; i < 200; i++) begin
      int a;
      logic [DW-1:0] nv;
      a = $urandom_range(DEPTH-1);
      nv = DW'($urandom);
      addr = AW'(a); din = nv; we = 1'b1;
      @(negedge clk);
      check(dout, shadow[a], "read-first on write");
      shadow[a] = nv;
      we = 1'b0;
      @(negedge clk);
      check(dout, nv, "read after write");
    end
    // latency: data change only at the clock edge after the address
    addr = 13'd100;
    @(negedge clk);
    addr = 13'd200;
    #3;
    check(dout, shadow[100], "data held until the next edge");
    @(negedge clk);
    check(dout, shadow[200], "data after one edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
