// tb_histo_top: end-to-end test of histo_top at its default sizes.
//
// Everything goes through the host port, as the processor would use it: the
// 4096 values are written into the data region, start is pulsed, the test
// waits for ready and then reads back the whole histogram, the mean and the
// range and compares them with the reference model in histo_ref_pkg. The
// runs cover bell-shaped data, data with negative values, data spread over
// 2000 bins, a constant data set (tail-bound error), data wider than the
// histogram (overflow error), and a final bell-shaped run. During one run the
// host also tries to overwrite a data word; the write must be ignored.
// The test counts how often each mechanism of the engine was exercised and
// fails if one never was: clearing a histogram left by a previous run,
// results written back, the tail-bound error, the overflow error, negative
// data, and a host write blocked while the engine owns the memory.
module tb_histo_top;
  import histo_pkg::*;
  import histo_ref_pkg::*;

  localparam int AW = PNL_BRAM_ADDR_SIZE_NB;
  localparam int DW = PNL_BRAM_DBITS_WIDTH_NB;
  localparam int RUN_CYCLES = 1 + 2048 + 4096 + 3*4096 + 1 + 2048 + 2;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          start = 1'b0;
  logic          ready, histo_err;
  logic [AW-1:0] host_addr = '0;
  logic [DW-1:0] host_din = '0, host_dout;
  logic          host_we = 1'b0;

  int checks = 0, failures = 0;
  int n_dirty_clear = 0, n_results = 0, n_bound_err = 0, n_overflow_err = 0;
  int n_negative = 0, n_host_blocked = 0;
  bit histo_dirty = 0;

  histo_top dut (
    .clk(clk), .rst(rst), .start(start), .ready(ready), .histo_err(histo_err),
    .host_addr(host_addr), .host_din(host_din), .host_we(host_we), .host_dout(host_dout)
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int a, input logic [DW-1:0] d);
    @(negedge clk);
    host_addr = AW'(a); host_din = d; host_we = 1'b1;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  task automatic host_read(input int a, output logic [DW-1:0] d);
    @(negedge clk);
    host_addr = AW'(a);
    @(negedge clk);
    d = host_dout;
  endtask

  task automatic run(input dataset_t kind, input bit try_write);
    logic [15:0] vals [NVALS];
    logic [DW-1:0] d;
    histo_result_t exp;
    int cycles, bad_bins;
    make_data(kind, vals);
    exp = compute(vals);
    if (exp.smallest < 0) n_negative++;
    for (int i = 0; i < NVALS; i++) host_write(PN_BRAM_BASE + i, vals[i]);

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!ready && cycles < 30000) begin
      if (try_write && cycles == 100) begin
        host_addr = AW'(PN_BRAM_BASE + 7); host_din = ~vals[7]; host_we = 1'b1;
      end else begin
        host_we = 1'b0;
      end
      @(negedge clk);
      cycles++;
    end
    host_we = 1'b0;

    check(histo_err == exp.err, $sformatf("%s: histo_err %0b expected %0b", kind.name(), histo_err, exp.err));
    if (exp.overflow_err) begin
      if (histo_err) n_overflow_err++;
      histo_dirty = 1;
      return;
    end
    if (exp.bound_err && histo_err) n_bound_err++;
    check(cycles == (exp.bound_err ? RUN_CYCLES - 1 : RUN_CYCLES),
          $sformatf("%s: run took %0d cycles", kind.name(), cycles));

    bad_bins = 0;
    for (int b = 0; b < NBINS; b++) begin
      if (!exp.bound_err && b >= NBINS - 2) continue;
      host_read(HISTO_BRAM_BASE + b, d);
      if (int'(d) != exp.counts[b]) bad_bins++;
    end
    check(bad_bins == 0, $sformatf("%s: %0d histogram bins wrong", kind.name(), bad_bins));
    if (histo_dirty && bad_bins == 0) n_dirty_clear++;
    histo_dirty = 1;

    if (!exp.bound_err) begin
      logic [DW-1:0] mean_w, range_w;
      host_read(HISTO_BRAM_UPPER_LIMIT - 2, mean_w);
      host_read(HISTO_BRAM_UPPER_LIMIT - 1, range_w);
      check(mean_w == 16'(exp.mean),
            $sformatf("%s: mean %0d expected %0d", kind.name(), $signed(mean_w), exp.mean));
      check(range_w == 16'(exp.range),
            $sformatf("%s: range %0d expected %0d", kind.name(), range_w, exp.range));
      if (mean_w == 16'(exp.mean) && range_w == 16'(exp.range)) n_results++;
      $display("%s: mean %0d.%04d range %0d", kind.name(), exp.mean / 16,
               ((exp.mean < 0 ? -exp.mean : exp.mean) % 16) * 625, exp.range);
    end

    if (try_write) begin
      host_read(PN_BRAM_BASE + 7, d);
      check(d == vals[7], "host write during a run was not blocked");
      if (d == vals[7]) n_host_blocked++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(DS_BELL, 1'b0);
    run(DS_NEGATIVE, 1'b1);
    run(DS_WIDE, 1'b0);
    run(DS_CONSTANT, 1'b0);
    run(DS_OVERFLOW, 1'b0);
    run(DS_BELL, 1'b0);

    $display("mechanisms: dirty histogram cleared %0d, results written %0d, tail-bound error %0d, overflow error %0d, negative data %0d, host write blocked %0d",
             n_dirty_clear, n_results, n_bound_err, n_overflow_err, n_negative, n_host_blocked);
    check(n_dirty_clear > 0,  "no run cleared a dirty histogram");
    check(n_results > 0,      "no results were written");
    check(n_bound_err > 0,    "tail-bound error never raised");
    check(n_overflow_err > 0, "overflow error never raised");
    check(n_negative > 0,     "no negative data processed");
    check(n_host_blocked > 0, "no host write was blocked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
