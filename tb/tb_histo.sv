// tb_histo: self-checking test of the HISTO engine against the reference
// model in histo_ref_pkg.
//
// The engine is connected to a memory modelled here (8192 x 16, one-cycle
// read latency) so that the test can load data and inspect results directly.
// Six runs are made back to back without reset, so every run after the first
// starts on a histogram region dirtied by the one before:
//   bell-shaped data, data with negative values, data spread over 2000 bins,
//   a constant data set (upper tail never reached: error, nothing written),
//   data wider than the histogram (error), and bell-shaped data again.
// For each run the test checks the error flag, every histogram bin, the mean
// and range words, that the data region is untouched, and the run length:
// 20484 clock edges from the edge that samples start to ready high, 20483
// when the run ends with a tail-bound error.
module tb_histo;
  import histo_pkg::*;
  import histo_ref_pkg::*;

  localparam int AW = PNL_BRAM_ADDR_SIZE_NB;
  localparam int DW = PNL_BRAM_DBITS_WIDTH_NB;
  localparam int RUN_CYCLES = 1 + 2048 + 4096 + 3*4096 + 1 + 2048 + 2;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          start = 1'b0;
  logic          ready, histo_err;
  logic [AW-1:0] bram_addr;
  logic [DW-1:0] bram_din, bram_dout;
  logic          bram_we;

  logic [DW-1:0] mem [2**AW];

  int checks = 0, failures = 0;

  histo dut (
    .clk(clk), .rst(rst), .start(start), .ready(ready), .histo_err(histo_err),
    .bram_addr(bram_addr), .bram_din(bram_din), .bram_dout(bram_dout), .bram_we(bram_we)
  );

  // memory model: one port, read-first, one-cycle read latency
  always_ff @(posedge clk) begin
    if (bram_we) mem[bram_addr] <= bram_din;
    bram_dout <= mem[bram_addr];
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input dataset_t kind);
    logic [15:0] vals [NVALS];
    histo_result_t exp;
    int cycles;
    int bad_bins;
    make_data(kind, vals);
    exp = compute(vals);
    for (int i = 0; i < NVALS; i++) mem[PN_BRAM_BASE + i] = vals[i];

    @(negedge clk);
    check(ready, "ready high before start");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!ready && cycles < 30000) begin
      @(negedge clk);
      cycles++;
    end

    check(histo_err == exp.err, $sformatf("%s: histo_err %0b expected %0b", kind.name(), histo_err, exp.err));
    if (exp.overflow_err) return;   // bins above the region land in the data area

    check(cycles == (exp.bound_err ? RUN_CYCLES - 1 : RUN_CYCLES),
          $sformatf("%s: run took %0d cycles", kind.name(), cycles));
    bad_bins = 0;
    for (int b = 0; b < NBINS; b++) begin
      if (!exp.bound_err && b >= NBINS - 2) continue;    // result words
      if (int'(mem[HISTO_BRAM_BASE + b]) != exp.counts[b]) begin
        bad_bins++;
        if (bad_bins < 4)
          $display("%s: bin %0d holds %0d expected %0d", kind.name(), b, mem[HISTO_BRAM_BASE + b], exp.counts[b]);
      end
    end
    check(bad_bins == 0, $sformatf("%s: %0d histogram bins wrong", kind.name(), bad_bins));
    if (!exp.bound_err) begin
      check(mem[HISTO_BRAM_UPPER_LIMIT - 2] == 16'(exp.mean),
            $sformatf("%s: mean %0d expected %0d", kind.name(), $signed(mem[HISTO_BRAM_UPPER_LIMIT - 2]), exp.mean));
      check(mem[HISTO_BRAM_UPPER_LIMIT - 1] == 16'(exp.range),
            $sformatf("%s: range %0d expected %0d", kind.name(), mem[HISTO_BRAM_UPPER_LIMIT - 1], exp.range));
    end
    for (int i = 0; i < NVALS; i++)
      if (mem[PN_BRAM_BASE + i] != vals[i]) begin
        check(1'b0, $sformatf("%s: data word %0d changed", kind.name(), i));
        break;
      end
    $display("%s: smallest %0d/16 LV bin %0d HV bin %0d mean %0d/16 range %0d err %0b, %0d cycles",
             kind.name(), exp.smallest, exp.lv_bin, exp.hv_bin, exp.mean, exp.range, exp.err, cycles);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run(DS_BELL);
    run(DS_NEGATIVE);
    run(DS_WIDE);
    run(DS_CONSTANT);
    run(DS_OVERFLOW);
    run(DS_BELL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
