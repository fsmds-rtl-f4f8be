// tb_histo_fig01: runs histo_top on a data set built to have the statistics
// of the reference data file of the original design: 4096 values whose
// integer parts span 173..478 (306 bins), with the 6.25 % point at bin 68,
// the 93.75 % point at bin 214, range 147 and mean 312.8750.
//
// The data set is constructed, not read from a file: 255 values in bins
// 0..67 (one of them exactly 173.0), 3585 values in bins 68..214 in a
// triangular shape with at least one in bin 68, and 256 values in bins
// 215..305 (bin 305 holds 478.x). The cumulative count is then 255 after
// bin 67 and exactly 3840 after bin 214, which fixes both tail points.
// The fraction of the k-th value is (7k mod 16). To reach the mean, values
// are moved one bin down at a time inside bins 70..214 (which leaves both
// tail points in place) until the raw sum is at most 4096 x 5006 + 2048;
// the remaining few raw units go into one fraction. The values are shuffled
// before loading.
// Checked through the host port: error flag clear, every histogram bin, the
// mean word (5006 = 312.8750 x 16), the range word (147) and the run length.
module tb_histo_fig01;
  import histo_pkg::*;
  import histo_ref_pkg::*;

  localparam int AW = PNL_BRAM_ADDR_SIZE_NB;
  localparam int DW = PNL_BRAM_DBITS_WIDTH_NB;
  localparam int RUN_CYCLES = 1 + 2048 + 4096 + 3*4096 + 1 + 2048 + 2;
  localparam int SMALLEST   = 173;
  localparam int NB_USED    = 306;          // 173..478
  localparam int MEAN_RAW   = 5006;         // 312.8750 x 16
  localparam int LV_BIN     = 68;
  localparam int HV_BIN     = 214;
  localparam int RANGE      = 147;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          start = 1'b0;
  logic          ready, histo_err;
  logic [AW-1:0] host_addr = '0;
  logic [DW-1:0] host_din = '0, host_dout;
  logic          host_we = 1'b0;

  int checks = 0, failures = 0;
  int counts [NB_USED];
  logic [15:0] vals [NVALS];

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
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Build the bin counts and the values.
  function automatic void build();
    int w [NB_USED];
    int wsum, placed, k, sum, target, b;
    foreach (counts[i]) counts[i] = 0;
    // lower tail: 255 values in bins 0..67
    counts[0] = 1;
    for (int i = 1; i <= 67; i++) counts[i] = 3 + (i >= 15 ? 1 : 0);
    // centre: 3585 values in bins 68..214, triangular
    wsum = 0;
    for (int i = LV_BIN; i <= HV_BIN; i++) begin
      w[i] = 1 + ((i - LV_BIN) < (HV_BIN - i) ? (i - LV_BIN) : (HV_BIN - i));
      wsum += w[i];
    end
    placed = 0;
    for (int i = LV_BIN; i <= HV_BIN; i++) begin
      counts[i] = 3585 * w[i] / wsum;
      placed += counts[i];
    end
    if (counts[LV_BIN] == 0) begin counts[LV_BIN] = 1; placed++; end
    counts[141] += 3585 - placed;
    // upper tail: 256 values in bins 215..305
    for (int i = 215; i < NB_USED; i++) counts[i] = 2 + (i <= 288 ? 1 : 0);
    counts[NB_USED-1] = 2;
    // sum of the values with fraction (7k mod 16) for the k-th value
    sum = 0;
    for (int i = 0; i < NB_USED; i++) sum += counts[i] * (SMALLEST + i) * 16;
    for (int j = 0; j < NVALS; j++) sum += (7 * j) % 16;
    // move centre values down one bin at a time until the sum fits
    target = MEAN_RAW * NVALS + NVALS / 2;
    b = HV_BIN;
    while (sum > target) begin
      if (counts[b] > 0 && counts[b-1] < 200) begin
        counts[b]--; counts[b-1]++; sum -= 16;
      end
      b = (b == 70) ? HV_BIN : b - 1;
    end
    // lay out the values, bin by bin
    k = 0;
    for (int i = 0; i < NB_USED; i++)
      for (int c = 0; c < counts[i]; c++) begin
        vals[k] = 16'((SMALLEST + i) * 16 + (i == 0 ? 0 : (7 * k) % 16));
        k++;
      end
    // value 16 has fraction 0 (7*16 mod 16): give it the remaining units
    vals[16] = vals[16] + 16'(target - sum);
    // shuffle
    for (int j = NVALS - 1; j > 0; j--) begin
      int r;
      logic [15:0] t;
      r = $urandom_range(j);
      t = vals[j]; vals[j] = vals[r]; vals[r] = t;
    end
  endfunction

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

  initial begin
    histo_result_t exp;
    logic [DW-1:0] d;
    int cycles, bad_bins;

    build();
    // the constructed set must itself have the target statistics
    exp = compute(vals);
    check(exp.smallest == SMALLEST * 16, $sformatf("data set: smallest %0d", exp.smallest));
    check(exp.lv_bin == LV_BIN && exp.hv_bin == HV_BIN,
          $sformatf("data set: LV %0d HV %0d", exp.lv_bin, exp.hv_bin));
    check(exp.mean == MEAN_RAW, $sformatf("data set: mean %0d", exp.mean));

    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int i = 0; i < NVALS; i++) host_write(PN_BRAM_BASE + i, vals[i]);
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 0;
    while (!ready && cycles < 30000) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == RUN_CYCLES, $sformatf("run took %0d cycles", cycles));
    check(!histo_err, "histo_err set");

    bad_bins = 0;
    for (int b = 0; b < 2046; b++) begin
      host_read(HISTO_BRAM_BASE + b, d);
      if (int'(d) != (b < NB_USED ? counts[b] : 0)) bad_bins++;
    end
    check(bad_bins == 0, $sformatf("%0d histogram bins wrong", bad_bins));
    host_read(HISTO_BRAM_UPPER_LIMIT - 2, d);
    check(d == 16'(MEAN_RAW), $sformatf("mean word %0d expected %0d", d, MEAN_RAW));
    $display("mean %0d.%04d (raw %0d)", d / 16, (d % 16) * 625, d);
    host_read(HISTO_BRAM_UPPER_LIMIT - 1, d);
    check(d == 16'(RANGE), $sformatf("range word %0d expected %0d", d, RANGE));
    $display("range %0d, run %0d cycles", d, cycles);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
