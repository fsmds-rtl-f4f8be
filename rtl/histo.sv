// histo: finite-state machine with datapath that computes a histogram, the
// mean and the 6.25 %..93.75 % range of a block of fixed-point values held in
// a block RAM, and writes the results back into that RAM.
//
// The values are signed 16-bit numbers with 4 fraction bits. The histogram
// has one 16-bit bin per integer value; bin 0 belongs to the integer part of
// the smallest value. A run, started by a one-cycle start pulse while ready
// is high, walks through these phases:
//   clear_mem         write 0 into every histogram word (2048 cycles)
//   find_smallest     read all values, keep the smallest (4096 cycles)
//   compute_addr,     per value: form the bin address from the integer parts
//   inc_cell,         of the value and of the smallest value, add the value to
//   get_next_PN       the running sum, read the bin, write it back plus one
//                     (3 cycles per value)
//   init_dist,        walk the histogram accumulating the counts; the first
//   sweep_BRAM        bin at which the cumulative count reaches the low bound
//                     (NUM_PNS/16) is LV, the last bin at which it is still at
//                     or below the high bound (NUM_PNS - NUM_PNS/16) is HV
//   check_histo_error raise HISTO_ERR if LV or HV was never found, else write
//   write_range       the mean (sum / NUM_PNS, 12.4 format) to the second-to-
//                     last histogram word and HV - LV + 1 to the last word
// HISTO_ERR is also raised when a value's bin lies above the histogram region
// (the data spread over more integers than there are bins); that bin is still
// incremented, as in the original design. ready returns high in idle.
// With the default sizes a run takes 1 + 2048 + 4096 + 3*4096 + 1 + 2048 +
// 2 = 20484 cycles from the start pulse to ready (20483 on the HV error path).
//
// Memory interface: one port of a RAM with a one-cycle read latency. The
// address output is combinational: it carries the address the next state
// works on, so that its read data are on bram_dout in that state. Integer
// parts are taken by signed division by 16, which truncates toward zero,
// as in the original design.
//
// What follows the original design: the states, their order and actions,
// the memory map, the bounds and the result formats. This implementation's
// own choices: active-high asynchronous reset (as the original's RESET),
// the 12-bit width of the range result, and parameters for the sizes.
module histo
  import histo_pkg::*;
#(
  parameter int unsigned ADDR_NB       = PNL_BRAM_ADDR_SIZE_NB,
  parameter int unsigned DATA_NB       = PNL_BRAM_DBITS_WIDTH_NB,
  parameter int unsigned NUM_NB        = NUM_PNS_NB,
  parameter int unsigned FRAC_NB       = PN_PRECISION_NB,
  parameter int unsigned HISTO_BASE    = HISTO_BRAM_BASE,
  parameter int unsigned HISTO_LIMIT   = HISTO_BRAM_UPPER_LIMIT,
  parameter int unsigned PN_BASE       = PN_BRAM_BASE,
  parameter int unsigned PN_LIMIT      = PN_UPPER_LIMIT,
  parameter int unsigned BOUND_SHIFT   = HISTO_BOUND_PCT_SHIFT_NB,
  parameter int unsigned RANGE_NB      = HISTO_MAX_RANGE_NB
) (
  input  logic               clk,
  input  logic               rst,        // asynchronous, active high
  input  logic               start,
  output logic               ready,
  output logic               histo_err,
  output logic [ADDR_NB-1:0] bram_addr,
  output logic [DATA_NB-1:0] bram_din,
  input  logic [DATA_NB-1:0] bram_dout,
  output logic               bram_we
);

  localparam int unsigned INT_NB = DATA_NB - FRAC_NB;   // integer bits of a value
  localparam int unsigned SUM_NB = NUM_NB + DATA_NB;    // width of the value sum
  localparam int unsigned CNT_NB = NUM_NB + 1;          // width of the count sum

  localparam logic [ADDR_NB-1:0] HISTO_FIRST = ADDR_NB'(HISTO_BASE);
  localparam logic [ADDR_NB-1:0] HISTO_LAST  = ADDR_NB'(HISTO_LIMIT - 1);
  localparam logic [ADDR_NB-1:0] MEAN_ADDR   = ADDR_NB'(HISTO_LIMIT - 2);
  localparam logic [ADDR_NB-1:0] PN_FIRST    = ADDR_NB'(PN_BASE);
  localparam logic [ADDR_NB-1:0] PN_LAST     = ADDR_NB'(PN_LIMIT - 1);

  localparam logic [CNT_NB-1:0] NUM_VALS = CNT_NB'(2**NUM_NB);
  localparam logic [CNT_NB-1:0] LV_BOUND = NUM_VALS >> BOUND_SHIFT;
  localparam logic [CNT_NB-1:0] HV_BOUND = NUM_VALS - LV_BOUND;

  // Signed division by 2**FRAC_NB, truncating toward zero.
  function automatic logic signed [INT_NB-1:0] int_part(input logic signed [DATA_NB-1:0] v);
    logic signed [DATA_NB-1:0] q;
    q = v >>> FRAC_NB;
    if (v < 0 && v[FRAC_NB-1:0] != '0) q = q + 1;
    return q[INT_NB-1:0];
  endfunction

  // Registers
  histo_state_t               state_q, state_d;
  logic                       ready_q, ready_d;
  logic [ADDR_NB-1:0]         pn_addr_q, pn_addr_d;
  logic [ADDR_NB-1:0]         histo_addr_q, histo_addr_d;
  logic signed [DATA_NB-1:0]  smallest_q, smallest_d;
  logic [ADDR_NB-1:0]         lv_addr_q, lv_addr_d;
  logic [ADDR_NB-1:0]         hv_addr_q, hv_addr_d;
  logic                       lv_set_q, lv_set_d;
  logic                       hv_set_q, hv_set_d;
  logic [CNT_NB-1:0]          cnt_sum_q, cnt_sum_d;
  logic signed [SUM_NB-1:0]   mean_sum_q, mean_sum_d;
  logic                       err_q, err_d;

  // Datapath
  logic signed [ADDR_NB-1:0]  offset_addr;
  logic [ADDR_NB-1:0]         cell_addr;
  logic [DATA_NB-1:0]         dist_mean;
  logic [RANGE_NB-1:0]        dist_range;
  logic                       use_histo_addr;

  assign offset_addr = ADDR_NB'(int_part(bram_dout)) - ADDR_NB'(int_part(smallest_q));
  assign cell_addr   = ADDR_NB'(offset_addr) + HISTO_FIRST;

  // Mean = sum / NUM_PNS with signed division (truncation toward zero),
  // keeping the 4 fraction bits of the data format.
  assign dist_mean  = DATA_NB'(mean_sum_q / $signed(SUM_NB'(2**NUM_NB)));
  assign dist_range = RANGE_NB'(hv_addr_q - lv_addr_q + 1'b1);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state_q      <= ST_IDLE;
      ready_q      <= 1'b1;
      pn_addr_q    <= '0;
      histo_addr_q <= '0;
      smallest_q   <= '0;
      lv_addr_q    <= '0;
      hv_addr_q    <= '0;
      lv_set_q     <= 1'b0;
      hv_set_q     <= 1'b0;
      cnt_sum_q    <= '0;
      mean_sum_q   <= '0;
      err_q        <= 1'b0;
    end else begin
      state_q      <= state_d;
      ready_q      <= ready_d;
      pn_addr_q    <= pn_addr_d;
      histo_addr_q <= histo_addr_d;
      smallest_q   <= smallest_d;
      lv_addr_q    <= lv_addr_d;
      hv_addr_q    <= hv_addr_d;
      lv_set_q     <= lv_set_d;
      hv_set_q     <= hv_set_d;
      cnt_sum_q    <= cnt_sum_d;
      mean_sum_q   <= mean_sum_d;
      err_q        <= err_d;
    end
  end

  always_comb begin
    state_d      = state_q;
    ready_d      = ready_q;
    pn_addr_d    = pn_addr_q;
    histo_addr_d = histo_addr_q;
    smallest_d   = smallest_q;
    lv_addr_d    = lv_addr_q;
    hv_addr_d    = hv_addr_q;
    lv_set_d     = lv_set_q;
    hv_set_d     = hv_set_q;
    cnt_sum_d    = cnt_sum_q;
    mean_sum_d   = mean_sum_q;
    err_d        = err_q;

    bram_din       = '0;
    bram_we        = 1'b0;
    use_histo_addr = 1'b0;

    unique case (state_q)
      ST_IDLE: begin
        ready_d = 1'b1;
        if (start) begin
          ready_d        = 1'b0;
          err_d          = 1'b0;
          mean_sum_d     = '0;
          use_histo_addr = 1'b1;
          bram_we        = 1'b1;             // clear the first bin
          histo_addr_d   = HISTO_FIRST;
          state_d        = ST_CLEAR_MEM;
        end
      end

      ST_CLEAR_MEM: begin
        if (histo_addr_q == HISTO_LAST) begin
          pn_addr_d = PN_FIRST;              // start reading the first value
          state_d   = ST_FIND_SMALLEST;
        end else begin
          use_histo_addr = 1'b1;
          bram_we        = 1'b1;
          histo_addr_d   = histo_addr_q + 1'b1;
        end
      end

      ST_FIND_SMALLEST: begin
        if (pn_addr_q == PN_FIRST || $signed(bram_dout) < smallest_q)
          smallest_d = $signed(bram_dout);
        if (pn_addr_q == PN_LAST) begin
          pn_addr_d = PN_FIRST;
          state_d   = ST_COMPUTE_ADDR;
        end else begin
          pn_addr_d = pn_addr_q + 1'b1;
        end
      end

      ST_COMPUTE_ADDR: begin             // bram_dout holds the value
        use_histo_addr = 1'b1;             // read its bin
        histo_addr_d   = cell_addr;
        if (cell_addr > HISTO_LAST) err_d = 1'b1;
        mean_sum_d = mean_sum_q + SUM_NB'($signed(bram_dout));
        state_d    = ST_INC_CELL;
      end

      ST_INC_CELL: begin                 // bram_dout holds the bin count
        use_histo_addr = 1'b1;
        bram_we        = 1'b1;
        bram_din       = bram_dout + 1'b1;
        state_d        = ST_GET_NEXT_PN;
      end

      ST_GET_NEXT_PN: begin
        if (pn_addr_q == PN_LAST) begin
          state_d = ST_INIT_DIST;
        end else begin
          pn_addr_d = pn_addr_q + 1'b1;
          state_d   = ST_COMPUTE_ADDR;
        end
      end

      ST_INIT_DIST: begin
        use_histo_addr = 1'b1;
        histo_addr_d   = HISTO_FIRST;
        lv_addr_d      = '0;
        hv_addr_d      = '0;
        lv_set_d       = 1'b0;
        hv_set_d       = 1'b0;
        cnt_sum_d      = '0;
        state_d        = ST_SWEEP_BRAM;
      end

      ST_SWEEP_BRAM: begin               // bram_dout holds the count of histo_addr_q
        use_histo_addr = 1'b1;
        cnt_sum_d      = cnt_sum_q + CNT_NB'(bram_dout);
        if (!lv_set_q && cnt_sum_d >= LV_BOUND) begin
          lv_addr_d = histo_addr_q;
          lv_set_d  = 1'b1;
        end
        if (cnt_sum_d <= HV_BOUND) begin
          hv_addr_d = histo_addr_q;
          hv_set_d  = 1'b1;
        end
        if (histo_addr_q == HISTO_LAST)
          state_d = ST_CHECK_HISTO_ERROR;
        else
          histo_addr_d = histo_addr_q + 1'b1;
      end

      ST_CHECK_HISTO_ERROR: begin
        if (!lv_set_q || !hv_set_q) begin
          err_d   = 1'b1;
          state_d = ST_IDLE;
        end else begin
          use_histo_addr = 1'b1;
          histo_addr_d   = MEAN_ADDR;
          bram_we        = 1'b1;
          bram_din       = dist_mean;
          state_d        = ST_WRITE_RANGE;
        end
      end

      ST_WRITE_RANGE: begin
        use_histo_addr = 1'b1;
        histo_addr_d   = HISTO_LAST;
        bram_we        = 1'b1;
        bram_din       = DATA_NB'(dist_range);
        state_d        = ST_IDLE;
      end

      default: state_d = ST_IDLE;
    endcase
  end

  assign bram_addr = use_histo_addr ? histo_addr_d : pn_addr_d;
  assign histo_err = err_q;
  assign ready     = ready_q;

  // The bin address is the value's offset from the smallest value, which is
  // never negative, so no write can fall below the histogram region.
  a_write_above_base: assert property (@(posedge clk) disable iff (rst)
    bram_we |-> bram_addr >= HISTO_FIRST);

endmodule
