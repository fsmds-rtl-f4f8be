// histo_ref_pkg: reference model of the histogram, mean and range computation,
// written from the algorithm rather than from the RTL, for the testbenches.
//
// compute() takes the 4096 raw 16-bit values (signed, 4 fraction bits) and
// returns what the engine is expected to leave behind: the bin counts, the
// smallest value, the lower and upper bin of the central 87.5 % (as bin
// numbers), the mean in 12.4 fixed point (sum / 4096, truncated toward zero),
// the range HV - LV + 1, and the error flag. Integer parts are taken with
// integer division by 16, which truncates toward zero.
package histo_ref_pkg;

  localparam int NVALS = 4096;
  localparam int NBINS = 2048;

  typedef struct {
    int          counts [NBINS];
    int          smallest;       // raw value
    int          lv_bin;
    int          hv_bin;
    int          mean;           // 12.4 fixed point
    int          range;
    bit          err;
    bit          bound_err;      // a tail bound was never reached
    bit          overflow_err;   // a value fell above the last bin
  } histo_result_t;

  function automatic histo_result_t compute(input logic [15:0] vals [NVALS]);
    histo_result_t r;
    int smallest_int, sum, cum, bin;
    bit lv_set, hv_set;
    int lv_bound, hv_bound;
    lv_bound = NVALS / 16;
    hv_bound = NVALS - lv_bound;
    foreach (r.counts[i]) r.counts[i] = 0;
    r.err = 0; r.bound_err = 0; r.overflow_err = 0;
    r.smallest = $signed(vals[0]);
    for (int i = 1; i < NVALS; i++)
      if ($signed(vals[i]) < r.smallest) r.smallest = $signed(vals[i]);
    smallest_int = r.smallest / 16;
    sum = 0;
    for (int i = 0; i < NVALS; i++) begin
      int v;
      v = $signed(vals[i]);
      sum += v;
      bin = v / 16 - smallest_int;
      if (bin >= NBINS) r.overflow_err = 1;
      else r.counts[bin]++;
    end
    cum = 0; lv_set = 0; hv_set = 0; r.lv_bin = 0; r.hv_bin = 0;
    for (int b = 0; b < NBINS; b++) begin
      cum += r.counts[b];
      if (!lv_set && cum >= lv_bound) begin r.lv_bin = b; lv_set = 1; end
      if (cum <= hv_bound) begin r.hv_bin = b; hv_set = 1; end
    end
    r.bound_err = !(lv_set && hv_set);
    r.err   = r.bound_err || r.overflow_err;
    r.mean  = sum / NVALS;
    r.range = r.hv_bin - r.lv_bin + 1;
    return r;
  endfunction

  // Data set generators. Each returns 4096 raw 16-bit values.
  typedef enum int {
    DS_BELL,       // bell-shaped, integer parts exactly 173..478 (306 bins)
    DS_NEGATIVE,   // bell-shaped around zero, negative and positive values
    DS_WIDE,       // uniform over 2000 integers, near the histogram's width
    DS_CONSTANT,   // one value repeated: the upper tail bound is never met
    DS_OVERFLOW    // spread wider than 2048 integers
  } dataset_t;

  function automatic void make_data(input dataset_t kind, output logic [15:0] vals [NVALS]);
    for (int i = 0; i < NVALS; i++) begin
      int v;
      case (kind)
        DS_BELL:   // first two values pin the extremes at 173.0 and 478.9375
          v = (i == 0) ? 173*16 : (i == 1) ? 478*16 + 15 :
              173*16 + ($urandom_range(1220) + $urandom_range(1220) +
                        $urandom_range(1220) + $urandom_range(1220));
        DS_NEGATIVE:
          v = -60*16 + ($urandom_range(480) + $urandom_range(480) +
                        $urandom_range(480) + $urandom_range(480) + $urandom_range(7));
        DS_WIDE:
          v = -1000*16 + $urandom_range(2000*16 - 1);
        DS_CONSTANT:
          v = 300*16 + 5;
        default: // DS_OVERFLOW
          v = (i == 0) ? -1500*16 : (i == 1) ? 1500*16 : $urandom_range(16000) - 8000;
      endcase
      vals[i] = 16'(v);
    end
  endfunction

endpackage
