// histo_top: the HISTO histogram/mean/range engine together with the block
// RAM it works in, and a host port through which the data set is loaded and
// the results are read back.
//
// The host port stands where the processor's memory access controller
// connects in the original system: the processor writes the 4096 values into
// the upper half of the RAM (addresses 4096..8191), pulses start, waits for
// ready, and then reads the histogram (2048..4093), the mean (4094, signed
// 12.4 fixed point) and the range (4095, integer bins). histo_err reports a
// data set whose integer values span more bins than the histogram has, or
// whose tails could not be placed.
//
// The RAM has a single port. It belongs to the host while the engine is idle
// and to the engine from the cycle start is raised until ready returns; host
// accesses in that window are ignored (writes are dropped, host_dout shows
// whatever the engine reads). host_dout is the RAM output, one cycle after
// the address. The engine, the RAM and the memory map follow the original
// design; this sharing scheme is this implementation's own, since the loader
// is not part of this design.
module histo_top
  import histo_pkg::*;
(
  input  logic                               clk,
  input  logic                               rst,        // asynchronous, active high
  input  logic                               start,
  output logic                               ready,
  output logic                               histo_err,
  input  logic [PNL_BRAM_ADDR_SIZE_NB-1:0]   host_addr,
  input  logic [PNL_BRAM_DBITS_WIDTH_NB-1:0] host_din,
  input  logic                               host_we,
  output logic [PNL_BRAM_DBITS_WIDTH_NB-1:0] host_dout
);

  logic [PNL_BRAM_ADDR_SIZE_NB-1:0]   histo_addr, ram_addr;
  logic [PNL_BRAM_DBITS_WIDTH_NB-1:0] histo_din,  ram_din, ram_dout;
  logic                               histo_we,   ram_we;
  logic                               engine_owns;

  histo u_histo (
    .clk       (clk),
    .rst       (rst),
    .start     (start),
    .ready     (ready),
    .histo_err (histo_err),
    .bram_addr (histo_addr),
    .bram_din  (histo_din),
    .bram_dout (ram_dout),
    .bram_we   (histo_we)
  );

  assign engine_owns = start || !ready;

  always_comb begin
    if (engine_owns) begin
      ram_addr = histo_addr;
      ram_din  = histo_din;
      ram_we   = histo_we;
    end else begin
      ram_addr = host_addr;
      ram_din  = host_din;
      ram_we   = host_we;
    end
  end

  pnl_bram u_bram (
    .clk  (clk),
    .addr (ram_addr),
    .din  (ram_din),
    .we   (ram_we),
    .dout (ram_dout)
  );

  assign host_dout = ram_dout;

endmodule
