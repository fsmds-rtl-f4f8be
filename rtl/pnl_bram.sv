// pnl_bram: single-port block RAM shared by the data loader and the HISTO
// engine (8192 words of 16 bits by default).
//
// One port, one access per clock. The address is sampled on the rising edge;
// a write stores din at that address, and dout shows the word that was at the
// sampled address before the edge (read-first), so read data arrive one cycle
// after the address. This one-cycle read latency is what the HISTO engine's
// schedule is built around: it drives the address of the word it needs in the
// state before the one that uses it.
//
// The memory has no reset: the engine clears the histogram region itself, and
// the data region is filled by the host before a run. The depth and width are
// the original design's; read-first behaviour is this implementation's choice
// (the engine never reads the word it is writing, so either mode works).
module pnl_bram #(
  parameter int unsigned ADDR_NB = histo_pkg::PNL_BRAM_ADDR_SIZE_NB,
  parameter int unsigned DATA_NB = histo_pkg::PNL_BRAM_DBITS_WIDTH_NB
) (
  input  logic               clk,
  input  logic [ADDR_NB-1:0] addr,
  input  logic [DATA_NB-1:0] din,
  input  logic               we,
  output logic [DATA_NB-1:0] dout
);

  logic [DATA_NB-1:0] mem [2**ADDR_NB];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end

endmodule
