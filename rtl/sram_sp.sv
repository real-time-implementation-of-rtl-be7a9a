// sram_sp: single-port synchronous SRAM.
//
// Stands for the external SRAMs that hold the pacing table, the schedule
// pointers table and the schedule list of the i-out-of-m controller. One
// access per clock: with we high, wdata is stored at addr; otherwise addr is
// read and the word appears on rdata in the next cycle and stays there until
// the next read. A write does not change rdata. The contents are not reset;
// the owner of the memory clears it after reset.
//
// The document says only that these tables live in SRAMs that must be
// cleared at start-up; the single port, the one-cycle read latency and the
// held read data are this design's choices. It also serves the measurement
// unit's translation and measurement tables.
module sram_sp #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

endmodule
