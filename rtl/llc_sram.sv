// llc_sram: single-port synchronous memory of the LLC arrays.
//
// One instance holds the tag/state array (one row per set, all ways side by
// side, so that a lookup reads every way at once) and one the data array (one
// row per 64-byte block). A read presents the row on rdata one clock after
// en with we low; a write stores wdata at the clock edge. The array has no
// reset: the cache controller clears the tag array by sweeping it after
// reset. The memory is written as an array so that a synthesis flow maps it
// to SRAM macros; the arrays' sizes follow the described 8 MB, 16-way cache,
// the one-cycle read timing is this design's choice.
module llc_sram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 512,
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
