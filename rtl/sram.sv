// sram: single-port synchronous SRAM shared by the control engine and the
// NEQ component.
//
// DEPTH x WIDTH words (64k x 32 by default, the size the 16-bit memory
// address register can reach). A write of `wdata` to `addr` happens on a
// clock edge with `we` high; a read with `re` high registers the word at
// `addr` into `rdata` on the same edge. The two users never access it at
// the same time, so one port suffices. Contents are not reset; the memory
// map gives each LP a 32-word partition at {node, LP, 5'b0} in the low
// addresses and one word per ESAM word in the adjacent-data region.
// Size and sharing follow the document; the registered read is this
// design's choice (the original is an asynchronous commercial part).
module sram #(
  parameter int DEPTH = 65536,
  parameter int WIDTH = 32,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
