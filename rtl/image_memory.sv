// image_memory: frame store holding the gray-shade code of every pixel
// (the EPROM / data buffer of the display system).
//
// 2^(RB+CB) words of X bits, addressed by {row, column}. One synchronous
// write port loads the image; one synchronous read port serves the
// controller, with the data valid in the cycle after `re`. No reset: the
// contents are whatever was written.
//
// From the document: an image memory read by the controller's addresses.
// The size follows the controller's limit of 256 rows and 256 columns; the
// write port and the one-cycle read latency are this design's own choices.
module image_memory #(
  parameter int unsigned RB = 8,
  parameter int unsigned CB = 8,
  parameter int unsigned X  = $clog2(am_pkg::G_DEFAULT)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [RB+CB-1:0]   waddr,
  input  logic [X-1:0]       wdata,
  input  logic               re,
  input  logic [RB+CB-1:0]   raddr,
  output logic [X-1:0]       rdata
);

  logic [X-1:0] mem [2**(RB+CB)];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
