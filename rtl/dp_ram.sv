// dp_ram: simple dual-port memory, one write port and one read port, one clock.
//
// Holds one colour component of an image (a whole frame or one split block).
// Write: wr_en, wr_addr and wr_data are taken at the rising clock edge.
// Read: rd_data shows the word at the rd_addr of the previous edge (one cycle
// latency, a registered block-RAM read). A read of the address being written in
// the same cycle returns the old word. No reset: contents are undefined until
// written, as in a block RAM. The source paper only names these memories; their
// organisation is this design's choice.
module dp_ram #(
  parameter int unsigned DEPTH  = 16384,
  parameter int unsigned WIDTH  = 8,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
