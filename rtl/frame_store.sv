// frame_store: serial-to-memory conversion of one colour component and its
// frame memory (one per component: Y, Cb and Cr each get their own).
//
// A raster pixel stream is written into a W x H memory at address y*W + x, so
// the memory holds the component as an image matrix that the splitter can
// address freely. Capture starts on a pixel with in_sof while capture_en is
// high, writes W*H consecutive valid pixels and then pulses frame_done for one
// clock. Frames that start while capture_en is low are ignored. An in_sof seen
// during a capture restarts it at address 0 (or aborts it if capture_en is low).
//
// Read port: rd_addr in, rd_data one clock later (see dp_ram).
// The source paper stores each converted component in a separate memory after a serial
// conversion block; the capture handshake is this design's choice.
module frame_store
  import split_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned WIDTH  = PIX_W,
  parameter int unsigned ADDR_W = $clog2(W * H)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              capture_en,
  input  logic              in_valid,
  input  logic              in_sof,
  input  logic [WIDTH-1:0]  in_data,
  output logic              capturing,
  output logic              frame_done,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  localparam int unsigned LAST = W * H - 1;

  logic [ADDR_W-1:0] wr_addr_q, wr_addr;
  logic              wr_en;

  always_comb begin
    wr_en   = 1'b0;
    wr_addr = wr_addr_q;
    if (in_valid && in_sof) begin
      wr_en   = capture_en;
      wr_addr = '0;
    end else if (in_valid && capturing) begin
      wr_en = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      capturing  <= 1'b0;
      frame_done <= 1'b0;
      wr_addr_q  <= '0;
    end else begin
      frame_done <= 1'b0;
      if (in_valid && in_sof && !capture_en) begin
        capturing <= 1'b0;
      end else if (wr_en) begin
        if (wr_addr == ADDR_W'(LAST)) begin
          capturing  <= 1'b0;
          frame_done <= 1'b1;
          wr_addr_q  <= '0;
        end else begin
          capturing  <= 1'b1;
          wr_addr_q  <= wr_addr + 1'b1;
        end
      end
    end
  end

  dp_ram #(.DEPTH(W * H), .WIDTH(WIDTH), .ADDR_W(ADDR_W)) u_mem (
    .clk    (clk),
    .wr_en  (wr_en),
    .wr_addr(wr_addr),
    .wr_data(in_data),
    .rd_addr(rd_addr),
    .rd_data(rd_data)
  );

endmodule
