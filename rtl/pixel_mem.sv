// pixel_mem: on-chip pixel buffer of one engine.
//
// DEPTH words of WIDTH bits, by default 64K x 32 bits = 256 KB, as the
// document gives for the on-chip memory of the FPGA. It holds the image
// segment while it is encrypted or decrypted. Simple dual port, one clock:
// one write port and one read port that can be used in the same cycle; a
// read returns the word one clock after rd_en (synchronous read, as FPGA
// block RAM does). A read of the address written in the same cycle returns
// the old word. Contents are not reset.
//
// The organisation (64K x 32) follows the document; the port arrangement
// and the read latency are this design's choices.
module pixel_mem #(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
