// image_merger: joins two processed image halves back into one image.
//
// Input 0 carries the left half and input 1 the right half, each row-major
// (valid/ready). After a start pulse, which samples img_w and img_h, the
// merger outputs, for every row, img_w/2 pixels taken from input 0 and then
// img_w/2 pixels from input 1, giving the whole image row-major on its
// output stream. The input not being read is held off (its ready is low);
// the merger adds no register stage. active is high from start until the
// last pixel has left; done pulses for one clock then.
//
// Merging the two segments before the image is stored follows the
// document; the streaming form is this design's choice. img_w must be even.
module image_merger
  import dual_engine_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DIM_W-1:0] img_w,
  input  logic [DIM_W-1:0] img_h,
  output logic             active,
  output logic             done,
  input  logic [1:0]       in_valid,
  output logic [1:0]       in_ready,
  input  pixel_t           in_data [2],
  output logic             out_valid,
  input  logic             out_ready,
  output pixel_t           out_data
);

  logic [DIM_W-1:0]   half, col;
  logic [2*DIM_W-1:0] left;
  logic               sel;
  logic               fire;

  assign sel       = (col >= half);
  assign out_valid = active && in_valid[sel];
  assign out_data  = in_data[sel];
  assign in_ready  = {active && out_ready && sel, active && out_ready && !sel};
  assign fire      = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      done   <= 1'b0;
      half   <= '0;
      col    <= '0;
      left   <= '0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          half   <= img_w >> 1;
          col    <= '0;
          left   <= img_w * img_h;
          active <= (img_w != '0) && (img_h != '0);
          done   <= (img_w == '0) || (img_h == '0);
        end
      end else if (fire) begin
        col  <= (col == (half << 1) - DIM_W'(1)) ? '0 : col + DIM_W'(1);
        left <= left - 1'b1;
        if (left == (2*DIM_W)'(1)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
