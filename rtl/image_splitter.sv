// image_splitter: cuts an image vertically into two equal halves.
//
// The image arrives as a row-major pixel stream (valid/ready). After a
// start pulse, which samples the image width img_w and height img_h, each
// pixel whose column is below img_w/2 goes to output 0 (left half), every
// other pixel to output 1 (right half). Each output therefore carries its
// half in row-major order, (img_w/2)*img_h pixels. The input is stalled
// while the output the current pixel belongs to is not ready; the
// splitter adds no register stage (a pixel passes in the clock it is
// accepted). active is high from start until the last pixel has passed;
// done pulses for one clock then.
//
// The vertical split into two equal segments follows the document; img_w
// must be even. The streaming form is this design's choice.
module image_splitter
  import dual_engine_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [DIM_W-1:0] img_w,
  input  logic [DIM_W-1:0] img_h,
  output logic             active,
  output logic             done,
  input  logic             in_valid,
  output logic             in_ready,
  input  pixel_t           in_data,
  output logic [1:0]       out_valid,
  input  logic [1:0]       out_ready,
  output pixel_t           out_data
);

  logic [DIM_W-1:0]   half, col;
  logic [2*DIM_W-1:0] left;      // pixels still to pass
  logic               sel;       // half the current pixel belongs to
  logic               fire;

  assign sel       = (col >= half);
  assign in_ready  = active && out_ready[sel];
  assign out_valid = {active && in_valid && sel, active && in_valid && !sel};
  assign out_data  = in_data;
  assign fire      = in_valid && in_ready;

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

  a_even: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !active) |-> !img_w[0]);

endmodule
