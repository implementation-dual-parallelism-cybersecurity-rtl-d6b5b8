// dual_engine_pkg: sizes and types shared by the blocks of the dual-engine
// image cipher (pixel buffer, engine scheduler, splitter, merger, top).
//
// A pixel is one 32-bit word of the on-chip pixel buffer (for a colour
// image: 8 bits each of R, G, B and one spare byte; the cipher treats it as
// opaque data). Four consecutive pixels of a segment form one 128-bit AES
// block, the first pixel in the most significant word.
package dual_engine_pkg;

  localparam int unsigned PIX_W          = 32;     // bits per buffer word / pixel
  localparam int unsigned MEM_DEPTH_DEF  = 65536;  // 64K x 32 = 256 KB per engine
  localparam int unsigned DIM_W          = 16;     // width of the image size inputs
  localparam int unsigned TIMER_W        = 32;     // width of the cycle timers

  typedef logic [PIX_W-1:0] pixel_t;

endpackage
