// dual_engine_top: dual-engine AES-128 image cipher.
//
// An image is encrypted (or decrypted) by two identical engines at once
// (spatial parallelism), each of which is itself a deep pipeline (temporal
// parallelism). The image enters as a row-major stream of 32-bit pixels;
// image_splitter cuts it vertically into a left and a right half of equal
// size, each engine buffers its half, runs it through its own pipelined
// AES-128 unit and streams it out, and image_merger joins the halves back
// into one row-major image on the output stream.
//
// Operation: load the 128-bit key with key_load (both engines expand it;
// key_ready rises a clock later). Pulse start with img_w, img_h and mode
// (0 = encrypt, 1 = decrypt). If the image fits (img_w even, non-zero size,
// (img_w/2)*img_h a multiple of four and at most MEM_DEPTH) the job runs:
// busy rises, the image is accepted on in_*, the result leaves on out_*,
// and done pulses when its last pixel has left. Otherwise cfg_error pulses
// and nothing starts. Both streams are valid/ready. Each engine reports the
// clocks of its cipher phase and of its whole job.
//
// Timing: the input is accepted at up to one pixel per clock. Each engine's
// cipher phase takes (img_w/2)*img_h + 16 clocks and the two run at the same
// time. The output then leaves at up to one pixel per clock.
//
// The split into two equal vertical halves, the two engines with buffer,
// cipher, scheduler and timer, and the merge follow the document. The image
// source and sink (SD card, Wi-Fi link) and the clock generator are outside
// this RTL: the streams and the clock are ports. Pixel format, stream
// handshake and size checks are this design's choices.
module dual_engine_top
  import aes_pkg::*;
  import dual_engine_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = MEM_DEPTH_DEF,
  localparam int unsigned LEN_W    = $clog2(MEM_DEPTH) + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // key
  input  logic               key_load,
  input  key_t               key,
  output logic               key_ready,
  // job control
  input  logic               start,
  input  aes_mode_e          mode,
  input  logic [DIM_W-1:0]   img_w,
  input  logic [DIM_W-1:0]   img_h,
  output logic               busy,
  output logic               done,
  output logic               cfg_error,
  output logic [1:0]         engine_in_process,
  output logic [TIMER_W-1:0] proc_cycles [2],
  output logic [TIMER_W-1:0] job_cycles [2],
  // image in (from the image source)
  input  logic               in_valid,
  output logic               in_ready,
  input  pixel_t             in_data,
  // image out (to the image sink)
  output logic               out_valid,
  input  logic               out_ready,
  output pixel_t             out_data
);

  logic [2*DIM_W-1:0] seg_len_full;
  logic               size_ok, go;
  logic               split_active, split_done, merge_active;
  logic [1:0]         sp_valid, sp_ready, eg_valid, eg_ready, eg_key_ready;
  logic [1:0]         eg_busy, eg_done;
  pixel_t             sp_data;
  pixel_t             eg_data [2];

  assign seg_len_full = (2*DIM_W)'(img_w >> 1) * (2*DIM_W)'(img_h);
  assign size_ok = !img_w[0] && (seg_len_full != '0) && (seg_len_full[1:0] == 2'b00) &&
                   (seg_len_full <= (2*DIM_W)'(MEM_DEPTH));
  assign go = start && !busy && size_ok;

  assign busy      = split_active || merge_active || (eg_busy != 2'b00);
  assign key_ready = &eg_key_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg_error <= 1'b0;
    else        cfg_error <= start && !busy && !size_ok;
  end

  image_splitter u_split (
    .clk, .rst_n, .start(go), .img_w, .img_h,
    .active(split_active), .done(split_done),
    .in_valid, .in_ready, .in_data,
    .out_valid(sp_valid), .out_ready(sp_ready), .out_data(sp_data)
  );

  for (genvar e = 0; e < 2; e++) begin : g_engine
    engine #(.DEPTH(MEM_DEPTH)) u_engine (
      .clk, .rst_n, .key_load, .key, .key_ready(eg_key_ready[e]),
      .start(go), .mode, .seg_len(LEN_W'(seg_len_full)),
      .busy(eg_busy[e]), .done(eg_done[e]), .in_process(engine_in_process[e]),
      .proc_cycles(proc_cycles[e]), .job_cycles(job_cycles[e]),
      .in_valid(sp_valid[e]), .in_ready(sp_ready[e]), .in_data(sp_data),
      .out_valid(eg_valid[e]), .out_ready(eg_ready[e]), .out_data(eg_data[e])
    );
  end

  image_merger u_merge (
    .clk, .rst_n, .start(go), .img_w, .img_h,
    .active(merge_active), .done,
    .in_valid(eg_valid), .in_ready(eg_ready), .in_data(eg_data),
    .out_valid, .out_ready, .out_data
  );

  // when the whole image has been split, both engines hold their halves
  a_split_done: assert property (@(posedge clk) disable iff (!rst_n)
    split_done |-> (eg_busy == 2'b11));
  // the splitter finishes before either engine can
  a_split_first: assert property (@(posedge clk) disable iff (!rst_n)
    (eg_done != 2'b00) |-> !split_active);
  // nothing is left in the engines once the image is out
  a_engines_idle: assert property (@(posedge clk) disable iff (!rst_n)
    done |-> ##1 (eg_busy == 2'b00));

endmodule
