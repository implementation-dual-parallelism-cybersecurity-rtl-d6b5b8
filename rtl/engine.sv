// engine: one of the two computing engines of the dual-engine image cipher.
//
// An engine encrypts or decrypts one image segment on its own. It holds the
// four parts of the document's engine:
//   pixel_mem    on-chip pixel buffer (64K x 32 bits by default),
//   aes_core     deeply pipelined AES-128 encryption/decryption unit,
//   engine_sync  scheduler that loads the segment, runs it through the
//                cipher in place and streams it out,
//   cycle_timer  two timers: clocks spent in the cipher phase (proc_cycles)
//                and clocks of the whole job from start to done (job_cycles).
// The key is loaded with key_load (one clock) before a job. A job is
// started with a start pulse giving the segment length and the mode; the
// segment is then accepted on the input stream, and after processing the
// result leaves on the output stream, both valid/ready, 32-bit pixels.
// done pulses for one clock when the last result pixel has left.
//
// The document gives the engine's parts and their roles; how they are
// wired (buffer between stream and cipher, in-place write-back) is this
// design's choice. The clock generator the document places in the engine is
// outside this RTL: the engine runs on the single clock clk.
module engine
  import aes_pkg::*;
  import dual_engine_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH_DEF,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LEN_W = AW + 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               key_load,
  input  key_t               key,
  output logic               key_ready,
  input  logic               start,
  input  aes_mode_e          mode,
  input  logic [LEN_W-1:0]   seg_len,
  output logic               busy,
  output logic               done,
  output logic               in_process,
  output logic [TIMER_W-1:0] proc_cycles,
  output logic [TIMER_W-1:0] job_cycles,
  input  logic               in_valid,
  output logic               in_ready,
  input  pixel_t             in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output pixel_t             out_data
);

  logic          mem_wr_en, mem_rd_en;
  logic [AW-1:0] mem_wr_addr, mem_rd_addr;
  pixel_t        mem_wr_data, mem_rd_data;
  logic          aes_in_valid, aes_out_valid;
  aes_mode_e     aes_in_mode, aes_out_mode;
  block_t        aes_in_block, aes_out_block;
  logic          proc_start, proc_stop;

  engine_sync #(.DEPTH(DEPTH)) u_sync (
    .clk, .rst_n, .start, .mode, .seg_len, .busy, .done,
    .proc_start, .proc_stop, .in_process,
    .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data,
    .mem_wr_en, .mem_wr_addr, .mem_wr_data, .mem_rd_en, .mem_rd_addr, .mem_rd_data,
    .aes_in_valid, .aes_in_mode, .aes_in_block, .aes_out_valid, .aes_out_block
  );

  pixel_mem #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_mem (
    .clk, .wr_en(mem_wr_en), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .rd_en(mem_rd_en), .rd_addr(mem_rd_addr), .rd_data(mem_rd_data)
  );

  aes_core u_aes (
    .clk, .rst_n, .key_load, .key, .key_ready,
    .in_valid(aes_in_valid), .in_mode(aes_in_mode), .in_block(aes_in_block),
    .out_valid(aes_out_valid), .out_mode(aes_out_mode), .out_block(aes_out_block)
  );

  cycle_timer #(.W(TIMER_W)) u_proc_timer (
    .clk, .rst_n, .start(proc_start), .stop(proc_stop),
    .running(), .count(proc_cycles)
  );

  cycle_timer #(.W(TIMER_W)) u_job_timer (
    .clk, .rst_n, .start(start && !busy), .stop(done),
    .running(), .count(job_cycles)
  );

  // every result carries the mode of the job that is running
  a_mode: assert property (@(posedge clk) disable iff (!rst_n)
    aes_out_valid |-> (aes_out_mode == aes_in_mode));

endmodule
