// engine_sync: scheduler ("sync" unit) of one engine.
//
// It runs one job on an image segment in three phases and sequences the
// pixel buffer, the AES unit and the timers:
//   LOAD    accepts seg_len pixels on the input stream and writes them to
//           buffer addresses 0 .. seg_len-1;
//   PROCESS reads the buffer one word per clock, packs every four words into
//           a 128-bit block (first word in the high bits), sends the block to
//           the AES unit with the job's mode, and writes each result block
//           back in place, one word per clock, as it leaves the pipeline;
//   UNLOAD  reads the buffer again and sends the seg_len processed pixels on
//           the output stream.
// A job starts with a start pulse in IDLE (seg_len and mode are sampled
// then) and ends with a one-clock done pulse. proc_start and proc_stop mark
// the first and the clock after the last PROCESS clock for the timer.
//
// Timing: PROCESS reads four words per block, so the AES unit gets a block
// every fourth clock and a result never arrives before the previous one is
// written back; PROCESS lasts seg_len + AES_LATENCY + 5 = seg_len + 16
// clocks (proc_start to proc_stop). LOAD and
// UNLOAD move one word per clock when the streams allow. Streams are
// valid/ready: a word moves on a clock where both are high.
//
// The document names this unit as the scheduler of the engine's tasks and
// gives no insides; the three phases, the in-place write-back and the
// stream handshake are this design's choices. seg_len must be a non-zero
// multiple of four no larger than DEPTH (asserted); ECB use of the cipher
// on four-pixel blocks is likewise this design's reading.
module engine_sync
  import aes_pkg::*;
  import dual_engine_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH_DEF,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LEN_W = AW + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // job control
  input  logic             start,
  input  aes_mode_e        mode,
  input  logic [LEN_W-1:0] seg_len,
  output logic             busy,
  output logic             done,
  output logic             proc_start,
  output logic             proc_stop,
  output logic             in_process,
  // segment input stream
  input  logic             in_valid,
  output logic             in_ready,
  input  pixel_t           in_data,
  // processed segment output stream
  output logic             out_valid,
  input  logic             out_ready,
  output pixel_t           out_data,
  // pixel buffer
  output logic             mem_wr_en,
  output logic [AW-1:0]    mem_wr_addr,
  output pixel_t           mem_wr_data,
  output logic             mem_rd_en,
  output logic [AW-1:0]    mem_rd_addr,
  input  pixel_t           mem_rd_data,
  // AES unit
  output logic             aes_in_valid,
  output aes_mode_e        aes_in_mode,
  output block_t           aes_in_block,
  input  logic             aes_out_valid,
  input  block_t           aes_out_block
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_PROC, S_UNLOAD} state_e;

  state_e           state;
  aes_mode_e        job_mode;
  logic [LEN_W-1:0] len;
  logic [LEN_W-1:0] wr_cnt;     // words written (LOAD and PROCESS)
  logic [LEN_W-1:0] rd_cnt;     // reads issued (PROCESS and UNLOAD)
  logic [LEN_W-1:0] out_cnt;    // words sent (UNLOAD)
  logic             rd_v;       // mem_rd_data holds a word read last clock
  logic [1:0]       gat_cnt;    // words gathered into the current block
  logic [95:0]      gat;        // first three words of the current block
  logic [95:0]      ser;        // words of a result block still to write
  logic [1:0]       ser_cnt;    // how many of them
  pixel_t           fifo [2];   // UNLOAD output buffer
  logic [1:0]       fifo_cnt;

  logic load_fire, pop, ser_wr, proc_last, issue_ul;

  assign busy       = (state != S_IDLE);
  assign in_process = (state == S_PROC);
  assign in_ready   = (state == S_LOAD);
  assign load_fire  = in_valid && in_ready;

  assign out_valid  = (fifo_cnt != 2'd0);
  assign out_data   = fifo[0];
  assign pop        = out_valid && out_ready;

  // write port: loaded pixels, or result words coming back from AES
  assign ser_wr = (state == S_PROC) && (aes_out_valid || ser_cnt != 2'd0);
  always_comb begin
    mem_wr_en   = load_fire || ser_wr;
    mem_wr_addr = wr_cnt[AW-1:0];
    if (state == S_PROC) mem_wr_data = aes_out_valid ? aes_out_block[127:96] : ser[95:64];
    else                 mem_wr_data = in_data;
  end
  assign proc_last = ser_wr && (wr_cnt == len - LEN_W'(1));

  // read port: PROCESS reads at full rate, UNLOAD only with room downstream
  assign issue_ul = (state == S_UNLOAD) && (rd_cnt != len) &&
                    (32'(fifo_cnt) + 32'(rd_v) - 32'(pop) <= 32'd1);
  assign mem_rd_en   = ((state == S_PROC) && (rd_cnt != len)) || issue_ul;
  assign mem_rd_addr = rd_cnt[AW-1:0];

  assign proc_start  = (state == S_LOAD) && load_fire && (wr_cnt == len - LEN_W'(1));
  assign proc_stop   = proc_last;
  assign aes_in_mode = job_mode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      job_mode     <= AES_ENCRYPT;
      len          <= '0;
      wr_cnt       <= '0;
      rd_cnt       <= '0;
      out_cnt      <= '0;
      rd_v         <= 1'b0;
      gat_cnt      <= '0;
      gat          <= '0;
      ser          <= '0;
      ser_cnt      <= '0;
      fifo         <= '{default: '0};
      fifo_cnt     <= '0;
      aes_in_valid <= 1'b0;
      aes_in_block <= '0;
      done         <= 1'b0;
    end else begin
      done         <= 1'b0;
      aes_in_valid <= 1'b0;
      rd_v         <= mem_rd_en;

      unique case (state)
        S_IDLE: if (start) begin
          job_mode <= mode;
          len      <= seg_len;
          wr_cnt   <= '0;
          rd_cnt   <= '0;
          out_cnt  <= '0;
          gat_cnt  <= '0;
          ser_cnt  <= '0;
          if (seg_len == '0) done <= 1'b1;
          else               state <= S_LOAD;
        end

        S_LOAD: if (load_fire) begin
          if (wr_cnt == len - LEN_W'(1)) begin
            wr_cnt <= '0;
            state  <= S_PROC;
          end else begin
            wr_cnt <= wr_cnt + LEN_W'(1);
          end
        end

        S_PROC: begin
          if (mem_rd_en) rd_cnt <= rd_cnt + LEN_W'(1);
          // gather four words into a block
          if (rd_v) begin
            gat_cnt <= gat_cnt + 2'd1;
            if (gat_cnt == 2'd3) begin
              aes_in_valid <= 1'b1;
              aes_in_block <= {gat, mem_rd_data};
            end else begin
              gat <= {gat[63:0], mem_rd_data};
            end
          end
          // write results back in place
          if (aes_out_valid) begin
            ser     <= aes_out_block[95:0];
            ser_cnt <= 2'd3;
          end else if (ser_cnt != 2'd0) begin
            ser     <= {ser[63:0], 32'h0};
            ser_cnt <= ser_cnt - 2'd1;
          end
          if (ser_wr) wr_cnt <= wr_cnt + LEN_W'(1);
          if (proc_last) begin
            rd_cnt <= '0;
            state  <= S_UNLOAD;
          end
        end

        S_UNLOAD: begin
          if (issue_ul) rd_cnt <= rd_cnt + LEN_W'(1);
          if (pop) begin
            out_cnt <= out_cnt + LEN_W'(1);
            if (out_cnt == len - LEN_W'(1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end
        end

        default: state <= S_IDLE;
      endcase

      // UNLOAD output buffer: push the word read last clock, pop on handshake
      if (state == S_UNLOAD) begin
        unique case ({rd_v, pop})
          2'b10: begin
            fifo[fifo_cnt[0]] <= mem_rd_data;
            fifo_cnt <= fifo_cnt + 2'd1;
          end
          2'b01: begin
            fifo[0]  <= fifo[1];
            fifo_cnt <= fifo_cnt - 2'd1;
          end
          2'b11: begin
            if (fifo_cnt == 2'd1) fifo[0] <= mem_rd_data;
            else begin
              fifo[0] <= fifo[1];
              fifo[1] <= mem_rd_data;
            end
          end
          default: ;
        endcase
      end
    end
  end

  // a result block must not arrive while the previous one is being written
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    aes_out_valid |-> (ser_cnt == 2'd0));
  // segment length rules
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    (start && state == S_IDLE) |-> (seg_len[1:0] == 2'b00 && seg_len <= LEN_W'(DEPTH)));
  // the output buffer never overflows
  a_fifo: assert property (@(posedge clk) disable iff (!rst_n) fifo_cnt <= 2'd2);

endmodule
