// mh_access_engine: moves one message between a client's buffers and one
// port of the Message RAM, on behalf of the Message Handler. The MH has two of
// them: one for the host side (Input/Output Buffer) and one for the protocol
// side (transient buffers).
//
// A write (start_wr) or read (start_rd) pulse with a buffer index starts it:
//   LOCK  : asks the RAM to lock the buffer and waits while another client
//           holds it (the RAM status flag is '1').
//   WRITE : pops ceil(len/32) words from the source buffer as they arrive and
//           writes them to consecutive RAM words.
//   READ  : reads ceil(len/32) RAM words and pushes each into the sink buffer,
//           at one word per clock while the sink is not full. The RAM read has
//           one cycle of latency; the word stays on the RAM output until it is
//           pushed, and the next read is issued only then or in the same cycle.
// At the end the buffer is unlocked and done pulses for one cycle. A buffer of
// length 0 (a null frame) locks, unlocks and finishes with no data moved.
// cancel (the host's pause, or a new configuration) unlocks the buffer and
// returns to idle at once; the message is then incomplete.
//
// The write data is the source buffer's head word and the sink data is the
// RAM read word, passed on without a register: the buffer on the other side
// stores them.
//
// Timing: with a source that always has a word, a write of n words takes
// 1 (lock) + n + 1 (unlock) clocks; a read with a sink that never fills
// takes 1 + n + 1 clocks, the first word reaching the sink two clocks after
// start. All of this is this design's own construction; the document gives
// only the lock-check-transfer order.
module mh_access_engine
  import mh_pkg::*;
#(
  parameter int unsigned IDX_W  = 6,
  parameter int unsigned LEN_W  = 13,
  parameter int unsigned WORD_W = 8,
  parameter int unsigned DATA_W = mh_pkg::DEF_DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_wr,
  input  logic              start_rd,
  input  logic [IDX_W-1:0]  index_in,
  input  logic              cancel,
  output logic              busy,
  output logic              done,
  // RAM port
  output ram_cmd_e          ram_ctrl,
  output logic [IDX_W-1:0]  ram_index,
  output logic [WORD_W-1:0] ram_word,
  output logic [DATA_W-1:0] ram_wdata,
  input  logic [DATA_W-1:0] ram_rdata,
  input  logic [LEN_W-1:0]  ram_len,
  output logic              lock_req,
  input  logic              lock_gnt,
  output logic              unlock,
  // source buffer (words to write)
  input  logic [DATA_W-1:0] src_data,
  input  logic              src_empty,
  output logic              src_pop,
  // sink buffer (words read)
  output logic [DATA_W-1:0] snk_data,
  output logic              snk_push,
  input  logic              snk_full
);

  typedef enum logic [2:0] {E_IDLE, E_LOCK_WR, E_LOCK_RD, E_WRITE, E_READ} eng_state_e;

  eng_state_e        state;
  logic [IDX_W-1:0]  idx_q;
  logic [WORD_W-1:0] word_q;     // next RAM word to write or to read
  logic              rd_valid;   // ram_rdata holds a word not yet pushed
  logic [WORD_W-1:0] n_words;
  logic              issue, finish;

  assign n_words   = WORD_W'((32'(ram_len) + DATA_W - 1) / DATA_W);
  assign ram_index = idx_q;
  assign ram_word  = word_q;
  assign ram_wdata = src_data;
  assign snk_data  = ram_rdata;
  assign busy      = (state != E_IDLE);

  always_comb begin
    lock_req = 1'b0;
    unlock   = 1'b0;
    ram_ctrl = RAM_NONE;
    src_pop  = 1'b0;
    snk_push = 1'b0;
    issue    = 1'b0;
    finish   = 1'b0;
    if (!cancel) begin
      unique case (state)
        E_LOCK_WR, E_LOCK_RD: lock_req = 1'b1;
        E_WRITE: begin
          if (word_q >= n_words) begin
            finish = 1'b1;
          end else if (!src_empty) begin
            src_pop  = 1'b1;
            ram_ctrl = RAM_WR;
          end
        end
        E_READ: begin
          snk_push = rd_valid && !snk_full;
          issue    = (word_q < n_words) && (!rd_valid || snk_push);
          if (issue) ram_ctrl = RAM_RD;
          finish   = (word_q >= n_words) && (!rd_valid || snk_push);
        end
        default: ;
      endcase
    end
    unlock = finish || (cancel && (state == E_WRITE || state == E_READ));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= E_IDLE;
      idx_q    <= '0;
      word_q   <= '0;
      rd_valid <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= finish;
      if (cancel) begin
        state    <= E_IDLE;
        rd_valid <= 1'b0;
      end else begin
        unique case (state)
          E_IDLE: begin
            word_q   <= '0;
            rd_valid <= 1'b0;
            if (start_wr) begin
              idx_q <= index_in;
              state <= E_LOCK_WR;
            end else if (start_rd) begin
              idx_q <= index_in;
              state <= E_LOCK_RD;
            end
          end
          E_LOCK_WR: if (lock_gnt) state <= E_WRITE;
          E_LOCK_RD: if (lock_gnt) state <= E_READ;
          E_WRITE: begin
            if (finish) state <= E_IDLE;
            else if (src_pop) word_q <= word_q + 1'b1;
          end
          E_READ: begin
            if (issue) word_q <= word_q + 1'b1;
            rd_valid <= issue || (rd_valid && !snk_push);
            if (finish) state <= E_IDLE;
          end
          default: state <= E_IDLE;
        endcase
      end
    end
  end

endmodule
