// fpu: Frame Processing Unit, the gate between the host CPU and the Message
// Handler (MH).
//
// The host never touches the Message RAM. It gives the FPU a command
// (control_host_in), a buffer index (index_in) and 32-bit payload words
// (data_host_in); the FPU checks the request, forwards a one-cycle command and
// the index to the MH, and moves payload words through the Input Buffer (IB)
// towards the MH or from the Output Buffer (OB) back to the host. It keeps its
// own copy of every buffer's payload length so that it can meter each
// transfer and refuse words beyond the configured length.
//
// States (as in the document's flowcharts):
//   IDLE              outputs at reset values; CONF -> CONF_LENGTH_CHECK,
//                     DEFAULT_CONF -> DEFAULT_CONF. Entering either sends
//                     MH_CONF on control_mh_out for one cycle.
//   CONF_LENGTH_CHECK takes the number of buffers from data_host_in, clamps it
//                     to [CONF_RAM_MIN_LENGTH, CONF_RAM_MAX_LENGTH] and pushes
//                     the clamped count into the IB.
//   CONF_PAYLOAD_DATA one buffer per clock: stores data_host_in as the payload
//                     length (bits) of buffer CURRENT_FRAME_INDEX, pushes it
//                     into the IB and shows the index on index_out; after the
//                     last buffer pulses msg_complete_host_out -> PASSIVE;
//                     if the host still drives a non-zero length then (it
//                     configures more buffers than are active),
//                     error_host_out pulses with it.
//   DEFAULT_CONF      the same sequence with CONF_RAM_DEFAULT_LENGTH buffers of
//                     DEFAULT_PAYLOAD_LENGTH bits each.
//   PASSIVE           control_mh_out = MH_IDLE; a WR or RD command sends MH_WR /
//                     MH_RD and index_out = index_in for one cycle, latches
//                     that buffer's payload length -> ACTIVE_WR / ACTIVE_RD.
//   ACTIVE_WR         each clock with the IB not full and fewer bits sent than
//                     the payload length: takes data_host_in, pushes it into
//                     the IB, adds 32 to the count, write_en_host_out = 1.
//                     IB full: write_en_host_out = 0 (host holds its word).
//                     Length reached: write_en_host_out = 0,
//                     msg_complete_host_out = 1, and error_host_out = 1 if the
//                     host still drives a non-zero word -> PASSIVE.
//   ACTIVE_RD         each clock with the OB not empty and fewer bits read than
//                     the payload length: pops the OB, drives the word on
//                     data_host_out with read_en_host_out = 1. Length reached:
//                     msg_complete_host_out = 1 -> PASSIVE.
//   PAUSE             control_mh_out = MH_PAUSE, leftover OB words are drained;
//                     CONTINUE sends MH_CONTINUE for one cycle -> PASSIVE.
// A RESET command from any state returns to IDLE and pulses reset_mh_out,
// which the system uses to reset the MH and its buffers. PAUSE is accepted in
// PASSIVE, ACTIVE_WR and ACTIVE_RD.
//
// Handshake with the host: all outputs are registered. write_en_host_out high
// after a clock edge means the word on data_host_in at that edge was taken;
// the host then presents the next word. read_en_host_out high after an edge
// means data_host_out holds a new word. msg_complete_host_out and
// error_host_out are one-cycle pulses; PASSIVE clears them.
//
// Document vs. own choices: the state sequence, the encodings, the clamp
// constants (except CONF_RAM_MAX_LENGTH), the 32-bit metering and the
// overflow error follow the document. Own choices: the clamped buffer count
// is limited to the RAM's 64 buffers, the index is 6 bits wide, the IB-full
// pause keeps msg_complete_host_out low (as the text says; one flowchart sets
// it), default configuration also sends the buffer count first, and the
// pop_ob_out and reset_mh_out outputs.
module fpu
  import mh_pkg::*;
#(
  parameter int unsigned NUM_BUFFERS             = mh_pkg::DEF_NUM_BUFFERS,
  parameter int unsigned RAM_BITS                = mh_pkg::DEF_RAM_BITS,
  parameter int unsigned DATA_W                  = mh_pkg::DEF_DATA_W,
  parameter int unsigned CONF_RAM_MIN_LENGTH     = mh_pkg::DEF_CONF_RAM_MIN_LENGTH,
  parameter int unsigned CONF_RAM_MAX_LENGTH     = mh_pkg::DEF_CONF_RAM_MAX_LENGTH,
  parameter int unsigned CONF_RAM_DEFAULT_LENGTH = mh_pkg::DEF_CONF_RAM_DEFAULT_LENGTH,
  parameter int unsigned DEFAULT_PAYLOAD_LENGTH  = mh_pkg::DEF_DEFAULT_PAYLOAD_LENGTH,
  localparam int unsigned IDX_W = $clog2(NUM_BUFFERS),
  localparam int unsigned LEN_W = $clog2(RAM_BITS) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host side
  input  logic [IDX_W-1:0]  index_in,
  input  host_cmd_e         control_host_in,
  input  logic [DATA_W-1:0] data_host_in,
  output logic [DATA_W-1:0] data_host_out,
  output logic              read_en_host_out,
  output logic              write_en_host_out,
  output logic              msg_complete_host_out,
  output logic              error_host_out,
  // Input Buffer
  input  logic              full_ib_in,
  output logic [DATA_W-1:0] data_ib_out,
  output logic              read_en_ib_out,
  // Output Buffer
  input  logic              empty_ob_in,
  input  logic [DATA_W-1:0] data_ob_in,
  output logic              pop_ob_out,
  // Message Handler
  output logic [IDX_W-1:0]  index_out,
  output mh_cmd_e           control_mh_out,
  output logic              reset_mh_out
);

  typedef enum logic [3:0] {
    S_IDLE,
    S_CONF_LENGTH_CHECK,
    S_CONF_PAYLOAD_DATA,
    S_DEFAULT_CONF,
    S_PASSIVE,
    S_ACTIVE_WR,
    S_ACTIVE_RD,
    S_PAUSE
  } fpu_state_e;

  fpu_state_e state;

  // Copy of the configured payload lengths (CONF_RAM in the flowcharts).
  logic [LEN_W-1:0] conf_ram [NUM_BUFFERS];
  logic [IDX_W:0]   conf_ram_length;       // number of configured buffers
  logic [IDX_W:0]   current_frame_index;
  logic             default_count_sent;    // DEFAULT_CONF: buffer count pushed
  logic [LEN_W-1:0] payload_length;        // of the buffer being accessed
  logic [LEN_W:0]   transferred;           // CURRENTLY_WRITTEN / CURRENTLY_READ

  // Buffer count requested by the host, clamped to the allowed range.
  logic [IDX_W:0] clamped_length;
  always_comb begin
    if (data_host_in < DATA_W'(CONF_RAM_MIN_LENGTH))
      clamped_length = (IDX_W+1)'(CONF_RAM_MIN_LENGTH);
    else if (data_host_in > DATA_W'(CONF_RAM_MAX_LENGTH))
      clamped_length = (IDX_W+1)'(CONF_RAM_MAX_LENGTH);
    else
      clamped_length = data_host_in[IDX_W:0];
  end

  logic reset_cmd, pause_cmd;
  assign reset_cmd = (control_host_in == HOST_RESET);
  assign pause_cmd = (control_host_in == HOST_PAUSE);

  // The OB is popped combinationally in the cycle its word is taken.
  always_comb begin
    pop_ob_out = 1'b0;
    if (!reset_cmd) begin
      if (state == S_ACTIVE_RD && !pause_cmd &&
          transferred < (LEN_W+1)'(payload_length) && !empty_ob_in)
        pop_ob_out = 1'b1;
      else if (state == S_PAUSE && !empty_ob_in)
        pop_ob_out = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                 <= S_IDLE;
      conf_ram_length       <= '0;
      current_frame_index   <= '0;
      default_count_sent    <= 1'b0;
      payload_length        <= '0;
      transferred           <= '0;
      index_out             <= '0;
      control_mh_out        <= MH_IDLE;
      reset_mh_out          <= 1'b0;
      read_en_ib_out        <= 1'b0;
      data_ib_out           <= '0;
      data_host_out         <= '0;
      read_en_host_out      <= 1'b0;
      write_en_host_out     <= 1'b0;
      msg_complete_host_out <= 1'b0;
      error_host_out        <= 1'b0;
      for (int i = 0; i < int'(NUM_BUFFERS); i++) conf_ram[i] <= '0;
    end else begin
      // Defaults: one-cycle strobes fall back.
      reset_mh_out   <= 1'b0;
      read_en_ib_out <= 1'b0;

      if (reset_cmd) begin
        // Host stops everything: back to IDLE with reset values, MH reset.
        state                 <= S_IDLE;
        reset_mh_out          <= 1'b1;
        current_frame_index   <= '0;
        default_count_sent    <= 1'b0;
        transferred           <= '0;
        index_out             <= '0;
        control_mh_out        <= MH_IDLE;
        data_ib_out           <= '0;
        data_host_out         <= '0;
        read_en_host_out      <= 1'b0;
        write_en_host_out     <= 1'b0;
        msg_complete_host_out <= 1'b0;
        error_host_out        <= 1'b0;
      end else if (pause_cmd &&
                   (state == S_PASSIVE || state == S_ACTIVE_WR || state == S_ACTIVE_RD)) begin
        state             <= S_PAUSE;
        control_mh_out    <= MH_PAUSE;
        index_out         <= '0;
        data_ib_out       <= '0;
        data_host_out     <= '0;
        read_en_host_out  <= 1'b0;
        write_en_host_out <= 1'b0;
        transferred       <= '0;
      end else begin
        unique case (state)
          S_IDLE: begin
            control_mh_out      <= MH_IDLE;
            current_frame_index <= '0;
            default_count_sent  <= 1'b0;
            if (control_host_in == HOST_CONF) begin
              control_mh_out <= MH_CONF;
              for (int i = 0; i < int'(NUM_BUFFERS); i++) conf_ram[i] <= '0;
              state <= S_CONF_LENGTH_CHECK;
            end else if (control_host_in == HOST_DEFAULT_CONF) begin
              control_mh_out <= MH_CONF;
              for (int i = 0; i < int'(NUM_BUFFERS); i++) conf_ram[i] <= '0;
              state <= S_DEFAULT_CONF;
            end
          end

          S_CONF_LENGTH_CHECK: begin
            control_mh_out  <= MH_IDLE;
            conf_ram_length <= clamped_length;
            data_ib_out     <= DATA_W'(clamped_length);
            read_en_ib_out  <= 1'b1;
            current_frame_index <= '0;
            state           <= S_CONF_PAYLOAD_DATA;
          end

          S_CONF_PAYLOAD_DATA: begin
            if (current_frame_index >= conf_ram_length) begin
              current_frame_index   <= '0;
              msg_complete_host_out <= 1'b1;
              index_out             <= '0;
              data_ib_out           <= '0;
              // A further length word: more buffers than are active.
              if (data_host_in != '0) error_host_out <= 1'b1;
              state                 <= S_PASSIVE;
            end else begin
              conf_ram[current_frame_index[IDX_W-1:0]] <= data_host_in[LEN_W-1:0];
              data_ib_out         <= data_host_in;
              read_en_ib_out      <= 1'b1;
              index_out           <= current_frame_index[IDX_W-1:0];
              current_frame_index <= current_frame_index + 1'b1;
            end
          end

          S_DEFAULT_CONF: begin
            control_mh_out <= MH_IDLE;
            if (!default_count_sent) begin
              conf_ram_length    <= (IDX_W+1)'(CONF_RAM_DEFAULT_LENGTH);
              data_ib_out        <= DATA_W'(CONF_RAM_DEFAULT_LENGTH);
              read_en_ib_out     <= 1'b1;
              default_count_sent <= 1'b1;
            end else if (current_frame_index >= (IDX_W+1)'(CONF_RAM_DEFAULT_LENGTH)) begin
              current_frame_index   <= '0;
              msg_complete_host_out <= 1'b1;
              index_out             <= '0;
              data_ib_out           <= '0;
              state                 <= S_PASSIVE;
            end else begin
              conf_ram[current_frame_index[IDX_W-1:0]] <= LEN_W'(DEFAULT_PAYLOAD_LENGTH);
              data_ib_out         <= DATA_W'(DEFAULT_PAYLOAD_LENGTH);
              read_en_ib_out      <= 1'b1;
              index_out           <= current_frame_index[IDX_W-1:0];
              current_frame_index <= current_frame_index + 1'b1;
            end
          end

          S_PASSIVE: begin
            transferred           <= '0;
            control_mh_out        <= MH_IDLE;
            index_out             <= '0;
            data_ib_out           <= '0;
            data_host_out         <= '0;
            read_en_host_out      <= 1'b0;
            write_en_host_out     <= 1'b0;
            msg_complete_host_out <= 1'b0;
            error_host_out        <= 1'b0;
            if (control_host_in == HOST_WR) begin
              control_mh_out <= MH_WR;
              index_out      <= index_in;
              payload_length <= conf_ram[index_in];
              state          <= S_ACTIVE_WR;
            end else if (control_host_in == HOST_RD) begin
              control_mh_out <= MH_RD;
              index_out      <= index_in;
              payload_length <= conf_ram[index_in];
              state          <= S_ACTIVE_RD;
            end
          end

          S_ACTIVE_WR: begin
            control_mh_out <= MH_IDLE;
            index_out      <= '0;
            if (transferred >= (LEN_W+1)'(payload_length)) begin
              write_en_host_out     <= 1'b0;
              msg_complete_host_out <= 1'b1;
              data_ib_out           <= '0;
              if (data_host_in != '0) error_host_out <= 1'b1;
              state <= S_PASSIVE;
            end else if (full_ib_in) begin
              // IB cannot take a word: host must hold, message not complete.
              write_en_host_out <= 1'b0;
            end else begin
              data_ib_out       <= data_host_in;
              read_en_ib_out    <= 1'b1;
              write_en_host_out <= 1'b1;
              transferred       <= transferred + (LEN_W+1)'(DATA_W);
            end
          end

          S_ACTIVE_RD: begin
            control_mh_out <= MH_IDLE;
            index_out      <= '0;
            if (transferred >= (LEN_W+1)'(payload_length)) begin
              read_en_host_out      <= 1'b0;
              data_host_out         <= '0;
              msg_complete_host_out <= 1'b1;
              state                 <= S_PASSIVE;
            end else if (empty_ob_in) begin
              read_en_host_out <= 1'b0;
            end else begin
              data_host_out    <= data_ob_in;
              read_en_host_out <= 1'b1;
              transferred      <= transferred + (LEN_W+1)'(DATA_W);
            end
          end

          S_PAUSE: begin
            control_mh_out <= MH_PAUSE;
            if (control_host_in == HOST_CONTINUE) begin
              control_mh_out <= MH_CONTINUE;
              state          <= S_PASSIVE;
            end
          end

          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The MH sees a command for exactly one cycle, except PAUSE which is held.
  a_cmd_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    (control_mh_out inside {MH_WR, MH_RD, MH_CONF, MH_CONTINUE}) |=> control_mh_out != $past(control_mh_out))
    else $error("fpu: command held longer than one cycle");
  // The FPU never pushes into a full Input Buffer.
  a_no_ib_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_ACTIVE_WR && full_ib_in) |=> !read_en_ib_out)
    else $error("fpu: push into a full Input Buffer");

endmodule
