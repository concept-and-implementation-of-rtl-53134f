// message_handler: the FlexRay Message Handler (MH). It is the only block
// that reaches the Message RAM, which it contains, and it serves two clients:
// the host, through the FPU and the Input/Output Buffers (IB/OB), and the
// FlexRay protocol controller (PRT), through the input/output transient
// buffers (TBF IN/OUT).
//
// Host side (commands from the FPU on control_fpu_in, index on index_fpu_in,
// both valid for one cycle):
//   MH_CONF     (any state) aborts any access and starts configuration. The
//               first word from the IB is the number of active buffers; the
//               next words are the payload lengths, in bits, of buffers 0,
//               1, 2, ... One IB word is consumed per clock, so the IB never
//               fills while the FPU configures at one word per clock.
//   MH_WR/MH_RD (when configured) lock buffer index_fpu_in and move its
//               payload from the IB into the RAM or from the RAM into the OB.
//   MH_PAUSE    aborts the access in progress (the buffer is unlocked and its
//               contents count as incomplete), drains words left in the IB
//               and blocks new protocol-side requests until MH_CONTINUE.
// Protocol side (control_prt_in held by the PRT until prt_busy_out rises or
// null_frame_prt_out pulses):
//   PRT_WR/PRT_RD with header_prt_in: the buffer index is derived from the
//               header as frame_id - 1 (static segment: one buffer per slot).
//               A frame ID of 0, or one past the configured buffers, or any
//               request before configuration, is answered with a one-cycle
//               null_frame_prt_out and nothing is transferred. Otherwise the
//               buffer is locked and words move between TBF IN / TBF OUT and
//               the RAM; prt_done_out pulses at the end.
// Both clients run at the same time on different RAM ports. A client that
// asks for a buffer the other one holds waits until it is released; on a tie
// the protocol side wins. Stopping the MH is done with its reset input.
//
// Document vs. own choices: the two clients, the commands, the 17-bit header
// (11-bit frame ID + 6-bit cycle count), waiting on a busy buffer, payload
// counting by the MH for the PRT side and the configuration order follow the
// document. Own choices: the 3-bit FPU command code is taken as is (the MH
// table lists a 2-bit code without CONF); the buffer index comes from the MH's
// own configuration counter and from frame_id - 1; the pop outputs towards
// the IB and TBF IN, and the prt_busy_out, prt_done_out and null_frame_prt_out
// outputs are additions. The cycle count is carried but not used.
module message_handler
  import mh_pkg::*;
#(
  parameter int unsigned NUM_BUFFERS = mh_pkg::DEF_NUM_BUFFERS,
  parameter int unsigned RAM_BITS    = mh_pkg::DEF_RAM_BITS,
  parameter int unsigned DATA_W      = mh_pkg::DEF_DATA_W,
  localparam int unsigned IDX_W  = $clog2(NUM_BUFFERS),
  localparam int unsigned LEN_W  = $clog2(RAM_BITS) + 1,
  localparam int unsigned WORD_W = $clog2(RAM_BITS / DATA_W) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // FPU and host-side buffers
  input  mh_cmd_e                control_fpu_in,
  input  logic [IDX_W-1:0]       index_fpu_in,
  input  logic [DATA_W-1:0]      data_ib_in,
  input  logic                   empty_ib_in,
  output logic                   pop_ib_out,
  output logic [DATA_W-1:0]      data_ob_out,
  output logic                   enable_read_ob_out,
  input  logic                   full_ob_in,
  // protocol controller and transient buffers
  input  prt_cmd_e               control_prt_in,
  input  header_t                header_prt_in,
  input  logic [DATA_W-1:0]      data_tbf_in,
  input  logic                   empty_tbf_in,
  output logic                   pop_tbf_out,
  output logic [DATA_W-1:0]      data_tbf_out,
  output logic                   enable_read_tbf_out,
  input  logic                   full_tbf_in,
  output logic                   prt_busy_out,
  output logic                   prt_done_out,
  output logic                   null_frame_prt_out,
  // status
  output logic                   configured_out,
  output logic [NUM_BUFFERS-1:0] message_status_out
);

  typedef enum logic [2:0] {
    H_UNCONFIGURED,
    H_CONF_AMOUNT,
    H_CONF_LENGTH,
    H_READY,
    H_BUSY,
    H_PAUSED
  } host_state_e;

  host_state_e    hstate;
  logic [IDX_W:0] conf_amount;
  logic [IDX_W:0] conf_index;
  logic           configured;

  // RAM connections
  ram_cmd_e          ram_ctrl     [2];
  logic [IDX_W-1:0]  ram_index    [2];
  logic [WORD_W-1:0] ram_word     [2];
  logic [DATA_W-1:0] ram_wdata    [2];
  logic [DATA_W-1:0] ram_rdata    [2];
  logic              ram_lock_req [2];
  logic              ram_unlock   [2];
  logic              ram_lock_gnt [2];
  logic [LEN_W-1:0]  ram_len      [2];
  ram_conf_t         ram_conf;
  logic [IDX_W:0]    ram_amount;

  // Host engine
  ram_cmd_e          h_ctrl;
  logic [IDX_W-1:0]  h_index;
  logic [WORD_W-1:0] h_word;
  logic [DATA_W-1:0] h_wdata;
  logic              h_lock_req, h_unlock, h_busy, h_done, h_pop;
  logic              h_start_wr, h_start_rd, h_abort;

  // Protocol engine
  logic              p_start_wr, p_start_rd, p_busy, p_done;
  logic [IDX_W-1:0]  p_index;
  logic              p_valid;

  logic conf_cmd, conf_pop;
  assign conf_cmd = (control_fpu_in == MH_CONF);

  // ---------------------------------------------------------------- host FSM
  // The FPU shows MH_WR/MH_RD for one cycle only and may send the next one
  // while the previous access is still finishing here, so the request is
  // kept in a one-entry register until the host engine is free.
  logic             pend_valid, pend_rd;
  logic [IDX_W-1:0] pend_idx;
  logic             new_cmd, h_start;
  assign new_cmd    = configured && (hstate == H_READY || hstate == H_BUSY) &&
                      (control_fpu_in == MH_WR || control_fpu_in == MH_RD);
  assign h_start    = (hstate == H_READY) && pend_valid && control_fpu_in != MH_PAUSE;
  assign h_start_wr = h_start && !pend_rd;
  assign h_start_rd = h_start && pend_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_valid <= 1'b0;
      pend_rd    <= 1'b0;
      pend_idx   <= '0;
    end else if (conf_cmd || control_fpu_in == MH_PAUSE) begin
      pend_valid <= 1'b0;
    end else begin
      if (h_start) pend_valid <= 1'b0;
      if (new_cmd) begin
        pend_valid <= 1'b1;
        pend_rd    <= (control_fpu_in == MH_RD);
        pend_idx   <= index_fpu_in;
      end
    end
  end
  assign h_abort    = conf_cmd || ((hstate == H_BUSY) && control_fpu_in == MH_PAUSE);
  assign conf_pop   = !conf_cmd && !empty_ib_in &&
                      (hstate == H_CONF_AMOUNT || hstate == H_CONF_LENGTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hstate      <= H_UNCONFIGURED;
      conf_amount <= '0;
      conf_index  <= '0;
      configured  <= 1'b0;
    end else if (conf_cmd) begin
      hstate     <= H_CONF_AMOUNT;
      configured <= 1'b0;
      conf_index <= '0;
    end else begin
      unique case (hstate)
        H_UNCONFIGURED: ;
        H_CONF_AMOUNT: if (conf_pop) begin
          conf_amount <= (data_ib_in > DATA_W'(NUM_BUFFERS))
                         ? (IDX_W+1)'(NUM_BUFFERS) : data_ib_in[IDX_W:0];
          conf_index  <= '0;
          if (data_ib_in == '0) begin
            hstate     <= H_READY;
            configured <= 1'b1;
          end else begin
            hstate <= H_CONF_LENGTH;
          end
        end
        H_CONF_LENGTH: if (conf_pop) begin
          conf_index <= conf_index + 1'b1;
          if (conf_index + 1'b1 >= conf_amount) begin
            hstate     <= H_READY;
            configured <= 1'b1;
          end
        end
        H_READY: begin
          if (control_fpu_in == MH_PAUSE) hstate <= H_PAUSED;
          else if (h_start) hstate <= H_BUSY;
        end
        H_BUSY: begin
          if (control_fpu_in == MH_PAUSE) hstate <= H_PAUSED;
          else if (h_done) hstate <= H_READY;
        end
        H_PAUSED: if (control_fpu_in == MH_CONTINUE) hstate <= H_READY;
        default: hstate <= H_UNCONFIGURED;
      endcase
    end
  end

  mh_access_engine #(
    .IDX_W(IDX_W), .LEN_W(LEN_W), .WORD_W(WORD_W), .DATA_W(DATA_W)
  ) u_host_engine (
    .clk, .rst_n,
    .start_wr  (h_start_wr),
    .start_rd  (h_start_rd),
    .index_in  (pend_idx),
    .cancel    (h_abort),
    .busy      (h_busy),
    .done      (h_done),
    .ram_ctrl  (h_ctrl),
    .ram_index (h_index),
    .ram_word  (h_word),
    .ram_wdata (h_wdata),
    .ram_rdata (ram_rdata[0]),
    .ram_len   (ram_len[0]),
    .lock_req  (h_lock_req),
    .lock_gnt  (ram_lock_gnt[0]),
    .unlock    (h_unlock),
    .src_data  (data_ib_in),
    .src_empty (empty_ib_in),
    .src_pop   (h_pop),
    .snk_data  (data_ob_out),
    .snk_push  (enable_read_ob_out),
    .snk_full  (full_ob_in)
  );

  // RAM port 0: configuration while configuring, host engine otherwise.
  always_comb begin
    ram_ctrl[0]     = h_ctrl;
    ram_index[0]    = h_index;
    ram_word[0]     = h_word;
    ram_wdata[0]    = h_wdata;
    ram_lock_req[0] = h_lock_req;
    ram_unlock[0]   = h_unlock;
    ram_conf        = '{set_amount: 1'b0, value: data_ib_in[30:0]};
    if (conf_pop) begin
      ram_ctrl[0]  = RAM_CONF;
      ram_index[0] = conf_index[IDX_W-1:0];
      ram_conf.set_amount = (hstate == H_CONF_AMOUNT);
    end
  end

  assign pop_ib_out = conf_pop || h_pop || ((hstate == H_PAUSED) && !empty_ib_in);

  // ------------------------------------------------------------ protocol side
  // Static segment: frame ID n is kept in buffer n-1.
  assign p_index = IDX_W'(header_prt_in.frame_id - 1'b1);
  assign p_valid = configured && (header_prt_in.frame_id != '0) &&
                   (header_prt_in.frame_id <= FRAME_ID_W'(ram_amount));

  logic p_request;
  assign p_request  = !p_busy && (hstate != H_PAUSED) && (control_fpu_in != MH_PAUSE) &&
                      (control_prt_in != PRT_IDLE);
  assign p_start_wr = p_request && p_valid && (control_prt_in == PRT_WR);
  assign p_start_rd = p_request && p_valid && (control_prt_in == PRT_RD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) null_frame_prt_out <= 1'b0;
    else        null_frame_prt_out <= p_request && !p_valid && !null_frame_prt_out;
  end

  mh_access_engine #(
    .IDX_W(IDX_W), .LEN_W(LEN_W), .WORD_W(WORD_W), .DATA_W(DATA_W)
  ) u_prt_engine (
    .clk, .rst_n,
    .start_wr  (p_start_wr),
    .start_rd  (p_start_rd),
    .index_in  (p_index),
    .cancel    (conf_cmd),
    .busy      (p_busy),
    .done      (p_done),
    .ram_ctrl  (ram_ctrl[1]),
    .ram_index (ram_index[1]),
    .ram_word  (ram_word[1]),
    .ram_wdata (ram_wdata[1]),
    .ram_rdata (ram_rdata[1]),
    .ram_len   (ram_len[1]),
    .lock_req  (ram_lock_req[1]),
    .lock_gnt  (ram_lock_gnt[1]),
    .unlock    (ram_unlock[1]),
    .src_data  (data_tbf_in),
    .src_empty (empty_tbf_in),
    .src_pop   (pop_tbf_out),
    .snk_data  (data_tbf_out),
    .snk_push  (enable_read_tbf_out),
    .snk_full  (full_tbf_in)
  );

  assign prt_busy_out   = p_busy;
  assign prt_done_out   = p_done;
  assign configured_out = configured;

  // ---------------------------------------------------------------- the RAM
  message_ram #(
    .NUM_BUFFERS(NUM_BUFFERS), .RAM_BITS(RAM_BITS), .DATA_W(DATA_W)
  ) u_message_ram (
    .clk, .rst_n,
    .control_mh_in      (ram_ctrl),
    .index_mh_in        (ram_index),
    .word_mh_in         (ram_word),
    .message_buffer_in  (ram_wdata),
    .message_buffer_out (ram_rdata),
    .conf_bits_mh_in    (ram_conf),
    .lock_req           (ram_lock_req),
    .unlock             (ram_unlock),
    .lock_gnt           (ram_lock_gnt),
    .payload_len_out    (ram_len),
    .message_status_out (message_status_out),
    .num_buffers_out    (ram_amount)
  );

  // The host engine only starts when the FPU asks for it, and never during
  // configuration.
  a_no_start_unconfigured: assert property (@(posedge clk) disable iff (!rst_n)
    h_start |-> configured)
    else $error("message_handler: host access before configuration");
  // A new host request never overwrites one still waiting.
  a_no_lost_request: assert property (@(posedge clk) disable iff (!rst_n)
    new_cmd |-> (!pend_valid || h_start))
    else $error("message_handler: host request lost");
  a_ready_engine_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (hstate == H_READY && !$past(h_done)) |-> !h_busy)
    else $error("message_handler: host engine busy while ready");

endmodule
