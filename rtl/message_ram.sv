// message_ram: the Message RAM of the FlexRay Message Handler.
//
// It holds up to NUM_BUFFERS message buffers whose payloads share RAM_BITS bits
// of storage, one configuration entry (payload length in bits) per buffer, and
// one busy flag per buffer. Only the Message Handler (MH) accesses it.
//
// Configuration (port 0, control = RAM_CONF, word on conf_bits_mh_in):
//   set_amount = 1 : value is the number of active buffers; all lengths are
//                    cleared and allocation restarts at bit 0.
//   set_amount = 0 : value is the payload length of buffer index_mh_in[0].
//                    Buffers are packed back to back in the order they are
//                    configured: the buffer starts where the previous one
//                    ended, so 56 buffers of 72 bits use 4032 of 4096 bits.
//                    Bits of a buffer that lie beyond RAM_BITS are not stored
//                    and read as zero.
//
// Access (two ports: 0 for the host side, 1 for the protocol side, so both
// clients can use different buffers at the same time):
//   lock_req/index  -> lock_gnt (combinational) when the buffer is not busy; the
//                      busy flag is set at the next edge. When both ports ask
//                      for the same free buffer in one cycle, port 1 wins
//                      (the FlexRay schedule cannot wait).
//   unlock/index    -> clears the busy flag at the next edge.
//   RAM_WR          -> writes message_buffer_in to 32-bit word word_mh_in of
//                      the buffer; only the bits inside the payload length are
//                      changed (the last word of a 72-bit buffer holds 8 bits).
//   RAM_RD          -> message_buffer_out shows that word from the next edge
//                      on (bits beyond the payload length read as zero) and
//                      holds it until the next read on that port.
//   payload_len_out -> combinational payload length of the addressed buffer.
//
// Document vs. own choices: 64 buffers, 4096 bits, busy status per buffer,
// the WR/RD/CONF codes and configuration through CONF_BITS follow the
// document. The document draws 64 write and 64 read ports; this design uses
// one port per client, which gives the same freedom (the MH serves two
// clients). Packed allocation, the lock/unlock handshake, the RAM_NONE code
// and the set_amount flag are this design's choices. Storage is a register
// array reset to zero, so that reads are defined.
module message_ram
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
  input  ram_cmd_e               control_mh_in      [2],
  input  logic [IDX_W-1:0]       index_mh_in        [2],
  input  logic [WORD_W-1:0]      word_mh_in         [2],
  input  logic [DATA_W-1:0]      message_buffer_in  [2],
  output logic [DATA_W-1:0]      message_buffer_out [2],
  input  ram_conf_t              conf_bits_mh_in,
  input  logic                   lock_req           [2],
  input  logic                   unlock             [2],
  output logic                   lock_gnt           [2],
  output logic [LEN_W-1:0]       payload_len_out    [2],
  output logic [NUM_BUFFERS-1:0] message_status_out,
  output logic [IDX_W:0]         num_buffers_out
);

  localparam int unsigned ADDR_W = LEN_W + 1;  // bit address, may pass RAM_BITS

  logic [RAM_BITS-1:0]    mem, mem_next;
  logic [LEN_W-1:0]       len_q  [NUM_BUFFERS];
  logic [ADDR_W-1:0]      base_q [NUM_BUFFERS];
  logic [ADDR_W-1:0]      next_base;
  logic [IDX_W:0]         amount;
  logic [NUM_BUFFERS-1:0] busy;

  // Per-port address of the addressed word and mask of its valid bits.
  logic [ADDR_W-1:0] bit_addr  [2];
  logic [DATA_W-1:0] word_mask [2];
  logic              word_ok   [2];

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic [ADDR_W-1:0] offset;
      logic [ADDR_W-1:0] remain;
      offset          = ADDR_W'(word_mh_in[p]) * ADDR_W'(DATA_W);
      bit_addr[p]     = base_q[index_mh_in[p]] + offset;
      word_ok[p]      = offset < ADDR_W'(len_q[index_mh_in[p]]);
      remain          = ADDR_W'(len_q[index_mh_in[p]]) - offset;
      if (!word_ok[p])
        word_mask[p] = '0;
      else if (remain >= ADDR_W'(DATA_W))
        word_mask[p] = '1;
      else
        word_mask[p] = DATA_W'((64'(1) << remain) - 64'(1));
      payload_len_out[p] = len_q[index_mh_in[p]];
    end
  end

  // Lock arbitration: port 1 (protocol side) has priority.
  always_comb begin
    lock_gnt[1] = lock_req[1] && !busy[index_mh_in[1]];
    lock_gnt[0] = lock_req[0] && !busy[index_mh_in[0]] &&
                  !(lock_gnt[1] && index_mh_in[1] == index_mh_in[0]);
  end

  // Masked writes of both ports. The two ports hold different buffers and a
  // mask covers only its own buffer's bits, so the writes never overlap.
  logic [RAM_BITS-1:0] wr_mask [2];
  logic [RAM_BITS-1:0] wr_data [2];
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      wr_mask[p] = (control_mh_in[p] == RAM_WR)
                   ? (RAM_BITS'(word_mask[p]) << bit_addr[p]) : '0;
      wr_data[p] = RAM_BITS'(message_buffer_in[p]) << bit_addr[p];
    end
    mem_next = (mem & ~wr_mask[0] & ~wr_mask[1]) |
               (wr_data[0] & wr_mask[0]) | (wr_data[1] & wr_mask[1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem       <= '0;
      busy      <= '0;
      amount    <= '0;
      next_base <= '0;
      for (int i = 0; i < int'(NUM_BUFFERS); i++) begin
        len_q[i]  <= '0;
        base_q[i] <= '0;
      end
      for (int p = 0; p < 2; p++) message_buffer_out[p] <= '0;
    end else begin
      mem <= mem_next;

      for (int p = 0; p < 2; p++) begin
        if (control_mh_in[p] == RAM_RD)
          message_buffer_out[p] <= DATA_W'(mem >> bit_addr[p]) & word_mask[p];
        if (unlock[p])   busy[index_mh_in[p]] <= 1'b0;
        if (lock_gnt[p]) busy[index_mh_in[p]] <= 1'b1;
      end

      if (control_mh_in[0] == RAM_CONF) begin
        if (conf_bits_mh_in.set_amount) begin
          amount    <= (conf_bits_mh_in.value > 31'(NUM_BUFFERS))
                       ? (IDX_W+1)'(NUM_BUFFERS) : conf_bits_mh_in.value[IDX_W:0];
          next_base <= '0;
          busy      <= '0;
          for (int i = 0; i < int'(NUM_BUFFERS); i++) begin
            len_q[i]  <= '0;
            base_q[i] <= '0;
          end
        end else begin
          len_q[index_mh_in[0]]  <= conf_bits_mh_in.value[LEN_W-1:0];
          base_q[index_mh_in[0]] <= next_base;
          // Saturate so that later buffers start past the end (not stored).
          if (ADDR_W'(conf_bits_mh_in.value[LEN_W-1:0]) >= ADDR_W'(RAM_BITS) - next_base)
            next_base <= ADDR_W'(RAM_BITS);
          else
            next_base <= next_base + ADDR_W'(conf_bits_mh_in.value[LEN_W-1:0]);
        end
      end
    end
  end

  assign message_status_out = busy;
  assign num_buffers_out    = amount;

  // Only a port that holds a buffer may write or read it.
  for (genvar p = 0; p < 2; p++) begin : g_chk
    a_access_locked: assert property (@(posedge clk) disable iff (!rst_n)
      (control_mh_in[p] inside {RAM_WR, RAM_RD}) |-> busy[index_mh_in[p]])
      else $error("message_ram: port %0d accessed a buffer it has not locked", p);
  end

endmodule
