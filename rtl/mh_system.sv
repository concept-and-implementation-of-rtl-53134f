// mh_system: the Message Handler system of a FlexRay communication
// controller (channel A), wired as the final concept: the host talks only to
// the Frame Processing Unit (FPU); the FPU talks to the Message Handler (MH)
// through an Input Buffer (IB) and an Output Buffer (OB); the MH owns the
// Message RAM and talks to the FlexRay protocol controller (PRT) through an
// input and an output transient buffer (TBF IN, TBF OUT) plus a header and
// command bus.
//
//   host --cmd/index/data--> FPU --IB--> MH <--TBF IN-- PRT
//   host <--data/flags------ FPU <--OB-- MH --TBF OUT--> PRT
//                            FPU --cmd/index--> MH <--header/cmd-- PRT
//
// Host interface: see fpu.sv. Protocol interface: the PRT writes payload words
// into TBF IN with write_en_prt_in (held off while full_tbf_out is high; the
// strobe must come from a register), reads words from TBF OUT with pop_prt_in
// while empty_tbf_out is low, and requests an access with control_prt_in and
// header_prt_in until prt_busy_out rises or null_frame_prt_out pulses;
// prt_done_out pulses when the access is over.
//
// Reset: rst_n (active low, asynchronous) resets everything. The host's RESET
// command resets the FPU to IDLE and, through the FPU's registered
// reset_mh_out, also the MH, its RAM and the four buffers, so the host must
// configure again. Channel B would be a second copy of the MH side; it is not
// built.
//
// Document vs. own choices: the chain host -> FPU -> IB/OB -> MH -> RAM and
// the transient buffers towards the protocol controller follow the document.
// Own choices: one clock for the whole system, the look-ahead full flag on the
// buffers written from registers (IB, TBF IN), and resetting the MH side from
// the host's RESET command.
module mh_system
  import mh_pkg::*;
#(
  parameter int unsigned NUM_BUFFERS             = mh_pkg::DEF_NUM_BUFFERS,
  parameter int unsigned RAM_BITS                = mh_pkg::DEF_RAM_BITS,
  parameter int unsigned DATA_W                  = mh_pkg::DEF_DATA_W,
  parameter int unsigned BUFFER_DEPTH            = 2,
  parameter int unsigned CONF_RAM_MIN_LENGTH     = mh_pkg::DEF_CONF_RAM_MIN_LENGTH,
  parameter int unsigned CONF_RAM_MAX_LENGTH     = mh_pkg::DEF_CONF_RAM_MAX_LENGTH,
  parameter int unsigned CONF_RAM_DEFAULT_LENGTH = mh_pkg::DEF_CONF_RAM_DEFAULT_LENGTH,
  parameter int unsigned DEFAULT_PAYLOAD_LENGTH  = mh_pkg::DEF_DEFAULT_PAYLOAD_LENGTH,
  localparam int unsigned IDX_W = $clog2(NUM_BUFFERS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host
  input  logic [IDX_W-1:0]       index_in,
  input  host_cmd_e              control_host_in,
  input  logic [DATA_W-1:0]      data_host_in,
  output logic [DATA_W-1:0]      data_host_out,
  output logic                   read_en_host_out,
  output logic                   write_en_host_out,
  output logic                   msg_complete_host_out,
  output logic                   error_host_out,
  // protocol controller
  input  prt_cmd_e               control_prt_in,
  input  header_t                header_prt_in,
  input  logic [DATA_W-1:0]      data_prt_in,
  input  logic                   write_en_prt_in,
  output logic                   full_tbf_out,
  output logic [DATA_W-1:0]      data_prt_out,
  output logic                   empty_tbf_out,
  input  logic                   pop_prt_in,
  output logic                   prt_busy_out,
  output logic                   prt_done_out,
  output logic                   null_frame_prt_out,
  // status
  output logic                   configured_out,
  output logic [NUM_BUFFERS-1:0] message_status_out
);

  // FPU <-> buffers <-> MH
  logic [DATA_W-1:0] fpu_data_ib, ib_data, ob_data, mh_data_ob;
  logic              fpu_read_en_ib, ib_full, ib_empty, mh_pop_ib;
  logic              mh_en_ob, ob_full, ob_empty, fpu_pop_ob;
  logic [IDX_W-1:0]  fpu_index;
  mh_cmd_e           fpu_cmd;
  logic              fpu_reset_mh;
  logic              mh_rst_n;

  // MH <-> transient buffers
  logic [DATA_W-1:0] tbf_in_data, mh_data_tbf;
  logic              tbf_in_empty, mh_pop_tbf, mh_en_tbf, tbf_out_full;

  // reset_mh_out comes straight from a flip-flop of the FPU.
  assign mh_rst_n = rst_n && !fpu_reset_mh;

  fpu #(
    .NUM_BUFFERS(NUM_BUFFERS), .RAM_BITS(RAM_BITS), .DATA_W(DATA_W),
    .CONF_RAM_MIN_LENGTH(CONF_RAM_MIN_LENGTH), .CONF_RAM_MAX_LENGTH(CONF_RAM_MAX_LENGTH),
    .CONF_RAM_DEFAULT_LENGTH(CONF_RAM_DEFAULT_LENGTH),
    .DEFAULT_PAYLOAD_LENGTH(DEFAULT_PAYLOAD_LENGTH)
  ) u_fpu (
    .clk, .rst_n,
    .index_in, .control_host_in, .data_host_in, .data_host_out,
    .read_en_host_out, .write_en_host_out, .msg_complete_host_out, .error_host_out,
    .full_ib_in     (ib_full),
    .data_ib_out    (fpu_data_ib),
    .read_en_ib_out (fpu_read_en_ib),
    .empty_ob_in    (ob_empty),
    .data_ob_in     (ob_data),
    .pop_ob_out     (fpu_pop_ob),
    .index_out      (fpu_index),
    .control_mh_out (fpu_cmd),
    .reset_mh_out   (fpu_reset_mh)
  );

  buffer_fifo #(.DATA_W(DATA_W), .DEPTH(BUFFER_DEPTH), .FULL_AHEAD(1'b1)) u_input_buffer (
    .clk, .rst_n(mh_rst_n),
    .data_in(fpu_data_ib), .read_en(fpu_read_en_ib), .pop(mh_pop_ib),
    .data_out(ib_data), .empty(ib_empty), .full(ib_full)
  );

  buffer_fifo #(.DATA_W(DATA_W), .DEPTH(BUFFER_DEPTH), .FULL_AHEAD(1'b0)) u_output_buffer (
    .clk, .rst_n(mh_rst_n),
    .data_in(mh_data_ob), .read_en(mh_en_ob), .pop(fpu_pop_ob),
    .data_out(ob_data), .empty(ob_empty), .full(ob_full)
  );

  buffer_fifo #(.DATA_W(DATA_W), .DEPTH(BUFFER_DEPTH), .FULL_AHEAD(1'b1)) u_tbf_in (
    .clk, .rst_n(mh_rst_n),
    .data_in(data_prt_in), .read_en(write_en_prt_in), .pop(mh_pop_tbf),
    .data_out(tbf_in_data), .empty(tbf_in_empty), .full(full_tbf_out)
  );

  buffer_fifo #(.DATA_W(DATA_W), .DEPTH(BUFFER_DEPTH), .FULL_AHEAD(1'b0)) u_tbf_out (
    .clk, .rst_n(mh_rst_n),
    .data_in(mh_data_tbf), .read_en(mh_en_tbf), .pop(pop_prt_in),
    .data_out(data_prt_out), .empty(empty_tbf_out), .full(tbf_out_full)
  );

  message_handler #(
    .NUM_BUFFERS(NUM_BUFFERS), .RAM_BITS(RAM_BITS), .DATA_W(DATA_W)
  ) u_message_handler (
    .clk, .rst_n(mh_rst_n),
    .control_fpu_in      (fpu_cmd),
    .index_fpu_in        (fpu_index),
    .data_ib_in          (ib_data),
    .empty_ib_in         (ib_empty),
    .pop_ib_out          (mh_pop_ib),
    .data_ob_out         (mh_data_ob),
    .enable_read_ob_out  (mh_en_ob),
    .full_ob_in          (ob_full),
    .control_prt_in, .header_prt_in,
    .data_tbf_in         (tbf_in_data),
    .empty_tbf_in        (tbf_in_empty),
    .pop_tbf_out         (mh_pop_tbf),
    .data_tbf_out        (mh_data_tbf),
    .enable_read_tbf_out (mh_en_tbf),
    .full_tbf_in         (tbf_out_full),
    .prt_busy_out, .prt_done_out, .null_frame_prt_out,
    .configured_out, .message_status_out
  );

endmodule
