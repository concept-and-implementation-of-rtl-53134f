// buffer_fifo: the small first-in first-out buffer used on every payload path
// of the Message Handler: the Input Buffer (FPU -> MH), the Output Buffer
// (MH -> FPU) and the two transient buffers to and from the FlexRay protocol
// controller.
//
// A word on data_in is stored at the rising clock edge when read_en is high
// (the name follows the interface tables: the strobe tells the buffer that the
// consumer may now read the word). The oldest word is always visible on
// data_out while empty is low; the consumer takes it by raising pop for one
// cycle. A write while the buffer is full is ignored; a pop while it is empty
// is ignored. Depth 2 and width 32 follow the document; the separate pop input
// is this design's addition, since a FIFO needs one and the tables list none.
//
// full has two forms, chosen by FULL_AHEAD. With FULL_AHEAD = 0 it is the plain
// "no free entry" flag, for a producer that decides combinationally in the
// same cycle (the Message Handler). With FULL_AHEAD = 1 it also counts the
// write that is being presented in this cycle, for a producer whose write
// strobe comes from a register (the FPU, the protocol controller): such a
// producer decides at edge k from the flag it sees before edge k, and its
// write lands at edge k+1, so it must see "full" one write early to never
// overrun the buffer.
//
// Timing: a word written at edge k is on data_out, with empty low, from edge k
// on; it can be popped in the same cycle. Reset (rst_n low, asynchronous)
// empties the buffer.
module buffer_fifo #(
  parameter int unsigned DATA_W     = 32,
  parameter int unsigned DEPTH      = 2,
  parameter bit          FULL_AHEAD = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data_in,
  input  logic              read_en,
  input  logic              pop,
  output logic [DATA_W-1:0] data_out,
  output logic              empty,
  output logic              full
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic [CNT_W-1:0]  count;
  logic              do_wr, do_rd;

  assign empty = (count == '0);
  assign do_rd = pop && !empty;
  assign do_wr = read_en && (count != CNT_W'(DEPTH));

  if (FULL_AHEAD) begin : g_full_ahead
    assign full = (count == CNT_W'(DEPTH)) ||
                  ((count == CNT_W'(DEPTH - 1)) && read_en && !do_rd);
  end else begin : g_full_plain
    assign full = (count == CNT_W'(DEPTH));
  end

  assign data_out = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] ptr_inc(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else begin
      if (do_wr) begin
        mem[wr_ptr] <= data_in;
        wr_ptr      <= ptr_inc(wr_ptr);
      end
      if (do_rd) rd_ptr <= ptr_inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // A write while full is ignored; flag it, since no producer here should do it.
  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) !(read_en && count == CNT_W'(DEPTH));
  endproperty
  a_no_overrun: assert property (p_no_overrun)
    else $warning("buffer_fifo: write while full, word dropped");

endmodule
