// rle_encoder: run-length encoder for a bit stream delivered in segments.
//
// The bit stream arrives from an input-side FIFO as SEG_WIDTH-bit segments
// (8 bits by default) and is consumed LSB first: bit 0 of a segment is the
// earliest bit in the stream. For every run of equal bits the encoder writes
// one word to an output-side FIFO:
//   out_data[COUNT_WIDTH]     bit ID, the value of the bits in the run
//   out_data[COUNT_WIDTH-1:0] bit count, the length of the run
// Runs continue across segment boundaries. When end_of_stream is high and the
// input FIFO is empty, the run in progress is written out as the last word.
//
// Structure: a nine-state controller (rle_pkg::rle_state_e). Its next state
// is computed in one always_comb block, and all registers are updated with
// nonblocking assignments in one always_ff block, as the specification's
// coding guideline asks. Per state:
//   INIT           clear bit_count and shift_buf, drop rd_req/wr_req, and
//                  mark that the next counted bit starts a new run
//   REQUEST_INPUT  wait for recv_ready; raise rd_req, clear shift_count
//   WAIT_INPUT     one stall cycle while the FIFO takes rd_req; drop rd_req
//   READ_INPUT     load shift_buf from in_data
//   COUNT_BITS     count shift_buf[0] into the current run, start a new run,
//                  or flag (new_bitstream) that the run has ended
//   SHIFT_BITS     shift shift_buf right and advance shift_count; on a flagged
//                  run end go and write the word instead
//   COUNT_DONE     wait for send_ready; raise wr_req
//   WAIT_OUTPUT    one stall cycle while the FIFO takes wr_req; drop wr_req
//   RESET_COUNT    clear bit_count, then continue counting (or, after the
//                  final flush, return to INIT)
//
// Interface and timing: recv_ready is the input FIFO's !empty, send_ready the
// output FIFO's !full. rd_req is a one-cycle pulse; the FIFO is expected to
// present the segment on in_data in the cycle after it saw rd_req (READ_INPUT
// samples it then). wr_req is a one-cycle pulse with out_data stable while it
// is high. Without stalls a segment costs 3 + 2*SEG_WIDTH cycles and each end
// of a run adds 5 cycles (COUNT_BITS and SHIFT_BITS that detect it,
// COUNT_DONE, WAIT_OUTPUT, RESET_COUNT). rst is synchronous and active high.
//
// Follows the specification: the states, their order and actions, the
// register names and widths, the word format, the FIFO handshake signals.
// This design's own choices, where the specification is silent or loose:
//  * rd_req/wr_req are raised only on the cycle the controller leaves
//    REQUEST_INPUT/COUNT_DONE (rd_reg <= recv_ready, wr_reg <= send_ready),
//    so one handshake moves exactly one segment or word.
//  * A run-ending bit is not shifted out; it is counted again as the first
//    bit of the next run after RESET_COUNT.
//  * The final flush is remembered in last_run, and only that path returns
//    from RESET_COUNT to INIT, so raising end_of_stream while a segment is
//    still being counted loses no bits.
//  * bit_count wraps after 2**COUNT_WIDTH-1 equal bits; runs that long are
//    not split.
module rle_encoder
  import rle_pkg::*;
#(
  parameter int unsigned SEG_WIDTH   = RLE_SEG_WIDTH,
  parameter int unsigned COUNT_WIDTH = RLE_COUNT_WIDTH,
  localparam int unsigned SHIFT_W    = $clog2(SEG_WIDTH) + 1
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   recv_ready,
  input  logic                   send_ready,
  input  logic [SEG_WIDTH-1:0]   in_data,
  input  logic                   end_of_stream,
  output logic [COUNT_WIDTH:0]   out_data,
  output logic                   rd_req,
  output logic                   wr_req
);

  rle_state_e             state, next_state;
  logic                   rd_reg, wr_reg;
  logic [COUNT_WIDTH-1:0] bit_count;
  logic                   value_type;
  logic [SEG_WIDTH-1:0]   shift_buf;
  logic [SHIFT_W-1:0]     shift_count;
  logic                   new_bitstream;
  logic                   last_run;

  assign rd_req   = rd_reg;
  assign wr_req   = wr_reg;
  assign out_data = {value_type, bit_count};

  // Next-state logic
  always_comb begin
    next_state = state;
    unique case (state)
      INIT:          next_state = REQUEST_INPUT;
      REQUEST_INPUT:
        if (recv_ready)
          next_state = WAIT_INPUT;
        else if (end_of_stream && bit_count != '0)
          next_state = COUNT_DONE;
      WAIT_INPUT:    next_state = READ_INPUT;
      READ_INPUT:    next_state = COUNT_BITS;
      COUNT_BITS:    next_state = SHIFT_BITS;
      SHIFT_BITS:
        if (new_bitstream)
          next_state = COUNT_DONE;
        else if (shift_count == SHIFT_W'(SEG_WIDTH - 1))
          next_state = REQUEST_INPUT;
        else
          next_state = COUNT_BITS;
      COUNT_DONE:
        if (send_ready)
          next_state = WAIT_OUTPUT;
      WAIT_OUTPUT:   next_state = RESET_COUNT;
      RESET_COUNT:   next_state = last_run ? INIT : COUNT_BITS;
      default:       next_state = INIT;
    endcase
  end

  // Registers
  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= INIT;
      rd_reg        <= 1'b0;
      wr_reg        <= 1'b0;
      bit_count     <= '0;
      value_type    <= 1'b0;
      shift_buf     <= '0;
      shift_count   <= '0;
      new_bitstream <= 1'b1;
      last_run      <= 1'b0;
    end else begin
      state <= next_state;
      unique case (state)
        INIT: begin
          bit_count     <= '0;
          shift_buf     <= '0;
          rd_reg        <= 1'b0;
          wr_reg        <= 1'b0;
          new_bitstream <= 1'b1;
          last_run      <= 1'b0;
        end
        REQUEST_INPUT: begin
          rd_reg      <= recv_ready;
          shift_count <= '0;
          if (!recv_ready && end_of_stream && bit_count != '0)
            last_run <= 1'b1;
        end
        WAIT_INPUT:  rd_reg    <= 1'b0;
        READ_INPUT:  shift_buf <= in_data;
        COUNT_BITS: begin
          if (new_bitstream) begin
            value_type    <= shift_buf[0];
            bit_count     <= bit_count + 1'b1;
            new_bitstream <= 1'b0;
          end else if (shift_buf[0] == value_type) begin
            bit_count <= bit_count + 1'b1;
          end else begin
            new_bitstream <= 1'b1;
          end
        end
        SHIFT_BITS:
          if (!new_bitstream) begin
            shift_buf   <= shift_buf >> 1;
            shift_count <= shift_count + 1'b1;
          end
        COUNT_DONE:  wr_reg    <= send_ready;
        WAIT_OUTPUT: wr_reg    <= 1'b0;
        RESET_COUNT: bit_count <= '0;
        default: ;
      endcase
    end
  end

  // Handshake rules: each request is a single-cycle pulse, and a word is
  // only written while it holds a non-empty run.
  a_rd_pulse: assert property (@(posedge clk) disable iff (rst) rd_req |=> !rd_req);
  a_wr_pulse: assert property (@(posedge clk) disable iff (rst) wr_req |=> !wr_req);
  a_wr_count: assert property (@(posedge clk) disable iff (rst) wr_req |-> bit_count != '0);
  a_exclusive: assert property (@(posedge clk) disable iff (rst) !(rd_req && wr_req));

endmodule
