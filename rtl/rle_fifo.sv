// rle_fifo: synchronous first-in first-out buffer between the encoder and its
// surroundings. The system uses two: an input-side FIFO holding 8-bit stream
// segments and an output-side FIFO holding 24-bit encoded words.
//
// How it works: a DEPTH-entry register array with write and read pointers and
// an occupancy counter. empty and full come straight from the counter.
//
// Interface and timing: a write (wr_req high at a rising edge) stores wr_data.
// A read (rd_req high at a rising edge) takes the oldest entry, which appears
// on rd_data from the next cycle on and stays there until the next read; this
// is the timing the encoder relies on (it samples the data the cycle after it
// requested it). A write while full and a read while empty are ignored, so
// callers should gate them with !full and !empty. Reading and writing in the
// same cycle is allowed, also when the FIFO is full (the read frees the
// entry). rst is synchronous and active high and empties the FIFO.
//
// The specification only names the two FIFOs, their full/empty flags and the
// read/write request handshake; the depth (16 entries) and this
// implementation are this design's own choice.
module rle_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_req,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_req,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_rd, do_wr;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_rd = rd_req && !empty;
  assign do_wr = wr_req && (!full || do_rd);

  always_ff @(posedge clk) begin
    if (do_wr)
      mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr  <= '0;
      rd_ptr  <= '0;
      count   <= '0;
      rd_data <= '0;
    end else begin
      if (do_wr)
        wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) begin
        rd_data <= mem[rd_ptr];
        rd_ptr  <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
