// rle_top: complete run-length compression path, input FIFO -> encoder ->
// output FIFO.
//
// A producer writes 8-bit segments of the bit stream into the input FIFO
// (in_wr/in_data, gated by in_full). The encoder pulls them out, counts runs
// of equal bits (bit 0 of a segment first) and pushes one 24-bit word per run,
// {bit ID, 23-bit count}, into the output FIFO, from which a consumer reads
// with out_rd (gated by out_empty; the word appears on out_data in the cycle
// after the read). end_of_stream tells the encoder that no more segments will
// come, so it writes out the run still being counted once the input FIFO has
// drained. The encoder sees recv_ready = !empty of the input FIFO and
// send_ready = !full of the output FIFO, as the specification connects them.
// FIFO depths are this design's own choice. rst is synchronous, active high.
module rle_top #(
  parameter int unsigned SEG_WIDTH   = rle_pkg::RLE_SEG_WIDTH,
  parameter int unsigned COUNT_WIDTH = rle_pkg::RLE_COUNT_WIDTH,
  parameter int unsigned IN_DEPTH    = 16,
  parameter int unsigned OUT_DEPTH   = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  // producer side
  input  logic                 in_wr,
  input  logic [SEG_WIDTH-1:0] in_data,
  output logic                 in_full,
  input  logic                 end_of_stream,
  // consumer side
  input  logic                 out_rd,
  output logic [COUNT_WIDTH:0] out_data,
  output logic                 out_empty
);

  logic                 in_empty, out_full;
  logic                 rd_req, wr_req;
  logic [SEG_WIDTH-1:0] seg;
  logic [COUNT_WIDTH:0] word;

  rle_fifo #(.WIDTH(SEG_WIDTH), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst,
    .wr_req (in_wr),
    .wr_data(in_data),
    .rd_req (rd_req),
    .rd_data(seg),
    .empty  (in_empty),
    .full   (in_full)
  );

  rle_encoder #(.SEG_WIDTH(SEG_WIDTH), .COUNT_WIDTH(COUNT_WIDTH)) u_rle (
    .clk, .rst,
    .recv_ready   (!in_empty),
    .send_ready   (!out_full),
    .in_data      (seg),
    .end_of_stream(end_of_stream),
    .out_data     (word),
    .rd_req       (rd_req),
    .wr_req       (wr_req)
  );

  rle_fifo #(.WIDTH(COUNT_WIDTH + 1), .DEPTH(OUT_DEPTH)) u_out_fifo (
    .clk, .rst,
    .wr_req (wr_req),
    .wr_data(word),
    .rd_req (out_rd),
    .rd_data(out_data),
    .empty  (out_empty),
    .full   (out_full)
  );

endmodule
