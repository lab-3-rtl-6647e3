// rle_fifo_tb: self-checking testbench for rle_fifo.
//
// A queue model of the FIFO runs alongside the DUT. Phases: fill to full
// (checking full and that a further write is ignored), drain to empty
// (checking order, empty, and that a read while empty changes nothing), a
// read and a write in the same cycle while full, then many cycles of random
// reads and writes. Every read's data is checked in the cycle after the read,
// and the empty/full flags are checked every cycle.
module rle_fifo_tb;
  localparam int unsigned W = 24;
  localparam int unsigned D = 16;

  logic         clk = 1'b0;
  logic         rst;
  logic         wr_req, rd_req;
  logic [W-1:0] wr_data, rd_data;
  logic         empty, full;

  int checks = 0, failures = 0;

  rle_fifo #(.WIDTH(W), .DEPTH(D)) dut (
    .clk, .rst, .wr_req, .wr_data, .rd_req, .rd_data, .empty, .full
  );

  always #5 clk = ~clk;

  logic [W-1:0] model[$];
  logic [W-1:0] expect_data;
  bit           expect_valid = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // One clock cycle with the given requests; updates the model.
  task automatic cycle(input bit wr, input bit rd, input logic [W-1:0] d);
    bit do_rd, do_wr;
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == D), "full flag");
    do_rd = rd && model.size() != 0;
    do_wr = wr && (model.size() != D || do_rd);
    wr_req  = wr;
    rd_req  = rd;
    wr_data = d;
    @(posedge clk);
    #1;
    if (do_rd) begin
      expect_data = model.pop_front();
      expect_valid = 1;
    end
    if (do_wr) model.push_back(d);
    if (expect_valid)
      check(rd_data == expect_data, $sformatf("rd_data %h, expected %h", rd_data, expect_data));
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; wr_req = 1'b0; rd_req = 1'b0; wr_data = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // fill, plus one ignored write
    for (int i = 0; i <= D; i++) cycle(1, 0, W'(32'h100 + i));
    check(full, "full after D writes");
    check(model.size() == D, "model holds D");
    // drain, plus one ignored read
    for (int i = 0; i <= D; i++) cycle(0, 1, '0);
    check(empty, "empty after draining");
    check(rd_data == W'(32'h100 + D - 1), "rd_data holds the last entry after an ignored read");
    // simultaneous read and write while full
    for (int i = 0; i < D; i++) cycle(1, 0, W'(32'h200 + i));
    cycle(1, 1, W'(32'h2FF));
    check(full, "still full after read+write");
    // random traffic
    for (int i = 0; i < 20000; i++)
      cycle($urandom_range(1) == 1, $urandom_range(2) != 0 ? (i / 2000) % 2 == 0 : (i / 2000) % 2 == 1,
            W'($urandom()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
