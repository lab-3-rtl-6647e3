// rle_test: end-to-end testbench for rle_top at its default parameters.
//
// A producer process writes bit-stream segments into the input FIFO whenever
// it is not full (with random pauses), raises end_of_stream right after its
// last write, and a consumer process reads the output FIFO at a random rate,
// sometimes slowly enough that the output FIFO fills and the encoder has to
// wait. Every word read is compared with a software run-length model of the
// stream (bit 0 of each segment first; each word is {bit ID, 23-bit count}).
// Streams follow each other without a reset: end_of_stream is dropped once a
// stream's words have all been read.
//
// Streams: the two-segment example 0x07, 0x3C (runs 1x3, 0x7, 1x4, 0x2), an
// alternating-bit stream (the worst case, one word per bit), long constant
// runs, and random streams. The testbench counts how often each mechanism of
// the design occurred and fails if one never did: input FIFO full, encoder
// waiting on an empty input FIFO, encoder waiting on a full output FIFO, a run
// ending inside a segment, a run ending exactly at a segment boundary, a run
// continuing into the next segment, a run spanning three or more segments,
// the end-of-stream flush, and end_of_stream arriving while the encoder was
// still counting.
module rle_test;
  import rle_pkg::*;
  localparam int unsigned CW = RLE_COUNT_WIDTH;

  logic          clk = 1'b0;
  logic          rst;
  logic          in_wr;
  logic [7:0]    in_data;
  logic          in_full;
  logic          end_of_stream;
  logic          out_rd;
  logic [CW:0]   out_data;
  logic          out_empty;

  int checks = 0, failures = 0;

  rle_top dut (
    .clk, .rst, .in_wr, .in_data, .in_full, .end_of_stream,
    .out_rd, .out_data, .out_empty
  );

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  function automatic void model(input byte unsigned segs[$], ref logic [CW:0] words[$]);
    int run_len = 0;
    bit cur = 0, have_run = 0, b;
    words.delete();
    foreach (segs[k])
      for (int i = 0; i < 8; i++) begin
        b = segs[k][i];
        if (have_run && b != cur) begin
          words.push_back({cur, CW'(run_len)});
          run_len = 0;
        end
        cur = b;
        have_run = 1;
        run_len++;
      end
    if (have_run) words.push_back({cur, CW'(run_len)});
  endfunction

  // ------------------------------------------------------ event counters
  typedef enum int {
    EV_IN_FULL, EV_IN_EMPTY_WAIT, EV_OUT_FULL_WAIT, EV_RUN_END_INSIDE,
    EV_RUN_END_BOUNDARY, EV_RUN_CONTINUES, EV_LONG_RUN, EV_FLUSH,
    EV_EOS_WHILE_COUNTING, EV_NUM
  } ev_e;
  int ev[EV_NUM];
  string ev_name[EV_NUM] = '{"input FIFO full", "wait on empty input FIFO",
    "wait on full output FIFO", "run ends inside a segment",
    "run ends at a segment boundary", "run continues into next segment",
    "run spans 3+ segments", "end-of-stream flush",
    "end_of_stream while counting"};

  always @(posedge clk) if (!rst) begin
    case (dut.u_rle.state)
      REQUEST_INPUT: if (dut.u_in_fifo.empty && !end_of_stream) ev[EV_IN_EMPTY_WAIT]++;
      COUNT_DONE:    if (dut.u_out_fifo.full) ev[EV_OUT_FULL_WAIT]++;
      COUNT_BITS:
        if (!dut.u_rle.new_bitstream) begin
          if (dut.u_rle.shift_buf[0] != dut.u_rle.value_type)
            ev[dut.u_rle.shift_count == 0 ? EV_RUN_END_BOUNDARY : EV_RUN_END_INSIDE]++;
          else if (dut.u_rle.shift_count == 0)
            ev[EV_RUN_CONTINUES]++;
        end
      RESET_COUNT:   if (end_of_stream && !dut.u_rle.last_run) ev[EV_EOS_WHILE_COUNTING]++;
      default: ;
    endcase
    if (dut.u_rle.state == REQUEST_INPUT && dut.u_rle.next_state == COUNT_DONE) ev[EV_FLUSH]++;
    if (dut.u_rle.wr_req && dut.u_rle.bit_count >= 17) ev[EV_LONG_RUN]++;
  end

  // ------------------------------------------------- producer / consumer
  logic [CW:0] got[$];
  int          slow_consumer = 0;

  // Consumer: a read issued in one cycle delivers its word in the next.
  logic rd_done;
  always @(posedge clk) begin
    if (rst) begin
      out_rd  <= 1'b0;
      rd_done <= 1'b0;
    end else begin
      out_rd  <= !out_empty &&
                 (slow_consumer == 0 ? $urandom_range(3) != 0 : $urandom_range(15) == 0);
      rd_done <= out_rd && !out_empty;
      if (rd_done) got.push_back(out_data);
    end
  end

  task automatic send_stream(input string name, input byte unsigned segs[$], input int pace);
    logic [CW:0] exp[$];
    int n;
    model(segs, exp);
    got.delete();
    foreach (segs[k]) begin
      while (in_full || (pace > 0 && $urandom_range(pace) != 0)) begin
        if (in_full) ev[EV_IN_FULL]++;
        @(posedge clk); #1;
      end
      in_wr = 1'b1;
      in_data = segs[k];
      @(posedge clk); #1;
      in_wr = 1'b0;
    end
    end_of_stream = 1'b1;
    n = 0;
    while (got.size() < exp.size() && n < 100000 + 100 * segs.size()) begin
      @(posedge clk); #1;
      n++;
    end
    repeat (50) @(posedge clk);
    #1;
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d words, expected %0d", name, got.size(), exp.size());
    end
    foreach (exp[i]) begin
      if (i >= got.size()) break;
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s word %0d: got id=%0d count=%0d, expected id=%0d count=%0d",
                 name, i, got[i][CW], got[i][CW-1:0], exp[i][CW], exp[i][CW-1:0]);
      end
    end
    $display("%s: %0d segments (%0d bits) -> %0d words (%0d bits), output/input %0.3f",
             name, segs.size(), 8 * segs.size(), exp.size(), (CW + 1) * exp.size(),
             real'((CW + 1) * exp.size()) / real'(8 * segs.size()));
    end_of_stream = 1'b0;
    @(posedge clk); #1;
  endtask

  initial begin : watchdog
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned s[$];
    rst = 1'b1; in_wr = 1'b0; in_data = '0; end_of_stream = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    s = '{8'h07, 8'h3C};
    send_stream("example", s, 0);

    s.delete();
    for (int k = 0; k < 64; k++) s.push_back(8'h55);
    send_stream("alternating", s, 0);   // 1010... in stream order, one word per bit

    s.delete();
    for (int k = 0; k < 200; k++) s.push_back(k < 100 ? 8'hFF : 8'h00);
    slow_consumer = 1;
    send_stream("long_runs", s, 0);
    slow_consumer = 0;

    for (int r = 0; r < 30; r++) begin
      s.delete();
      for (int k = 0, n = 1 + $urandom_range(120); k < n; k++)
        case ($urandom_range(4))
          0: s.push_back(8'h00);
          1: s.push_back(8'hFF);
          2: s.push_back(8'h0F);
          default: s.push_back(8'($urandom()));
        endcase
      slow_consumer = (r % 3 == 1) ? 1 : 0;
      send_stream($sformatf("random%0d", r), s, (r % 3 == 2) ? 40 : 0);
    end
    slow_consumer = 0;

    for (int e = 0; e < EV_NUM; e++) begin
      checks++;
      $display("  %-34s %0d", ev_name[e], ev[e]);
      if (ev[e] == 0) begin
        failures++;
        $display("FAIL: mechanism never exercised: %s", ev_name[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
