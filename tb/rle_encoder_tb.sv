// rle_encoder_tb: self-checking testbench for rle_encoder.
//
// The encoder is surrounded by two FIFO models written with SystemVerilog
// queues: the input model pops a segment when it sees rd_req at a clock edge
// and shows it on in_data from the next cycle; the output model captures
// out_data whenever wr_req is high at a clock edge. The expected words are
// computed from the segment list by a plain software run-length model (bit 0
// of a segment first), independent of the encoder's state machine.
//
// Tests: the two-segment example 0x07, 0x3C (expected runs 1x3, 0x7, 1x4,
// 0x2); long single runs; alternating bits (worst case); runs that break on
// the first and last bit of a segment; random streams. Without stalls the
// clock cycle of every write is checked against a timing model (INIT 1 cycle;
// per segment 3 cycles plus 2 per bit; 5 more cycles per run end; flush =
// REQUEST_INPUT, COUNT_DONE, then the write in WAIT_OUTPUT). With random
// stalls on recv_ready and send_ready only the words are checked, and
// end_of_stream is raised as soon as the last segment has been taken, while
// the encoder is still counting it.
module rle_encoder_tb;
  localparam int unsigned CW = 23;

  logic          clk = 1'b0;
  logic          rst = 1'b1;
  logic          recv_ready = 1'b0, send_ready = 1'b0;
  logic [7:0]    in_data = '0;
  logic          end_of_stream = 1'b0;
  logic [CW:0]   out_data;
  logic          rd_req, wr_req;

  int            checks = 0, failures = 0;

  rle_encoder dut (
    .clk, .rst, .recv_ready, .send_ready, .in_data, .end_of_stream,
    .out_data, .rd_req, .wr_req
  );

  always #5 clk = ~clk;

  // FIFO models and cycle counter
  byte unsigned inq[$];
  logic [CW:0]  outq[$];
  int           wr_cycle[$];
  int           cyc = 0;
  int           rd_count = 0;
  bit           stall_in = 0, stall_out = 0, eos_arm = 0;

  always @(posedge clk) begin
    if (rst) begin
      cyc <= 0;
    end else begin
      if (rd_req) begin
        rd_count++;
        if (inq.size() == 0) begin
          failures++;
          $display("FAIL: rd_req with empty input FIFO at cycle %0d", cyc);
        end else begin
          in_data <= inq.pop_front();
        end
      end
      if (wr_req) begin
        outq.push_back(out_data);
        wr_cycle.push_back(cyc);
      end
      cyc <= cyc + 1;
    end
    recv_ready    <= (inq.size() != 0) && (!stall_in || $urandom_range(3) != 0);
    send_ready    <= !stall_out || $urandom_range(2) != 0;
    end_of_stream <= eos_arm && (inq.size() == 0);
  end

  // Reference run-length model
  typedef struct { logic [CW:0] word; int cycle; } exp_t;

  function automatic void model(input byte unsigned segs[$], ref exp_t exp[$]);
    int  t, tc, run_len;
    bit  cur, have_run, b;
    exp.delete();
    t = 1;  // cycle 0 is INIT, first REQUEST_INPUT in cycle 1
    have_run = 0;
    run_len  = 0;
    cur      = 0;
    foreach (segs[k]) begin
      tc = t + 3;
      for (int i = 0; i < 8; i++) begin
        b = segs[k][i];
        if (have_run && b != cur) begin
          exp.push_back('{{cur, CW'(run_len)}, tc + 3});
          tc += 5;
          run_len = 0;
        end
        cur = b;
        have_run = 1;
        run_len++;
        tc += 2;
      end
      t = tc;
    end
    if (have_run) exp.push_back('{{cur, CW'(run_len)}, t + 2});
  endfunction

  task automatic run_stream(input string name, input byte unsigned segs[$],
                            input bit stalls);
    exp_t exp[$];
    int   n;
    model(segs, exp);
    stall_in  = stalls;
    stall_out = stalls;
    eos_arm   = 0;
    rst = 1'b1;
    inq = segs;
    outq.delete();
    wr_cycle.delete();
    rd_count = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    eos_arm = 1;
    n = 0;
    while (outq.size() < exp.size() && n < 20000 + 200 * segs.size()) begin
      @(posedge clk);
      n++;
    end
    repeat (40) @(posedge clk);
    checks++;
    if (outq.size() != exp.size()) begin
      failures++;
      $display("FAIL %s: %0d words, expected %0d", name, outq.size(), exp.size());
    end
    checks++;
    if (rd_count != segs.size()) begin
      failures++;
      $display("FAIL %s: %0d reads, expected %0d", name, rd_count, segs.size());
    end
    foreach (exp[i]) begin
      if (i >= outq.size()) break;
      checks++;
      if (outq[i] !== exp[i].word) begin
        failures++;
        $display("FAIL %s word %0d: got id=%0d count=%0d, expected id=%0d count=%0d",
                 name, i, outq[i][CW], outq[i][CW-1:0], exp[i].word[CW],
                 exp[i].word[CW-1:0]);
      end
      if (!stalls) begin
        checks++;
        if (wr_cycle[i] != exp[i].cycle) begin
          failures++;
          $display("FAIL %s word %0d: written in cycle %0d, expected %0d",
                   name, i, wr_cycle[i], exp[i].cycle);
        end
      end
    end
    eos_arm = 0;
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned s[$];
    // Example: 11100000 00111100 (bit 0 first) -> 1x3, 0x7, 1x4, 0x2
    s = '{8'h07, 8'h3C};
    run_stream("example", s, 0);
    begin
      exp_t e[$];
      model(s, e);
      checks++;
      if (e.size() != 4 || e[0].word != {1'b1, CW'(3)} || e[1].word != {1'b0, CW'(7)} ||
          e[2].word != {1'b1, CW'(4)} || e[3].word != {1'b0, CW'(2)}) begin
        failures++;
        $display("FAIL: reference model disagrees with the worked example");
      end
    end
    run_stream("example_stalls", s, 1);
    s = '{8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF};
    run_stream("ones", s, 0);
    s = '{8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    run_stream("zeros", s, 0);
    s = '{8'h55, 8'hAA, 8'h55, 8'h55};
    run_stream("alternating", s, 0);
    s = '{8'h01, 8'h80, 8'hFE, 8'h7F, 8'h00};
    run_stream("edge_bits", s, 0);
    s = '{8'h80};
    run_stream("single", s, 0);
    for (int r = 0; r < 40; r++) begin
      s.delete();
      for (int k = 0, n = 1 + $urandom_range(30); k < n; k++) begin
        case ($urandom_range(3))
          0: s.push_back(8'h00);
          1: s.push_back(8'hFF);
          default: s.push_back(8'($urandom()));
        endcase
      end
      run_stream($sformatf("random%0d", r), s, r[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
