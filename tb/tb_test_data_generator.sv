// Self-checking testbench for the test data generator.
//
// A reference model rebuilds every expected chunk: twelve address bytes,
// then incrementing, pseudo-random (same xorshift recurrence, run
// independently here) or fixed-pattern content. Checked: the words of a
// 26 byte fixed-pattern UDP chunk, chunk counts, exactly cfg_gap idle cycles
// between chunks (and none for cfg_gap = 0), one word per cycle, random
// content under backpressure, and an endless run that a stop request ends
// after the current chunk.
// The address bytes, the three modes and the pause follow the design
// description; the reference xorshift recurrence and the test cases are
// choices of this bench and of the generator.
module tb_test_data_generator;
  import ipcam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start, stop, busy;
  logic [31:0] num_pkts, pkt_count;
  logic [15:0] len, gap;
  gen_mode_t   mode;
  logic [63:0] pattern;
  logic [47:0] dst, src;
  logic        out_valid, out_ready, out_sop, out_eop;
  logic [63:0] out_data;
  logic [2:0]  out_empty;

  test_data_generator dut (.clk, .rst_n, .cfg_start(start), .cfg_stop(stop),
    .cfg_num_pkts(num_pkts), .cfg_len(len), .cfg_mode(mode), .cfg_pattern(pattern),
    .cfg_dst_addr(dst), .cfg_src_addr(src), .cfg_gap(gap), .busy, .out_pkt_count(pkt_count),
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop, .out_empty);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- collector ----------
  byte unsigned rx_q[$];
  byte unsigned rx_pkts[$][$];
  logic [63:0] rx_words[$];
  int sop_cyc[$], eop_cyc[$];
  int stall_pct = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      rx_words.push_back(out_data);
      if (out_sop) sop_cyc.push_back(cycle);
      for (int b = 0; b < 8 - (out_eop ? int'(out_empty) : 0); b++)
        rx_q.push_back(out_data[63-8*b -: 8]);
      if (out_eop) begin
        eop_cyc.push_back(cycle);
        rx_pkts.push_back(rx_q);
        rx_q = {};
      end
    end
  end
  always @(posedge clk) out_ready <= ($urandom_range(99) >= stall_pct);

  // ---------- reference ----------
  logic [63:0] ref_rng;
  function automatic logic [63:0] step(input logic [63:0] x);
    logic [63:0] y = x;
    y ^= y << 13;
    y ^= y >> 7;
    y ^= y << 17;
    return y;
  endfunction

  function automatic void expect_chunk(ref byte unsigned q[$]);
    int nw = (int'(len) + 7) / 8;
    q = {};
    for (int w = 0; w < nw; w++) begin
      for (int p = 0; p < 8; p++) begin
        int b = 8*w + p;
        byte unsigned v;
        if (b >= int'(len)) continue;
        if (b < 6)       v = dst[47-8*b -: 8];
        else if (b < 12) v = src[47-8*(b-6) -: 8];
        else case (mode)
          GEN_INCR:   v = 8'(b - 12);
          GEN_RANDOM: v = ref_rng[63-8*p -: 8];
          default:    v = pattern[63-8*((b-12)%8) -: 8];
        endcase
        q.push_back(v);
      end
      if (mode == GEN_RANDOM) ref_rng = step(ref_rng);
    end
  endfunction

  task automatic run(input int n);
    @(negedge clk);
    num_pkts = n;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic clear();
    rx_pkts.delete(); rx_words.delete(); sop_cyc.delete(); eop_cyc.delete();
  endtask

  initial begin
    byte unsigned e[$];
    bit ok;
    start = 0; stop = 0; num_pkts = 0; len = 26; gap = 5; mode = GEN_FIXED;
    pattern = 64'h0123456701234567; dst = 48'h17E017E1001A; src = 48'h000001010101;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- fixed pattern, 3 chunks, pause 5 ----
    run(3);
    repeat (60) @(negedge clk);
    check(!busy, "run of 3 finished");
    check(pkt_count == 3, "chunk counter 3");
    check(rx_pkts.size() == 3, "3 chunks out");
    check(rx_words.size() == 12, "4 words per chunk");
    if (rx_words.size() >= 4) begin
      check(rx_words[0] == 64'h17E017E1001A0000, "word 0");
      check(rx_words[1] == 64'h0101010101234567, "word 1");
      check(rx_words[2] == 64'h0123456701234567, "word 2");
      check(rx_words[3][63:48] == 16'h0123, "word 3");
    end
    for (int k = 0; k < 3 && k < rx_pkts.size(); k++) begin
      expect_chunk(e);
      check(rx_pkts[k] == e, $sformatf("fixed chunk %0d", k));
      check(eop_cyc[k] - sop_cyc[k] == 3, "chunk words back to back");
    end
    for (int k = 1; k < 3 && k < sop_cyc.size(); k++)
      check(sop_cyc[k] - eop_cyc[k-1] - 1 == 5, $sformatf("pause %0d cycles", sop_cyc[k] - eop_cyc[k-1] - 1));
    clear();

    // ---- incrementing, back to back ----
    mode = GEN_INCR; len = 100; gap = 0;
    run(4);
    repeat (80) @(negedge clk);
    check(rx_pkts.size() == 4 && pkt_count == 4, "4 incrementing chunks");
    for (int k = 0; k < rx_pkts.size(); k++) begin
      expect_chunk(e);
      check(rx_pkts[k] == e, $sformatf("incrementing chunk %0d", k));
    end
    for (int k = 1; k < sop_cyc.size(); k++)
      check(sop_cyc[k] == eop_cyc[k-1] + 1, "no pause with gap 0");
    clear();

    // ---- random content with backpressure ----
    mode = GEN_RANDOM; len = 53; gap = 2; pattern = 64'h9E3779B97F4A7C15;
    ref_rng = pattern;
    stall_pct = 40;
    run(6);
    repeat (200) @(negedge clk);
    check(rx_pkts.size() == 6, "6 random chunks");
    for (int k = 0; k < rx_pkts.size(); k++) begin
      expect_chunk(e);
      check(rx_pkts[k] == e, $sformatf("random chunk %0d", k));
    end
    clear();

    // ---- endless run, stopped ----
    stall_pct = 0; mode = GEN_INCR; len = 64; gap = 1;
    run(0);
    repeat (100) @(negedge clk);
    check(busy, "endless run still going");
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    repeat (30) @(negedge clk);
    check(!busy, "stopped");
    check(rx_pkts.size() == int'(pkt_count) && pkt_count > 5, $sformatf("%0d chunks counted and seen", pkt_count));
    check(rx_q.size() == 0, "stop ends on a chunk boundary");
    for (int k = 0; k < rx_pkts.size(); k++) check(rx_pkts[k].size() == 64, "stopped run chunk length");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
