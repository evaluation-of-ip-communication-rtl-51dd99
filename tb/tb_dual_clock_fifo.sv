// Self-checking testbench for the dual-clock FIFO (16 words, one idle
// read cycle after each end of packet).
//
// Random packets of 1 to 80 bytes go in as a 32 bit stream with random
// gaps; the output stream, 32 bits wide, is taken with random
// backpressure. Each output packet must carry the same bytes, in order, in
// ceil(length/4) words with the right start, end and empty markers.
// Write clock 100 MHz, read clock about 135 MHz. The FIFO is also filled
// until it reports full, and the read side must leave one idle cycle after
// every end of packet.
// The idle cycle after an end of packet is the MAC rule of the design
// description; the depth, clock ratio and traffic are choices of this bench.
module tb_dual_clock_fifo;

  localparam int IW = 32, OW = 32;
  localparam int IB = IW / 8, OB = OW / 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rclk = 1'b0;
  always #5 clk = ~clk;
  always #3.7 rclk = ~rclk;

  logic          in_valid, in_ready, in_sop, in_eop;
  logic [IW-1:0] in_data;
  logic [$clog2(IB)-1:0] in_empty;
  logic          out_valid, out_ready, out_sop, out_eop;
  logic [OW-1:0] out_data;
  logic [$clog2(OB)-1:0] out_empty;

  logic rrst_n;
  assign rrst_n = rst_n;
  dual_clock_fifo #(.DEPTH(16), .EOP_GAP(1)) dut (
    .wr_clk(clk), .wr_rst_n(rst_n),
    .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_empty,
    .rd_clk(rclk), .rd_rst_n(rrst_n),
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop, .out_empty);

  // a read side word may not follow an end of packet in the next read cycle
  int gap_viol = 0, gaps_seen = 0, last_eop_rc = -10, full_seen = 0;
  always @(posedge rclk) if (rst_n && out_valid && out_ready) begin
    if (rcycle == last_eop_rc + 1) gap_viol++;
    if (out_eop) last_eop_rc = rcycle;
  end
  always @(posedge rclk) if (rst_n && rcycle == last_eop_rc + 1 && !out_valid) gaps_seen++;
  always @(posedge clk) if (rst_n && in_valid && !in_ready) full_seen++;

  int checks = 0, failures = 0;
  int cycle = 0, rcycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge rclk) rcycle <= rcycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned rx_q[$];
  byte unsigned rx_pkts[$][$];
  int rx_words[$];
  int eop_cycles[$], out_cycles[$];
  int stall_pct = 0, nw = 0, mark_errs = 0, in_pkt = 0;
  always @(posedge rclk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_sop != (in_pkt == 0)) mark_errs++;
      in_pkt = out_eop ? 0 : 1;
      out_cycles.push_back(rcycle);
      nw++;
      for (int b = 0; b < OB - (out_eop ? int'(out_empty) : 0); b++)
        rx_q.push_back(out_data[OW-1-8*b -: 8]);
      if (out_eop) begin
        rx_pkts.push_back(rx_q);
        rx_words.push_back(nw);
        eop_cycles.push_back(rcycle);
        rx_q = {};
        nw = 0;
      end
    end
  end
  // ready changes just after a rising edge, so it is stable at the next falling edge
  always @(posedge rclk) out_ready <= ($urandom_range(99) >= stall_pct);

  task automatic send(input byte unsigned p[$], input int gap_pct);
    int n = p.size();
    int nwi = (n + IB - 1) / IB;
    for (int w = 0; w < nwi; w++) begin
      logic [IW-1:0] d = '0;
      bit ok;
      for (int b = 0; b < IB; b++) if (IB*w + b < n) d[IW-1-8*b -: 8] = p[IB*w+b];
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = d;
      in_sop   = (w == 0);
      in_eop   = (w == nwi - 1);
      in_empty = (w == nwi - 1) ? $bits(in_empty)'(IB*nwi - n) : '0;
      do begin
        ok = in_ready;
        @(negedge clk);
      end while (!ok);
    end
    in_valid = 1'b0;
  endtask

  initial begin
    byte unsigned pk[$];
    byte unsigned exp_pkts[$][$];
    int len, t0, t1, nin;
    in_valid = 0; in_data = 0; in_sop = 0; in_eop = 0; in_empty = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // fill the FIFO with the read side stalled: it must report full
    stall_pct = 100;
    repeat (3) @(posedge rclk);
    @(negedge clk);
    pk = {};
    for (int i = 0; i < 4*24; i++) pk.push_back(8'(i + 3));
    fork
      send(pk, 0);
      begin
        repeat (60) @(negedge clk);
        check(full_seen > 0, "FIFO reports full");
        stall_pct = 0;
      end
    join
    repeat (60) @(negedge clk);
    check(rx_pkts.size() == 1 && rx_pkts[0] == pk, "packet through a full FIFO");
    rx_pkts.delete(); rx_words.delete(); out_cycles.delete(); eop_cycles.delete();

    stall_pct = 30;
    for (int k = 0; k < 400; k++) begin
      pk = {};
      len = int'($urandom_range(80, 1));
      for (int i = 0; i < len; i++) pk.push_back(8'($urandom));
      exp_pkts.push_back(pk);
      send(pk, 25);
    end
    repeat (400) @(negedge clk);
    check(rx_pkts.size() == exp_pkts.size(), $sformatf("%0d packets out of %0d", rx_pkts.size(), exp_pkts.size()));
    for (int k = 0; k < rx_pkts.size() && k < exp_pkts.size(); k++) begin
      check(rx_pkts[k] == exp_pkts[k], $sformatf("packet %0d bytes", k));
      check(rx_words[k] == (exp_pkts[k].size() + OB - 1) / OB, $sformatf("packet %0d word count", k));
    end
    check(mark_errs == 0, "start markers");
    check(gap_viol == 0, "no word in the read cycle after an end of packet");
    check(gaps_seen > 100, $sformatf("idle cycles after end of packet seen: %0d", gaps_seen));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
