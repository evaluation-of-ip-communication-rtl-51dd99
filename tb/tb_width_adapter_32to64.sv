// Self-checking testbench for the 32 to 64 bit width adapter.
//
// Random packets of 1 to 80 bytes go in as a 32 bit stream with random
// gaps; the output stream, 64 bits wide, is taken with random
// backpressure. Each output packet must carry the same bytes, in order, in
// ceil(length/8) words with the right start, end and empty markers.
// A 40 word packet checks the rate: one 32 bit word in per cycle and one 64
// bit word out every second cycle.
// The adapter's function follows the design description; the traffic and
// the single-clock rate check are choices of this bench.
module tb_width_adapter_32to64;

  localparam int IW = 32, OW = 64;
  localparam int IB = IW / 8, OB = OW / 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic rclk = 1'b0;
  always #5 clk = ~clk;
  always #5 rclk = ~rclk;

  logic          in_valid, in_ready, in_sop, in_eop;
  logic [IW-1:0] in_data;
  logic [$clog2(IB)-1:0] in_empty;
  logic          out_valid, out_ready, out_sop, out_eop;
  logic [OW-1:0] out_data;
  logic [$clog2(OB)-1:0] out_empty;

  width_adapter_32to64 dut (.clk, .rst_n,
    .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_empty,
    .out_valid, .out_ready, .out_data, .out_sop, .out_eop, .out_empty);

  int checks = 0, failures = 0;
  int cycle = 0, rcycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) rcycle <= rcycle + 1;

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
  always @(posedge clk) begin
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
  always @(posedge clk) out_ready <= ($urandom_range(99) >= stall_pct);

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

    // throughput: 40 words of back-to-back input, no backpressure
    pk = {};
    for (int i = 0; i < IB*40; i++) pk.push_back(8'(i));
    t0 = cycle;
    send(pk, 0);
    t1 = cycle;
    repeat (20) @(negedge clk);
    check(rx_pkts.size() == 1 && rx_pkts[0] == pk, "long packet bytes");
    check(out_cycles.size() == OB*0 + (IB*40)/OB, "long packet word count");
    if (out_cycles.size() > 1)
      check(out_cycles[out_cycles.size()-1] - out_cycles[0] == ((IB*40)/OB - 1) * 2,
            $sformatf("output words back to back: %0d cycles for %0d words",
                      out_cycles[out_cycles.size()-1] - out_cycles[0] + 1, (IB*40)/OB));
    check(t1 - t0 <= 41, $sformatf("input of 40 words took %0d cycles", t1 - t0));
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

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
