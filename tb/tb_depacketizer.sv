// Self-checking testbench for the Depacketizer.
//
// Sends packets of random length with random input gaps and random output
// backpressure, for header lengths from 0 to 60 bytes and with and without
// frame-check-sequence stripping, and compares each output payload byte for
// byte with the packet minus its header (and last four bytes). Packets with
// no payload must produce no output. A directed case unwraps a 60 byte
// Ethernet + IPv4 + UDP packet with a 34 byte header.
// Header stripping follows the design description; the header lengths,
// packet sizes and stall patterns are choices of this bench.
module tb_depacketizer;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  hdr_len;
  logic        strip_fcs;
  logic        in_valid, in_ready, in_sop, in_eop;
  logic [31:0] in_data;
  logic [1:0]  in_empty;
  logic        out_valid, out_ready, out_sop, out_eop;
  logic [31:0] out_data;
  logic [1:0]  out_empty;

  depacketizer dut (.clk, .rst_n, .cfg_hdr_len(hdr_len), .cfg_strip_fcs(strip_fcs),
    .in_valid, .in_ready, .in_data, .in_sop, .in_eop, .in_empty,
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
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  byte unsigned rx_q[$];
  byte unsigned rx_pkts[$][$];
  int stall_pct = 0, sop_errs = 0, in_pkt = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_sop != (in_pkt == 0)) sop_errs++;
      in_pkt = out_eop ? 0 : 1;
      for (int b = 0; b < 4 - (out_eop ? int'(out_empty) : 0); b++)
        rx_q.push_back(out_data[31-8*b -: 8]);
      if (out_eop) begin
        rx_pkts.push_back(rx_q);
        rx_q = {};
      end
    end
  end
  // ready changes just after a rising edge, so it is stable at the next falling edge
  always @(posedge clk) out_ready <= ($urandom_range(99) >= stall_pct);

  task automatic send(input byte unsigned p[$], input int gap_pct);
    int n = p.size();
    int nw = (n + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [31:0] d = '0;
      bit ok;
      for (int b = 0; b < 4; b++) if (4*w + b < n) d[31-8*b -: 8] = p[4*w+b];
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1;
      in_data  = d;
      in_sop   = (w == 0);
      in_eop   = (w == nw - 1);
      in_empty = (w == nw - 1) ? 2'(4*nw - n) : 2'd0;
      do begin
        ok = in_ready;
        @(negedge clk);
      end while (!ok);
    end
    in_valid = 1'b0;
  endtask

  logic [31:0] fig_pkt [15] = '{32'h001B21BC, 32'h42428490, 32'h00020401, 32'h080045B8,
    32'h002E0000, 32'h00004011, 32'h25BFC0A8, 32'h0001C0A8, 32'h000217E0, 32'h17E1001A,
    32'h00000101, 32'h01010123, 32'h45670123, 32'h45670123, 32'h45670123};
  logic [31:0] fig_pay [7] = '{32'h17E017E1, 32'h001A0000, 32'h01010101, 32'h01234567,
    32'h01234567, 32'h01234567, 32'h01234567};

  initial begin
    byte unsigned pk[$], exp_q[$];
    byte unsigned exp_pkts[$][$];
    int len, f, empty_pkts;
    in_valid = 0; in_data = 0; in_sop = 0; in_eop = 0; in_empty = 0;
    hdr_len = 8'd34; strip_fcs = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- directed: 34 byte header, 26 byte payload ----
    for (int i = 0; i < 60; i++) pk.push_back(fig_pkt[i/4][31-8*(i%4) -: 8]);
    send(pk, 0);
    repeat (20) @(negedge clk);
    check(rx_pkts.size() == 1, "one payload out");
    if (rx_pkts.size() == 1) begin
      check(rx_pkts[0].size() == 26, "payload 26 bytes");
      for (int i = 0; i < 26 && i < rx_pkts[0].size(); i++)
        check(rx_pkts[0][i] == fig_pay[i/4][31-8*(i%4) -: 8], $sformatf("payload byte %0d", i));
    end
    rx_pkts.delete();

    // ---- random ----
    stall_pct = 25;
    empty_pkts = 0;
    for (int k = 0; k < 600; k++) begin
      if (k % 50 == 0) begin
        repeat (200) @(negedge clk);
        hdr_len   = 8'($urandom_range(60));
        strip_fcs = 1'($urandom);
      end
      pk = {};
      exp_q = {};
      f = strip_fcs ? 4 : 0;
      len = int'($urandom_range(int'(hdr_len) + f + 40, 1));
      for (int i = 0; i < len; i++) begin
        pk.push_back(8'($urandom));
        if (i >= int'(hdr_len) && i < len - f) exp_q.push_back(pk[i]);
      end
      if (exp_q.size() > 0) exp_pkts.push_back(exp_q);
      else empty_pkts++;
      send(pk, 20);
    end
    repeat (300) @(negedge clk);
    check(empty_pkts > 0, "some packets without payload were sent");
    check(rx_pkts.size() == exp_pkts.size(), $sformatf("%0d payloads out of %0d", rx_pkts.size(), exp_pkts.size()));
    for (int k = 0; k < rx_pkts.size() && k < exp_pkts.size(); k++)
      check(rx_pkts[k] == exp_pkts[k], $sformatf("random payload %0d (%0d vs %0d bytes)", k, rx_pkts[k].size(), exp_pkts[k].size()));
    check(sop_errs == 0, "start marker on the first output word only");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
