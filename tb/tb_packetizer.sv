// Self-checking testbench for the Packetizer.
//
// Part 1 replays a 26 byte UDP payload behind an Ethernet + IPv4 header
// (destination 00:1B:21:BC:42:42, DSCP 46, TTL 64, 192.168.0.1 ->
// 192.168.0.2) and compares every output word with the expected packet,
// including the two-cycle start latency, the nine header cycles and the
// two-byte shift of the payload. Part 2 sends packets of random length
// (1..100 bytes) under random input gaps and random output backpressure and
// compares each output packet byte for byte with header ++ payload.
// The Part 1 words, the two-cycle start latency and the nine header cycles
// follow the worked example of the design description, whose IPv4 checksum
// (25BF) is used as configured; Part 2 is this bench's own.
module tb_packetizer;
  import ipcam_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  eth_ipv4_hdr_t hdr;
  logic        in_valid, in_ready, in_sop, in_eop;
  logic [31:0] in_data;
  logic [1:0]  in_empty;
  logic        out_valid, out_ready, out_sop, out_eop;
  logic [31:0] out_data;
  logic [1:0]  out_empty;

  packetizer dut (.clk, .rst_n, .cfg_hdr(hdr),
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------- output collector ----------
  byte unsigned rx_q[$];
  byte unsigned rx_pkts[$][$];
  int          out_sop_cycle[$];
  int          stall_pct = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (out_sop) out_sop_cycle.push_back(cycle);
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

  task automatic send(input byte unsigned p[$], input int gap_pct, output int sop_cycle);
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
      // in_ready only changes on a rising edge: sample it half a cycle ahead
      do begin
        ok = in_ready;
        @(negedge clk);
      end while (!ok);
      if (w == 0) sop_cycle = cycle - 1;
    end
    in_valid = 1'b0;
  endtask

  function automatic void hdr_bytes(input eth_ipv4_hdr_t h, ref byte unsigned q[$]);
    logic [$bits(eth_ipv4_hdr_t)-1:0] v = h;
    for (int i = 0; i < HDR_BYTES; i++) q.push_back(v[$bits(v)-1-8*i -: 8]);
  endfunction

  logic [31:0] fig_out [15] = '{32'h001B21BC, 32'h42428490, 32'h00020401, 32'h080045B8,
    32'h002E0000, 32'h00004011, 32'h25BFC0A8, 32'h0001C0A8, 32'h000217E0, 32'h17E1001A,
    32'h00000101, 32'h01010123, 32'h45670123, 32'h45670123, 32'h45670123};
  logic [31:0] fig_in [7] = '{32'h17E017E1, 32'h001A0000, 32'h01010101, 32'h01234567,
    32'h01234567, 32'h01234567, 32'h01234567};

  int npk = 0;
  initial begin
    byte unsigned pay[$], exp_q[$];
    byte unsigned exp_pkts[$][$];
    int sc, len;
    in_valid = 0; in_data = 0; in_sop = 0; in_eop = 0; in_empty = 0;
    hdr = '{dst_mac: 48'h001B21BC4242, src_mac: 48'h849000020401, ethertype: 16'h0800,
            version: 4'd4, ihl: 4'd5, dscp: DSCP_EF, ecn: 2'd0, total_len: 16'd46,
            ident: 16'd0, flags: 3'd0, frag_off: 13'd0, ttl: 8'd64, protocol: 8'd17,
            hdr_cksum: 16'h25BF, src_ip: 32'hC0A80001, dst_ip: 32'hC0A80002};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // ---- part 1: reference packet, no backpressure ----
    for (int i = 0; i < 26; i++) pay.push_back(fig_in[i/4][31-8*(i%4) -: 8]);
    send(pay, 0, sc);
    repeat (30) @(negedge clk);
    check(rx_pkts.size() == 1, "one packet out");
    if (rx_pkts.size() == 1) begin
      check(rx_pkts[0].size() == 60, "packet length 60 bytes");
      for (int w = 0; w < 15; w++) begin
        automatic logic [31:0] got = '0;
        for (int b = 0; b < 4; b++) if (4*w+b < rx_pkts[0].size()) got[31-8*b -: 8] = rx_pkts[0][4*w+b];
        check(got == fig_out[w], $sformatf("word %0d = %08h, expected %08h", w, got, fig_out[w]));
      end
    end
    check(out_sop_cycle.size() == 1 && out_sop_cycle[0] - sc == 2, "first header word two cycles after payload start");
    rx_pkts.delete();
    out_sop_cycle.delete();

    // ---- part 2: random packets, gaps and backpressure ----
    stall_pct = 30;
    for (int k = 0; k < 300; k++) begin
      pay = {};
      exp_q = {};
      // the header is a per-flow setting: change it only once the
      // previous packets have left
      if (k % 30 == 0) begin
        repeat (300) @(negedge clk);
        hdr.ident     = 16'(k);
        hdr.total_len = 16'($urandom_range(1500));
        hdr.dscp      = 6'($urandom);
        hdr.dst_ip    = $urandom;
      end
      hdr_bytes(hdr, exp_q);
      len = int'($urandom_range(100, 1));
      for (int i = 0; i < len; i++) begin
        pay.push_back(8'($urandom));
        exp_q.push_back(pay[i]);
      end
      exp_pkts.push_back(exp_q);
      send(pay, 20, sc);
      npk++;
    end
    repeat (400) @(posedge clk);
    check(rx_pkts.size() == exp_pkts.size(), $sformatf("%0d packets out of %0d", rx_pkts.size(), exp_pkts.size()));
    for (int k = 0; k < rx_pkts.size() && k < exp_pkts.size(); k++)
      check(rx_pkts[k] == exp_pkts[k], $sformatf("random packet %0d contents", k));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
