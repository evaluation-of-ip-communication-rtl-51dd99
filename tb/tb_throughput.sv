// Throughput testbench for camera_ip_subsystem at its default parameters.
//
// It measures the transmit video path (generator -> 64/32 adapter ->
// Packetizer -> 32/64 adapter -> switch video port) against 10 Gbit/s
// Ethernet line rate. The switch port never stalls, and the bench records
// the clock cycle of every start of packet that port accepts. One cycle is
// one 32 bit word at 322.265625 MHz, the Packetizer/MAC clock.
//  * RFC 2544 frame sizes 64 ... 1518 bytes, generator pause 0. A frame of F
//    bytes (with the 4 byte FCS, which the MAC adds) is built from a chunk of
//    F-38 bytes. The bench checks that each packet carries F-4 bytes. It also
//    checks that the mean packet period, plus the one idle cycle the MAC needs
//    after each end of packet, is no longer than the line time of F+20 bytes
//    (frame, preamble, inter-frame gap) = (F+20)/4 cycles. It cannot be
//    shorter than ceil((F-4)/4) cycles, the bus minimum.
//  * Generator-paced streams of 1404 byte chunks (the 1376 byte video payload
//    behind 28 bytes of UDP/RTP/HBRMT header), at 3000 and 4500 Mbit/s. The
//    pause is set from the period measured at a long reference pause. The
//    bench checks that the rate measured over the 1442 byte frames is within
//    1 % of the target.
//  * Latency of 128 byte frames at a pause of 40 cycles: cycles from the
//    generator's first word of a chunk to the first word of its packet at the
//    switch port. It must be the same for every packet of the flow.
// The frame sizes and rates are the ones used in the evaluation this design
// follows; the 28 byte upper-layer header size is standard (RFC 4175 /
// SMPTE 2022-6), not taken from it.
module tb_throughput;
  import ipcam_pkg::*;

  localparam int NP = 2;
  localparam real F_CLK_MHZ = 322.265625;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        gen_start = 1'b0, gen_stop = 1'b0, gen_busy;
  logic [31:0] gen_num_pkts = '0, gen_pkt_count;
  logic [15:0] gen_len = 16'd26, gen_gap = '0;
  gen_mode_t   gen_mode = GEN_INCR;
  eth_ipv4_hdr_t hdr;
  logic [31:0] mon_chunks, mon_ferr;
  logic [47:0] mon_bytes, mon_words;
  logic [63:0] mon_last;
  logic        vi_valid, vi_sop, vi_eop;
  logic [63:0] vi_data;
  logic [2:0]  vi_empty;
  logic        vo_ready;
  logic [NP-1:0]       eg_ready, si_valid, si_sop, si_eop, tx_valid, tx_sop, tx_eop, rx_ready;
  logic [NP-1:0][63:0] si_data;
  logic [NP-1:0][2:0]  si_empty;
  logic [NP-1:0][31:0] tx_data;
  logic [NP-1:0][1:0]  tx_empty;
  logic [NP-1:0]       pclk, prst_n;
  assign pclk   = {NP{clk}};
  assign prst_n = {NP{rst_n}};

  camera_ip_subsystem dut (
    .clk, .rst_n,
    .gen_start, .gen_stop, .gen_num_pkts, .gen_len, .gen_mode,
    .gen_pattern(64'h0123456789ABCDEF), .gen_dst_addr(48'h17E017E1001A),
    .gen_src_addr(48'h000001010101), .gen_gap, .gen_busy, .gen_pkt_count,
    .pkt_hdr(hdr), .depkt_hdr_len(8'd34), .depkt_strip_fcs(1'b0),
    .mon_clear(1'b0), .mon_chunk_count(mon_chunks), .mon_byte_count(mon_bytes),
    .mon_word_count(mon_words), .mon_last_data(mon_last), .mon_framing_errors(mon_ferr),
    .sw_vid_in_valid(vi_valid), .sw_vid_in_ready(1'b1), .sw_vid_in_data(vi_data),
    .sw_vid_in_sop(vi_sop), .sw_vid_in_eop(vi_eop), .sw_vid_in_empty(vi_empty),
    .sw_vid_out_valid(1'b0), .sw_vid_out_ready(vo_ready), .sw_vid_out_data('0),
    .sw_vid_out_sop(1'b0), .sw_vid_out_eop(1'b0), .sw_vid_out_empty('0),
    .sw_eg_valid('0), .sw_eg_ready(eg_ready), .sw_eg_data('0),
    .sw_eg_sop('0), .sw_eg_eop('0), .sw_eg_empty('0),
    .sw_in_valid(si_valid), .sw_in_ready('1), .sw_in_data(si_data),
    .sw_in_sop(si_sop), .sw_in_eop(si_eop), .sw_in_empty(si_empty),
    .mac_tx_clk(pclk), .mac_tx_rst_n(prst_n), .mac_tx_valid(tx_valid), .mac_tx_ready('1),
    .mac_tx_data(tx_data), .mac_tx_sop(tx_sop), .mac_tx_eop(tx_eop), .mac_tx_empty(tx_empty),
    .mac_rx_clk(pclk), .mac_rx_rst_n(prst_n), .mac_rx_valid('0), .mac_rx_ready(rx_ready),
    .mac_rx_data('0), .mac_rx_sop('0), .mac_rx_eop('0), .mac_rx_empty('0)
  );

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Packet observer at the switch video port (always ready).
  int n_pkts = 0, first_sop = 0, last_sop = 0, cur_bytes = 0, bad_len = 0;
  int exp_bytes = 0;
  always @(posedge clk) begin
    if (vi_valid) begin
      automatic int nb = 8 - int'(vi_empty);
      if (vi_sop) begin
        if (n_pkts == 0) first_sop = cycle;
        last_sop = cycle;
        cur_bytes = 0;
      end
      if (vi_eop) begin
        cur_bytes += nb;
        if (cur_bytes != exp_bytes) bad_len++;
        n_pkts++;
      end else
        cur_bytes += 8;
    end
  end

  // Start-of-packet latency from the generator output to the switch port.
  int gen_sop_q[$];
  int lat_min = 1 << 30, lat_max = 0, n_lat = 0;
  always @(posedge clk) begin
    if (dut.g_valid && dut.g_ready && dut.g_sop) gen_sop_q.push_back(cycle);
    if (vi_valid && vi_sop && gen_sop_q.size() > 0) begin
      automatic int l = cycle - gen_sop_q.pop_front();
      if (l < lat_min) lat_min = l;
      if (l > lat_max) lat_max = l;
      n_lat++;
    end
  end

  // Run n chunks of len bytes with the given pause; returns the mean period
  // in cycles, taken between the first and last start of packet.
  task automatic run(input int len, input int gap, input int n, output real period);
    @(negedge clk);
    gen_len = 16'(len);
    gen_gap = 16'(gap);
    gen_num_pkts = 32'(n);
    hdr.total_len = 16'(20 + len);
    exp_bytes = len + HDR_BYTES;
    n_pkts = 0;
    bad_len = 0;
    gen_start = 1'b1;
    @(negedge clk);
    gen_start = 1'b0;
    while (n_pkts < n) @(negedge clk);
    repeat (40) @(negedge clk);
    check(bad_len == 0, $sformatf("packet length %0d bytes", exp_bytes));
    period = real'(last_sop - first_sop) / real'(n - 1);
  endtask

  localparam int NSIZES = 9;
  localparam int SIZES [NSIZES] = '{64, 128, 256, 384, 512, 768, 1024, 1280, 1518};
  localparam int CHUNK = 1376 + 28;
  localparam int FRAME = CHUNK + HDR_BYTES + 4;

  initial begin
    automatic real per, line, lo, t_ref, rate;
    automatic int p, gap;
    hdr = '{dst_mac: 48'h001B21BC4242, src_mac: 48'h849000020401, ethertype: 16'h0800,
            version: 4'd4, ihl: 4'd5, dscp: DSCP_EF, ecn: 2'd0, total_len: 16'd46,
            ident: 16'd0, flags: 3'd2, frag_off: 13'd0, ttl: 8'd64, protocol: 8'd17,
            hdr_cksum: 16'h0000, src_ip: 32'hC0A80001, dst_ip: 32'hC0A80002};
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);

    foreach (SIZES[i]) begin
      run(SIZES[i] - HDR_BYTES - 4, 0, 20, per);
      line = real'(SIZES[i] + 20) / 4.0;
      lo   = real'((SIZES[i] - 4 + 3) / 4);
      $display("frame %4d B: %7.2f cycles/packet (+1 MAC gap), line time %7.2f, path capacity %5.2f Gbit/s",
               SIZES[i], per, line, 10.0 * line / (per + 1.0));
      check(per + 1.0 <= line, $sformatf("line rate at %0d byte frames", SIZES[i]));
      check(per >= lo, $sformatf("bus minimum at %0d byte frames", SIZES[i]));
    end

    // Reference pause long enough that the generator sets the period.
    run(CHUNK, 2000, 6, t_ref);
    for (int k = 0; k < 2; k++) begin
      automatic real target = (k == 0) ? 3000.0 : 4500.0;
      gap = int'(real'(FRAME) * 8.0 * F_CLK_MHZ / target - (t_ref - 2000.0));
      run(CHUNK, gap, 8, per);
      rate = real'(FRAME) * 8.0 * F_CLK_MHZ / per;
      $display("paced stream: pause %0d cycles, period %7.2f cycles, %7.1f Mbit/s (target %0.0f)",
               gap, per, rate, target);
      check(rate > 0.99 * target && rate < 1.01 * target, $sformatf("rate %0.0f Mbit/s", target));
    end

    lat_min = 1 << 30; lat_max = 0; n_lat = 0;
    run(128 - HDR_BYTES - 4, 40, 20, per);
    $display("128 byte frames: start latency %0d..%0d cycles over %0d packets (%0.1f ns at %0.3f MHz)",
             lat_min, lat_max, n_lat, real'(lat_max) * 1000.0 / F_CLK_MHZ, F_CLK_MHZ);
    check(n_lat == 20 && lat_min == lat_max, "latency constant over the flow");

    check(mon_ferr == 0, "no framing errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
