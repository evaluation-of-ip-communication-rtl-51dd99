// End-to-end testbench for camera_ip_subsystem, at its default parameters.
//
// The switch, MACs and PHYs are outside the module; this bench stands in
// for them:
//  * video path: every packet the Packetizer hands to the switch port is
//    checked byte for byte against header ++ generated chunk (the chunk
//    rebuilt by a model here) and looped back into the switch egress toward
//    the Depacketizer, as with a fibre loopback. The monitor must count every
//    chunk and byte. Phases use fixed-pattern chunks with the 34 byte
//    Ethernet + IPv4 header, incrementing and random chunks, pauses between
//    chunks, backpressure from the switch port, and looped packets with a
//    4 byte trailer that the Depacketizer strips.
//  * external ports: random packets sent into each switch egress must leave
//    on that port's MAC transmit side, in its own clock, unchanged, with an
//    idle cycle after every end of packet; random packets from each MAC
//    receive side (own clock) must reach the switch ingress unchanged. The
//    MAC transmit side is stalled for a while so the FIFO fills.
// Each mechanism is counted; one that never happens is a failure.
// The block chain, the 34 byte header and the idle cycle after each packet
// toward the MAC follow the design description; the loopback, the clock
// ratios and the traffic mix are choices of this bench.
module tb_camera_ip_subsystem;
  import ipcam_pkg::*;

  localparam int NP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [NP-1:0] tx_clk = '0, rx_clk = '0;
  always #4 tx_clk[0] = ~tx_clk[0];
  always #6 tx_clk[1] = ~tx_clk[1];
  always #7 rx_clk[0] = ~rx_clk[0];
  always #3 rx_clk[1] = ~rx_clk[1];

  // configuration
  logic        gen_start, gen_stop, gen_busy;
  logic [31:0] gen_num_pkts, gen_pkt_count;
  logic [15:0] gen_len, gen_gap;
  gen_mode_t   gen_mode;
  logic [63:0] gen_pattern;
  logic [47:0] gen_dst, gen_src;
  eth_ipv4_hdr_t hdr;
  logic [7:0]  dhl;
  logic        dfcs;
  logic        mon_clear;
  logic [31:0] mon_chunks, mon_ferr;
  logic [47:0] mon_bytes, mon_words;
  logic [63:0] mon_last;
  // video switch port
  logic        vi_valid, vi_ready, vi_sop, vi_eop;
  logic [63:0] vi_data;
  logic [2:0]  vi_empty;
  logic        vo_valid, vo_ready, vo_sop, vo_eop;
  logic [63:0] vo_data;
  logic [2:0]  vo_empty;
  // external ports
  logic [NP-1:0]       eg_valid, eg_ready, eg_sop, eg_eop;
  logic [NP-1:0][63:0] eg_data;
  logic [NP-1:0][2:0]  eg_empty;
  logic [NP-1:0]       si_valid, si_ready, si_sop, si_eop;
  logic [NP-1:0][63:0] si_data;
  logic [NP-1:0][2:0]  si_empty;
  logic [NP-1:0]       tx_valid, tx_ready, tx_sop, tx_eop;
  logic [NP-1:0][31:0] tx_data;
  logic [NP-1:0][1:0]  tx_empty;
  logic [NP-1:0]       rx_valid, rx_ready, rx_sop, rx_eop;
  logic [NP-1:0][31:0] rx_data;
  logic [NP-1:0][1:0]  rx_empty;
  logic [NP-1:0]       tx_rst_n, rx_rst_n;
  assign tx_rst_n = {NP{rst_n}};
  assign rx_rst_n = {NP{rst_n}};

  camera_ip_subsystem dut (
    .clk, .rst_n,
    .gen_start, .gen_stop, .gen_num_pkts, .gen_len, .gen_mode, .gen_pattern,
    .gen_dst_addr(gen_dst), .gen_src_addr(gen_src), .gen_gap, .gen_busy, .gen_pkt_count,
    .pkt_hdr(hdr), .depkt_hdr_len(dhl), .depkt_strip_fcs(dfcs),
    .mon_clear, .mon_chunk_count(mon_chunks), .mon_byte_count(mon_bytes),
    .mon_word_count(mon_words), .mon_last_data(mon_last), .mon_framing_errors(mon_ferr),
    .sw_vid_in_valid(vi_valid), .sw_vid_in_ready(vi_ready), .sw_vid_in_data(vi_data),
    .sw_vid_in_sop(vi_sop), .sw_vid_in_eop(vi_eop), .sw_vid_in_empty(vi_empty),
    .sw_vid_out_valid(vo_valid), .sw_vid_out_ready(vo_ready), .sw_vid_out_data(vo_data),
    .sw_vid_out_sop(vo_sop), .sw_vid_out_eop(vo_eop), .sw_vid_out_empty(vo_empty),
    .sw_eg_valid(eg_valid), .sw_eg_ready(eg_ready), .sw_eg_data(eg_data),
    .sw_eg_sop(eg_sop), .sw_eg_eop(eg_eop), .sw_eg_empty(eg_empty),
    .sw_in_valid(si_valid), .sw_in_ready(si_ready), .sw_in_data(si_data),
    .sw_in_sop(si_sop), .sw_in_eop(si_eop), .sw_in_empty(si_empty),
    .mac_tx_clk(tx_clk), .mac_tx_rst_n(tx_rst_n), .mac_tx_valid(tx_valid), .mac_tx_ready(tx_ready),
    .mac_tx_data(tx_data), .mac_tx_sop(tx_sop), .mac_tx_eop(tx_eop), .mac_tx_empty(tx_empty),
    .mac_rx_clk(rx_clk), .mac_rx_rst_n(rx_rst_n), .mac_rx_valid(rx_valid), .mac_rx_ready(rx_ready),
    .mac_rx_data(rx_data), .mac_rx_sop(rx_sop), .mac_rx_eop(rx_eop), .mac_rx_empty(rx_empty)
  );

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_pkt_stall = 0, n_sw_backpressure = 0, n_gen_pause = 0, n_fcs_strip = 0;
  int n_tx_gap = 0, n_fifo_full = 0, n_mode[3] = '{0, 0, 0}, n_shared_word = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.p_in_valid && !dut.p_in_ready) n_pkt_stall++;
    if (vi_valid && !vi_ready) n_sw_backpressure++;
    if (dut.u_gen.state == 2'd2) n_gen_pause++;
    // last whole header word sent, two header bytes carried into the next word
    if (dut.u_packetizer.state == 2'd1 && dut.u_packetizer.state_n == 2'd2 &&
        dut.u_packetizer.rc_n == 3'(HDR_BYTES % 4)) n_shared_word++;
  end

  // ---------------- video path: model, check, loop back ----------------
  int vpad = 0;           // trailer bytes added in the loop back
  int vstall = 0;         // percent of cycles the switch port is not ready
  logic [63:0] ref_rng;
  byte unsigned exp_pkts[$][$];
  byte unsigned loop_pkts[$][$];
  byte unsigned vq[$];
  int vi_pkts = 0, vi_bad = 0;

  function automatic logic [63:0] step(input logic [63:0] x);
    logic [63:0] y = x;
    y ^= y << 13;
    y ^= y >> 7;
    y ^= y << 17;
    return y;
  endfunction

  // expected packet for the next chunk: header, then the chunk
  function automatic void expect_packet();
    byte unsigned q[$];
    logic [$bits(eth_ipv4_hdr_t)-1:0] hv = hdr;
    int nw = (int'(gen_len) + 7) / 8;
    for (int i = 0; i < HDR_BYTES; i++) q.push_back(hv[$bits(hv)-1-8*i -: 8]);
    for (int w = 0; w < nw; w++) begin
      for (int p = 0; p < 8; p++) begin
        int b = 8*w + p;
        byte unsigned v;
        if (b >= int'(gen_len)) continue;
        if (b < 6)       v = gen_dst[47-8*b -: 8];
        else if (b < 12) v = gen_src[47-8*(b-6) -: 8];
        else case (gen_mode)
          GEN_INCR:   v = 8'(b - 12);
          GEN_RANDOM: v = ref_rng[63-8*p -: 8];
          default:    v = gen_pattern[63-8*((b-12)%8) -: 8];
        endcase
        q.push_back(v);
      end
      if (gen_mode == GEN_RANDOM) ref_rng = step(ref_rng);
    end
    exp_pkts.push_back(q);
  endfunction

  always @(posedge clk) vi_ready <= ($urandom_range(99) >= vstall);

  always @(posedge clk) begin
    if (rst_n && vi_valid && vi_ready) begin
      for (int b = 0; b < 8 - (vi_eop ? int'(vi_empty) : 0); b++) vq.push_back(vi_data[63-8*b -: 8]);
      if (vi_eop) begin
        automatic byte unsigned e[$];
        vi_pkts++;
        if (exp_pkts.size() == 0) vi_bad++;
        else begin
          e = exp_pkts.pop_front();
          if (e != vq) begin
            vi_bad++;
            if (vi_bad < 4) $display("video packet %0d differs: %0d vs %0d bytes", vi_pkts, vq.size(), e.size());
          end
        end
        for (int i = 0; i < vpad; i++) vq.push_back(8'($urandom));
        loop_pkts.push_back(vq);
        vq = {};
      end
    end
  end

  // loop back into the switch egress toward the Depacketizer
  initial begin
    vo_valid = 0; vo_sop = 0; vo_eop = 0; vo_empty = 0; vo_data = 0;
    forever begin
      @(negedge clk);
      if (loop_pkts.size() > 0) begin
        automatic byte unsigned p[$] = loop_pkts.pop_front();
        automatic int n = p.size();
        automatic int nw = (n + 7) / 8;
        for (int w = 0; w < nw; w++) begin
          automatic bit ok;
          automatic logic [63:0] d = '0;
          for (int b = 0; b < 8; b++) if (8*w + b < n) d[63-8*b -: 8] = p[8*w+b];
          vo_valid = 1'b1; vo_data = d; vo_sop = (w == 0); vo_eop = (w == nw - 1);
          vo_empty = (w == nw - 1) ? 3'(8*nw - n) : 3'd0;
          do begin
            ok = vo_ready;
            @(negedge clk);
          end while (!ok);
        end
        vo_valid = 1'b0;
      end
    end
  end
  always @(posedge clk) if (rst_n && vo_valid && vo_ready && vo_eop && vpad == 4 && dfcs) n_fcs_strip++;

  // ---------------- external ports ----------------
  int tx_stall[NP] = '{0, 0};
  for (genvar p = 0; p < NP; p++) begin : g_ext
    // per-port drivers, joined into the port vectors below
    logic l_eg_valid;
    logic l_eg_sop;
    logic l_eg_eop;
    logic [63:0] l_eg_data;
    logic [2:0] l_eg_empty;
    logic l_rx_valid;
    logic l_rx_sop;
    logic l_rx_eop;
    logic [31:0] l_rx_data;
    logic [1:0] l_rx_empty;
    logic l_tx_ready;
    logic l_si_ready;
    assign eg_valid[p] = l_eg_valid;
    assign eg_sop[p] = l_eg_sop;
    assign eg_eop[p] = l_eg_eop;
    assign eg_data[p] = l_eg_data;
    assign eg_empty[p] = l_eg_empty;
    assign rx_valid[p] = l_rx_valid;
    assign rx_sop[p] = l_rx_sop;
    assign rx_eop[p] = l_rx_eop;
    assign rx_data[p] = l_rx_data;
    assign rx_empty[p] = l_rx_empty;
    assign tx_ready[p] = l_tx_ready;
    assign si_ready[p] = l_si_ready;
    byte unsigned eg_exp[$][$];
    byte unsigned rx_exp[$][$];
    byte unsigned tq[$], sq[$];
    int tx_pkts = 0, tx_bad = 0, si_pkts = 0, si_bad = 0, gap_viol = 0;
    int tcyc = 0, last_eop = -10;
    bit send_done = 0, rx_done = 0;

    always @(posedge tx_clk[p]) tcyc <= tcyc + 1;
    always @(posedge tx_clk[p]) l_tx_ready <= ($urandom_range(99) >= tx_stall[p]);
    always @(posedge clk) l_si_ready <= ($urandom_range(99) >= 20);
    always @(posedge clk) if (rst_n && eg_valid[p] && !dut.g_port[p].t_ready) n_fifo_full++;

    // MAC transmit side
    always @(posedge tx_clk[p]) begin
      if (rst_n && tcyc == last_eop + 1 && !tx_valid[p]) n_tx_gap++;
      if (rst_n && tx_valid[p] && tx_ready[p]) begin
        if (tcyc == last_eop + 1) gap_viol++;
        for (int b = 0; b < 4 - (tx_eop[p] ? int'(tx_empty[p]) : 0); b++) tq.push_back(tx_data[p][31-8*b -: 8]);
        if (tx_eop[p]) begin
          last_eop = tcyc;
          tx_pkts++;
          if (eg_exp.size() == 0 || eg_exp.pop_front() != tq) tx_bad++;
          tq = {};
        end
      end
    end

    // switch ingress side
    always @(posedge clk) begin
      if (rst_n && si_valid[p] && si_ready[p]) begin
        for (int b = 0; b < 8 - (si_eop[p] ? int'(si_empty[p]) : 0); b++) sq.push_back(si_data[p][63-8*b -: 8]);
        if (si_eop[p]) begin
          si_pkts++;
          if (rx_exp.size() == 0 || rx_exp.pop_front() != sq) si_bad++;
          sq = {};
        end
      end
    end

    // drive the switch egress
    initial begin
      l_eg_valid = 0; l_eg_sop = 0; l_eg_eop = 0; l_eg_empty = 0; l_eg_data = 0;
      wait (rst_n);
      @(negedge clk);
      for (int k = 0; k < 150; k++) begin
        automatic byte unsigned q[$];
        automatic int n = int'($urandom_range(120, 1));
        automatic int nw = (n + 7) / 8;
        for (int i = 0; i < n; i++) q.push_back(8'($urandom));
        eg_exp.push_back(q);
        for (int w = 0; w < nw; w++) begin
          automatic bit ok;
          automatic logic [63:0] d = '0;
          for (int b = 0; b < 8; b++) if (8*w + b < n) d[63-8*b -: 8] = q[8*w+b];
          l_eg_valid = 1'b1; l_eg_data = d; l_eg_sop = (w == 0); l_eg_eop = (w == nw - 1);
          l_eg_empty = (w == nw - 1) ? 3'(8*nw - n) : 3'd0;
          // ready only changes on a rising edge: sample it half a cycle ahead
          do begin
            ok = eg_ready[p];
            @(negedge clk);
          end while (!ok);
        end
        l_eg_valid = 1'b0;
      end
      send_done = 1;
    end

    // drive the MAC receive side
    initial begin
      l_rx_valid = 0; l_rx_sop = 0; l_rx_eop = 0; l_rx_empty = 0; l_rx_data = 0;
      wait (rst_n);
      @(negedge rx_clk[p]);
      for (int k = 0; k < 150; k++) begin
        automatic byte unsigned q[$];
        automatic int n = int'($urandom_range(120, 1));
        automatic int nw = (n + 3) / 4;
        for (int i = 0; i < n; i++) q.push_back(8'($urandom));
        rx_exp.push_back(q);
        for (int w = 0; w < nw; w++) begin
          automatic bit ok;
          automatic logic [31:0] d = '0;
          for (int b = 0; b < 4; b++) if (4*w + b < n) d[31-8*b -: 8] = q[4*w+b];
          l_rx_valid = 1'b1; l_rx_data = d; l_rx_sop = (w == 0); l_rx_eop = (w == nw - 1);
          l_rx_empty = (w == nw - 1) ? 2'(4*nw - n) : 2'd0;
          // ready only changes on a rising edge: sample it half a cycle ahead
          do begin
            ok = rx_ready[p];
            @(negedge rx_clk[p]);
          end while (!ok);
        end
        l_rx_valid = 1'b0;
        if ($urandom_range(3) == 0) @(negedge rx_clk[p]);
      end
      rx_done = 1;
    end
  end

  // ---------------- sequence ----------------
  task automatic run_chunks(input int n);
    for (int i = 0; i < n; i++) expect_packet();
    @(negedge clk);
    gen_num_pkts = n;
    gen_start = 1'b1;
    @(negedge clk);
    gen_start = 1'b0;
    @(negedge clk);
    while (gen_busy) @(negedge clk);
    // let every packet of this phase come back before settings change
    while (exp_pkts.size() != 0 || loop_pkts.size() != 0 || vo_valid) @(negedge clk);
    repeat (200) @(negedge clk);
  endtask

  initial begin
    int chunks = 0;
    longint bytes = 0;
    gen_start = 0; gen_stop = 0; gen_num_pkts = 0; mon_clear = 0;
    gen_len = 26; gen_gap = 0; gen_mode = GEN_FIXED;
    gen_pattern = 64'h0123456701234567; gen_dst = 48'h17E017E1001A; gen_src = 48'h000001010101;
    hdr = '{dst_mac: 48'h001B21BC4242, src_mac: 48'h849000020401, ethertype: 16'h0800,
            version: 4'd4, ihl: 4'd5, dscp: DSCP_EF, ecn: 2'd0, total_len: 16'd46,
            ident: 16'd0, flags: 3'd0, frag_off: 13'd0, ttl: 8'd64, protocol: 8'd17,
            hdr_cksum: 16'h25BF, src_ip: 32'hC0A80001, dst_ip: 32'hC0A80002};
    dhl = 8'(HDR_BYTES); dfcs = 1'b0;
    tx_stall[0] = 0; tx_stall[1] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);

    // 1: minimum-size frames (26 byte chunk), back to back
    run_chunks(20);               chunks += 20; bytes += 20 * 26;
    n_mode[GEN_FIXED] += 20;
    // 2: incrementing content, pauses, switch backpressure
    gen_mode = GEN_INCR; gen_len = 1472; gen_gap = 7; vstall = 30;
    hdr.total_len = 16'(20 + 1472); hdr.dscp = DSCP_BE;
    tx_stall[0] = 100;            // hold MAC 0 so its FIFO fills
    run_chunks(6);                chunks += 6; bytes += 6 * 1472;
    n_mode[GEN_INCR] += 6;
    tx_stall[0] = 10; tx_stall[1] = 30;
    // 3: random content, looped back with a 4 byte trailer that is stripped
    gen_mode = GEN_RANDOM; gen_pattern = 64'h0F1E2D3C4B5A6978; ref_rng = gen_pattern;
    gen_len = 203; gen_gap = 3; vstall = 10; vpad = 4; dfcs = 1'b1;
    hdr.total_len = 16'(20 + 203);
    run_chunks(12);               chunks += 12; bytes += 12 * 203;
    n_mode[GEN_RANDOM] += 12;
    vpad = 0; dfcs = 1'b0;
    tx_stall[0] = 0; tx_stall[1] = 0;

    wait (g_ext[0].send_done && g_ext[1].send_done && g_ext[0].rx_done && g_ext[1].rx_done);
    repeat (500) @(negedge clk);

    check(vi_pkts == chunks, $sformatf("video packets to the switch: %0d of %0d", vi_pkts, chunks));
    check(vi_bad == 0, $sformatf("video packets with wrong bytes: %0d", vi_bad));
    check(mon_chunks == 32'(chunks), $sformatf("monitor chunks %0d of %0d", mon_chunks, chunks));
    check(mon_bytes == 48'(bytes), $sformatf("monitor bytes %0d of %0d", mon_bytes, bytes));
    check(mon_ferr == 0, "monitor framing errors");
    check(g_ext[0].tx_pkts == 150 && g_ext[0].tx_bad == 0 && g_ext[0].gap_viol == 0, "port 0 transmit");
    check(g_ext[1].tx_pkts == 150 && g_ext[1].tx_bad == 0 && g_ext[1].gap_viol == 0, "port 1 transmit");
    check(g_ext[0].si_pkts == 150 && g_ext[0].si_bad == 0, "port 0 receive");
    check(g_ext[1].si_pkts == 150 && g_ext[1].si_bad == 0, "port 1 receive");

    $display("mechanisms: packetizer stall %0d, shared header/payload word %0d, switch backpressure %0d,",
             n_pkt_stall, n_shared_word, n_sw_backpressure);
    $display("  generator pause %0d, modes fixed/incr/random %0d/%0d/%0d, trailer stripped %0d,",
             n_gen_pause, n_mode[GEN_FIXED], n_mode[GEN_INCR], n_mode[GEN_RANDOM], n_fcs_strip);
    $display("  idle cycle after MAC end of packet %0d, transmit FIFO full %0d", n_tx_gap, n_fifo_full);
    check(n_pkt_stall > 0, "packetizer stalled its input");
    check(n_shared_word == chunks, "shared header/payload word in every packet");
    check(n_sw_backpressure > 0, "switch port backpressure");
    check(n_gen_pause > 0, "generator pause");
    check(n_fcs_strip > 0, "trailer stripped");
    check(n_tx_gap > 0, "idle cycle after MAC end of packet");
    check(n_fifo_full > 0, "transmit FIFO full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
