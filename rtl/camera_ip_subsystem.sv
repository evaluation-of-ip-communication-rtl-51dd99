// FPGA side of the camera IP-networking prototype, around the switch.
//
// A multilayer switch sits at the centre of the camera's network: one of its
// ports serves the video path from and to the image chain, the others lead
// through MACs and PHYs to the SFP+ slots. This module holds everything on
// those paths except the switch, the MACs and the PHYs, whose ports it
// brings out:
//
//   video transmit:  generator (64 bit) -> 64/32 adapter -> Packetizer
//                    (32 bit) -> 32/64 adapter -> sw_vid_in_*  (switch ingress)
//   video receive:   sw_vid_out_* (switch egress) -> 64/32 adapter ->
//                    Depacketizer -> 32/64 adapter -> monitor
//   external port p: sw_eg_*[p] (switch egress) -> 64/32 adapter ->
//                    dual-clock FIFO (one idle cycle after each packet end)
//                    -> mac_tx_*[p];  mac_rx_*[p] -> dual-clock FIFO ->
//                    32/64 adapter -> sw_in_*[p] (switch ingress)
//
// All 64 bit and 32 bit streams are ready/valid packet streams with start,
// end and empty markers, bytes in network order (first byte in the top bits).
// The video paths and the switch side of the external ports run on clk, the
// 32 bit clock (322.265625 MHz in the prototype); a 64 bit stream on clk
// carries one word every second cycle, which is the rate of the switch's
// 64 bit interface at half that clock. Each MAC side runs on its own transmit
// and receive clock. Resets are active low and asynchronous.
//
// The chain of blocks and the two external ports follow the prototype; the
// single clock for the 64 bit side and the ready/valid handshakes are
// choices of this implementation.
module camera_ip_subsystem
  import ipcam_pkg::*;
#(
  parameter int unsigned NUM_EXT_PORTS = 2,
  parameter int unsigned FIFO_DEPTH    = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  // generator control
  input  logic          gen_start,
  input  logic          gen_stop,
  input  logic [31:0]   gen_num_pkts,
  input  logic [15:0]   gen_len,
  input  gen_mode_t     gen_mode,
  input  logic [63:0]   gen_pattern,
  input  logic [47:0]   gen_dst_addr,
  input  logic [47:0]   gen_src_addr,
  input  logic [15:0]   gen_gap,
  output logic          gen_busy,
  output logic [31:0]   gen_pkt_count,
  // Packetizer / Depacketizer configuration
  input  eth_ipv4_hdr_t pkt_hdr,
  input  logic [7:0]    depkt_hdr_len,
  input  logic          depkt_strip_fcs,
  // monitor
  input  logic          mon_clear,
  output logic [31:0]   mon_chunk_count,
  output logic [47:0]   mon_byte_count,
  output logic [47:0]   mon_word_count,
  output logic [63:0]   mon_last_data,
  output logic [31:0]   mon_framing_errors,
  // video packets into the switch
  output logic          sw_vid_in_valid,
  input  logic          sw_vid_in_ready,
  output logic [63:0]   sw_vid_in_data,
  output logic          sw_vid_in_sop,
  output logic          sw_vid_in_eop,
  output logic [2:0]    sw_vid_in_empty,
  // packets from the switch toward the Depacketizer
  input  logic          sw_vid_out_valid,
  output logic          sw_vid_out_ready,
  input  logic [63:0]   sw_vid_out_data,
  input  logic          sw_vid_out_sop,
  input  logic          sw_vid_out_eop,
  input  logic [2:0]    sw_vid_out_empty,
  // external ports, switch side (clk)
  input  logic [NUM_EXT_PORTS-1:0]        sw_eg_valid,
  output logic [NUM_EXT_PORTS-1:0]        sw_eg_ready,
  input  logic [NUM_EXT_PORTS-1:0][63:0]  sw_eg_data,
  input  logic [NUM_EXT_PORTS-1:0]        sw_eg_sop,
  input  logic [NUM_EXT_PORTS-1:0]        sw_eg_eop,
  input  logic [NUM_EXT_PORTS-1:0][2:0]   sw_eg_empty,
  output logic [NUM_EXT_PORTS-1:0]        sw_in_valid,
  input  logic [NUM_EXT_PORTS-1:0]        sw_in_ready,
  output logic [NUM_EXT_PORTS-1:0][63:0]  sw_in_data,
  output logic [NUM_EXT_PORTS-1:0]        sw_in_sop,
  output logic [NUM_EXT_PORTS-1:0]        sw_in_eop,
  output logic [NUM_EXT_PORTS-1:0][2:0]   sw_in_empty,
  // external ports, MAC side
  input  logic [NUM_EXT_PORTS-1:0]        mac_tx_clk,
  input  logic [NUM_EXT_PORTS-1:0]        mac_tx_rst_n,
  output logic [NUM_EXT_PORTS-1:0]        mac_tx_valid,
  input  logic [NUM_EXT_PORTS-1:0]        mac_tx_ready,
  output logic [NUM_EXT_PORTS-1:0][31:0]  mac_tx_data,
  output logic [NUM_EXT_PORTS-1:0]        mac_tx_sop,
  output logic [NUM_EXT_PORTS-1:0]        mac_tx_eop,
  output logic [NUM_EXT_PORTS-1:0][1:0]   mac_tx_empty,
  input  logic [NUM_EXT_PORTS-1:0]        mac_rx_clk,
  input  logic [NUM_EXT_PORTS-1:0]        mac_rx_rst_n,
  input  logic [NUM_EXT_PORTS-1:0]        mac_rx_valid,
  output logic [NUM_EXT_PORTS-1:0]        mac_rx_ready,
  input  logic [NUM_EXT_PORTS-1:0][31:0]  mac_rx_data,
  input  logic [NUM_EXT_PORTS-1:0]        mac_rx_sop,
  input  logic [NUM_EXT_PORTS-1:0]        mac_rx_eop,
  input  logic [NUM_EXT_PORTS-1:0][1:0]   mac_rx_empty
);

  // ---------------- video transmit path ----------------
  logic        g_valid, g_ready, g_sop, g_eop;
  logic [63:0] g_data;
  logic [2:0]  g_empty;
  logic        p_in_valid, p_in_ready, p_in_sop, p_in_eop;
  logic [31:0] p_in_data;
  logic [1:0]  p_in_empty;
  logic        p_out_valid, p_out_ready, p_out_sop, p_out_eop;
  logic [31:0] p_out_data;
  logic [1:0]  p_out_empty;

  test_data_generator #(.DATA_W(64)) u_gen (
    .clk, .rst_n,
    .cfg_start(gen_start), .cfg_stop(gen_stop), .cfg_num_pkts(gen_num_pkts),
    .cfg_len(gen_len), .cfg_mode(gen_mode), .cfg_pattern(gen_pattern),
    .cfg_dst_addr(gen_dst_addr), .cfg_src_addr(gen_src_addr), .cfg_gap(gen_gap),
    .busy(gen_busy), .out_pkt_count(gen_pkt_count),
    .out_valid(g_valid), .out_ready(g_ready), .out_data(g_data),
    .out_sop(g_sop), .out_eop(g_eop), .out_empty(g_empty)
  );

  width_adapter_64to32 u_gen_a64to32 (
    .clk, .rst_n,
    .in_valid(g_valid), .in_ready(g_ready), .in_data(g_data),
    .in_sop(g_sop), .in_eop(g_eop), .in_empty(g_empty),
    .out_valid(p_in_valid), .out_ready(p_in_ready), .out_data(p_in_data),
    .out_sop(p_in_sop), .out_eop(p_in_eop), .out_empty(p_in_empty)
  );

  packetizer u_packetizer (
    .clk, .rst_n, .cfg_hdr(pkt_hdr),
    .in_valid(p_in_valid), .in_ready(p_in_ready), .in_data(p_in_data),
    .in_sop(p_in_sop), .in_eop(p_in_eop), .in_empty(p_in_empty),
    .out_valid(p_out_valid), .out_ready(p_out_ready), .out_data(p_out_data),
    .out_sop(p_out_sop), .out_eop(p_out_eop), .out_empty(p_out_empty)
  );

  width_adapter_32to64 u_pkt_a32to64 (
    .clk, .rst_n,
    .in_valid(p_out_valid), .in_ready(p_out_ready), .in_data(p_out_data),
    .in_sop(p_out_sop), .in_eop(p_out_eop), .in_empty(p_out_empty),
    .out_valid(sw_vid_in_valid), .out_ready(sw_vid_in_ready), .out_data(sw_vid_in_data),
    .out_sop(sw_vid_in_sop), .out_eop(sw_vid_in_eop), .out_empty(sw_vid_in_empty)
  );

  // ---------------- video receive path ----------------
  logic        d_in_valid, d_in_ready, d_in_sop, d_in_eop;
  logic [31:0] d_in_data;
  logic [1:0]  d_in_empty;
  logic        d_out_valid, d_out_ready, d_out_sop, d_out_eop;
  logic [31:0] d_out_data;
  logic [1:0]  d_out_empty;
  logic        m_valid, m_ready, m_sop, m_eop;
  logic [63:0] m_data;
  logic [2:0]  m_empty;

  width_adapter_64to32 u_sw_a64to32 (
    .clk, .rst_n,
    .in_valid(sw_vid_out_valid), .in_ready(sw_vid_out_ready), .in_data(sw_vid_out_data),
    .in_sop(sw_vid_out_sop), .in_eop(sw_vid_out_eop), .in_empty(sw_vid_out_empty),
    .out_valid(d_in_valid), .out_ready(d_in_ready), .out_data(d_in_data),
    .out_sop(d_in_sop), .out_eop(d_in_eop), .out_empty(d_in_empty)
  );

  depacketizer u_depacketizer (
    .clk, .rst_n, .cfg_hdr_len(depkt_hdr_len), .cfg_strip_fcs(depkt_strip_fcs),
    .in_valid(d_in_valid), .in_ready(d_in_ready), .in_data(d_in_data),
    .in_sop(d_in_sop), .in_eop(d_in_eop), .in_empty(d_in_empty),
    .out_valid(d_out_valid), .out_ready(d_out_ready), .out_data(d_out_data),
    .out_sop(d_out_sop), .out_eop(d_out_eop), .out_empty(d_out_empty)
  );

  width_adapter_32to64 u_mon_a32to64 (
    .clk, .rst_n,
    .in_valid(d_out_valid), .in_ready(d_out_ready), .in_data(d_out_data),
    .in_sop(d_out_sop), .in_eop(d_out_eop), .in_empty(d_out_empty),
    .out_valid(m_valid), .out_ready(m_ready), .out_data(m_data),
    .out_sop(m_sop), .out_eop(m_eop), .out_empty(m_empty)
  );

  packet_monitor #(.DATA_W(64)) u_monitor (
    .clk, .rst_n, .clear(mon_clear),
    .in_valid(m_valid), .in_ready(m_ready), .in_data(m_data),
    .in_sop(m_sop), .in_eop(m_eop), .in_empty(m_empty),
    .chunk_count(mon_chunk_count), .word_count(mon_word_count),
    .byte_count(mon_byte_count), .framing_errors(mon_framing_errors),
    .last_data(mon_last_data)
  );

  // ---------------- external ports ----------------
  for (genvar p = 0; p < NUM_EXT_PORTS; p++) begin : g_port
    logic        t_valid, t_ready, t_sop, t_eop;
    logic [31:0] t_data;
    logic [1:0]  t_empty;
    logic        r_valid, r_ready, r_sop, r_eop;
    logic [31:0] r_data;
    logic [1:0]  r_empty;

    width_adapter_64to32 u_tx_a64to32 (
      .clk, .rst_n,
      .in_valid(sw_eg_valid[p]), .in_ready(sw_eg_ready[p]), .in_data(sw_eg_data[p]),
      .in_sop(sw_eg_sop[p]), .in_eop(sw_eg_eop[p]), .in_empty(sw_eg_empty[p]),
      .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data),
      .out_sop(t_sop), .out_eop(t_eop), .out_empty(t_empty)
    );

    dual_clock_fifo #(.DEPTH(FIFO_DEPTH), .EOP_GAP(1)) u_tx_fifo (
      .wr_clk(clk), .wr_rst_n(rst_n),
      .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data),
      .in_sop(t_sop), .in_eop(t_eop), .in_empty(t_empty),
      .rd_clk(mac_tx_clk[p]), .rd_rst_n(mac_tx_rst_n[p]),
      .out_valid(mac_tx_valid[p]), .out_ready(mac_tx_ready[p]), .out_data(mac_tx_data[p]),
      .out_sop(mac_tx_sop[p]), .out_eop(mac_tx_eop[p]), .out_empty(mac_tx_empty[p])
    );

    dual_clock_fifo #(.DEPTH(FIFO_DEPTH), .EOP_GAP(0)) u_rx_fifo (
      .wr_clk(mac_rx_clk[p]), .wr_rst_n(mac_rx_rst_n[p]),
      .in_valid(mac_rx_valid[p]), .in_ready(mac_rx_ready[p]), .in_data(mac_rx_data[p]),
      .in_sop(mac_rx_sop[p]), .in_eop(mac_rx_eop[p]), .in_empty(mac_rx_empty[p]),
      .rd_clk(clk), .rd_rst_n(rst_n),
      .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data),
      .out_sop(r_sop), .out_eop(r_eop), .out_empty(r_empty)
    );

    width_adapter_32to64 u_rx_a32to64 (
      .clk, .rst_n,
      .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
      .in_sop(r_sop), .in_eop(r_eop), .in_empty(r_empty),
      .out_valid(sw_in_valid[p]), .out_ready(sw_in_ready[p]), .out_data(sw_in_data[p]),
      .out_sop(sw_in_sop[p]), .out_eop(sw_in_eop[p]), .out_empty(sw_in_empty[p])
    );
  end

endmodule
