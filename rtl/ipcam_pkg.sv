// Shared types and constants of the camera IP-networking datapath.
//
// All packet streams in this design carry bytes in network order: the first
// byte of a word sits in the most significant bits. A stream word comes with
// start-of-packet, end-of-packet and an "empty" count giving how many bytes of
// the last word carry no data. The 32 bit side matches the Packetizer and MAC
// interfaces, the 64 bit side the generator, monitor and switch ports.
//
// eth_ipv4_hdr_t is the header record the Packetizer prepends: a 14 byte
// Ethernet header and a 20 byte IPv4 header with no options, 34 bytes in all.
// The field layout is that of the Ethernet and IPv4 standards; adding a
// header (UDP, RTP, HBRMT) means adding fields here.
package ipcam_pkg;

  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [15:0] ethertype;
    logic [3:0]  version;
    logic [3:0]  ihl;
    logic [5:0]  dscp;
    logic [1:0]  ecn;
    logic [15:0] total_len;
    logic [15:0] ident;
    logic [2:0]  flags;
    logic [12:0] frag_off;
    logic [7:0]  ttl;
    logic [7:0]  protocol;
    logic [15:0] hdr_cksum;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
  } eth_ipv4_hdr_t;

  localparam int unsigned HDR_BYTES = $bits(eth_ipv4_hdr_t) / 8;  // 34

  // DiffServ code points used by the evaluation
  localparam logic [5:0] DSCP_EF = 6'd46;  // Expedited Forwarding
  localparam logic [5:0] DSCP_BE = 6'd0;   // Best Effort

  // payload content of the test data generator
  typedef enum logic [1:0] {
    GEN_INCR   = 2'd0,  // incrementing byte values
    GEN_RANDOM = 2'd1,  // pseudo-random words
    GEN_FIXED  = 2'd2   // a fixed 64 bit pattern, repeated
  } gen_mode_t;

endpackage
