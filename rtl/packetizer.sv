// Packetizer: wraps payload chunks into Ethernet + IPv4 packets.
//
// Each payload chunk arriving on the 32 bit input stream leaves as one packet
// on the 32 bit output stream: first the 34 bytes of the configured header
// record (cfg_hdr, see ipcam_pkg), then the payload. The header is treated as
// one bit vector and sent 32 bits at a time without regard to field
// boundaries. Because 34 is not a multiple of four, the ninth output word
// carries the last two header bytes and the first two payload bytes, and from
// then on every output word joins the last two bytes of one payload word with
// the first two of the next. No checksum is computed: the IPv4 header
// checksum is part of the configuration, and the Ethernet frame check
// sequence is left to the MAC.
//
// Payload words are held in a small buffer (BUF_DEPTH words) while the
// header goes out; when it fills, in_ready drops. cfg_hdr is sampled when a
// packet starts and held until its end.
//
// Timing: a payload start accepted in cycle 0 gives the first header word on
// the output in cycle 2; header insertion takes nine output cycles per
// packet, so each packet leaves 8.5 words longer than it came in. The
// latency is the same for every packet of a flow. out_* is registered and
// follows ready/valid: a word moves when valid and ready are both high.
//
// The header record, the bit-vector serialisation, the 32 bit width, the
// two-cycle start latency and the nine-cycle insertion follow the design
// description; the buffer, its depth and the ready/valid handshake are
// choices of this implementation.
module packetizer
  import ipcam_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  eth_ipv4_hdr_t cfg_hdr,
  // payload in
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [31:0]   in_data,
  input  logic          in_sop,
  input  logic          in_eop,
  input  logic [1:0]    in_empty,
  // packet out
  output logic          out_valid,
  input  logic          out_ready,
  output logic [31:0]   out_data,
  output logic          out_sop,
  output logic          out_eop,
  output logic [1:0]    out_empty
);

  localparam int unsigned HDR_BITS = HDR_BYTES * 8;
  localparam int unsigned NFULL    = HDR_BYTES / 4;   // whole header words
  localparam int unsigned R        = HDR_BYTES % 4;   // header bytes in the shared word
  localparam int unsigned AW       = $clog2(BUF_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_PAY, S_TAIL} state_t;

  // ---------------- payload buffer ----------------
  logic [31:0] buf_data [BUF_DEPTH];
  logic        buf_eop  [BUF_DEPTH];
  logic [1:0]  buf_emp  [BUF_DEPTH];
  logic [AW:0] wptr, rptr;
  logic        buf_full, buf_have, in_pkt, wr_en, pop;

  assign buf_full = (wptr[AW] != rptr[AW]) && (wptr[AW-1:0] == rptr[AW-1:0]);
  assign buf_have = (wptr != rptr);
  assign in_ready = !buf_full;
  // words outside a packet (no start seen) are discarded
  assign wr_en    = in_valid && in_ready && (in_sop || in_pkt);

  always_ff @(posedge clk) begin
    if (wr_en) begin
      buf_data[wptr[AW-1:0]] <= in_data;
      buf_eop[wptr[AW-1:0]]  <= in_eop;
      buf_emp[wptr[AW-1:0]]  <= in_eop ? in_empty : 2'd0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr   <= '0;
      rptr   <= '0;
      in_pkt <= 1'b0;
    end else begin
      if (wr_en) begin
        wptr   <= wptr + 1'b1;
        in_pkt <= !in_eop;
      end
      if (pop) rptr <= rptr + 1'b1;
    end
  end

  // ---------------- header / payload sequencer ----------------
  state_t              state, state_n;
  logic [HDR_BITS-1:0] hdr_q;
  logic [$clog2(NFULL+1)-1:0] hcnt, hcnt_n;
  logic [31:0]         res, res_n;      // leftover bytes, right-aligned
  logic [2:0]          rc, rc_n;        // bytes of res carried into the next word
  logic [2:0]          tc, tc_n;        // bytes left for the tail word
  logic                adv, emit, latch_hdr;
  logic [31:0]         o_data;
  logic                o_sop, o_eop;
  logic [1:0]          o_empty;

  logic [31:0] head;
  logic        head_eop;
  logic [2:0]  head_bytes;
  logic [63:0] joined;

  assign head       = buf_data[rptr[AW-1:0]];
  assign head_eop   = buf_eop[rptr[AW-1:0]];
  assign head_bytes = 3'd4 - {1'b0, buf_emp[rptr[AW-1:0]]};
  assign joined     = {res, head};
  assign adv        = !out_valid || out_ready;

  function automatic logic [31:0] hdr_word(input logic [HDR_BITS-1:0] h, input int unsigned k);
    return h[HDR_BITS-1-32*k -: 32];
  endfunction

  // last R header bytes, right-aligned in a word
  function automatic logic [31:0] hdr_tail(input logic [HDR_BITS-1:0] h);
    logic [31:0] t;
    t = '0;
    for (int unsigned i = 0; i < R; i++)
      t[8*i +: 8] = h[8*i +: 8];
    return t;
  endfunction

  always_comb begin
    state_n   = state;
    hcnt_n    = hcnt;
    res_n     = res;
    rc_n      = rc;
    tc_n      = tc;
    emit      = 1'b0;
    pop       = 1'b0;
    latch_hdr = 1'b0;
    o_data    = '0;
    o_sop     = 1'b0;
    o_eop     = 1'b0;
    o_empty   = '0;
    if (adv) begin
      unique case (state)
        S_IDLE: if (buf_have) begin
          emit      = 1'b1;
          o_sop     = 1'b1;
          o_data    = hdr_word(cfg_hdr, 0);
          latch_hdr = 1'b1;
          hcnt_n    = 1;
          state_n   = S_HDR;
        end
        S_HDR: begin
          emit   = 1'b1;
          o_data = hdr_word(hdr_q, 32'(hcnt));
          hcnt_n = hcnt + 1'b1;
          if (32'(hcnt) == NFULL - 1) begin
            res_n   = hdr_tail(hdr_q);
            rc_n    = 3'(R);
            state_n = S_PAY;
          end
        end
        S_PAY: if (buf_have) begin
          emit   = 1'b1;
          pop    = 1'b1;
          o_data = 32'(joined >> (8 * rc));
          res_n  = head;
          if (head_eop) begin
            if (rc + head_bytes <= 3'd4) begin
              o_eop   = 1'b1;
              o_empty = 2'(3'd4 - rc - head_bytes);
              state_n = S_IDLE;
            end else begin
              tc_n    = rc + head_bytes - 3'd4;
              state_n = S_TAIL;
            end
          end
        end
        S_TAIL: begin
          emit    = 1'b1;
          o_data  = res << (8 * (3'd4 - rc));
          o_eop   = 1'b1;
          o_empty = 2'(3'd4 - tc);
          state_n = S_IDLE;
        end
        default: state_n = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      hcnt      <= '0;
      res       <= '0;
      rc        <= '0;
      tc        <= '0;
      hdr_q     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_empty <= '0;
    end else begin
      state <= state_n;
      hcnt  <= hcnt_n;
      res   <= res_n;
      rc    <= rc_n;
      tc    <= tc_n;
      if (latch_hdr) hdr_q <= cfg_hdr;
      if (adv) begin
        out_valid <= emit;
        out_data  <= o_data;
        out_sop   <= o_sop;
        out_eop   <= o_eop;
        out_empty <= o_empty;
      end
    end
  end

  // a word offered downstream stays until taken
  logic        stall_q;
  logic [31:0] stall_data_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stall_q      <= 1'b0;
      stall_data_q <= '0;
    end else begin
      stall_q      <= out_valid && !out_ready;
      stall_data_q <= out_data;
      if (stall_q) assert (out_valid && out_data == stall_data_q)
        else $error("packetizer: output word changed while stalled");
    end
  end

endmodule
