// Depacketizer: strips the headers from each packet and forwards the payload.
//
// The inverse of the Packetizer. A packet on the 32 bit input stream is
// treated as a byte sequence: its first cfg_hdr_len bytes are header and are
// dropped, and when cfg_strip_fcs is set its last four bytes are taken as the
// frame check sequence and dropped too. What remains is the payload; it
// leaves on the 32 bit output stream packed from the first byte of the first
// word, with the usual start, end and empty markers. Cycles without input
// words produce nothing.
//
// Because cfg_hdr_len need not be a multiple of four, payload bytes are
// collected in a 16 byte accumulator and sent four at a time. A word is only
// sent while more than four bytes (eight when the frame check sequence is
// stripped) are waiting, so the bytes that turn out to be the frame check
// sequence at the end of the packet have not left yet and the last payload
// word can carry the end marker. After an end of packet the remaining bytes
// are flushed, one or two words, during which in_ready is low. A packet with
// no payload bytes produces no output.
//
// Timing: a word accepted in cycle t reaches the registered output no
// earlier than cycle t+2; the stream runs at one word per cycle. The
// configurable header length and the header/payload/checksum distinction
// follow the design description; the accumulator, the hold-back rule and the
// ready/valid handshake are choices of this implementation.
module depacketizer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  cfg_hdr_len,
  input  logic        cfg_strip_fcs,
  // packet in
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [1:0]  in_empty,
  // payload out
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic [1:0]  out_empty
);

  typedef enum logic {S_RUN, S_FLUSH} state_t;

  state_t     state, state_n;
  logic [7:0] acc   [16];
  logic [7:0] acc_n [16];
  logic [4:0] cnt, cnt_n;
  logic [7:0] hdr_left, hdr_left_n;
  logic       first, first_n;
  logic       adv, emit, take;
  logic [31:0] o_data;
  logic       o_eop;
  logic [1:0] o_empty;
  logic [4:0] fcs, base;
  logic [2:0] v, drop;
  logic [7:0] hl;

  assign adv      = !out_valid || out_ready;
  assign in_ready = adv && (state == S_RUN);
  assign take     = in_valid && in_ready;
  assign fcs      = cfg_strip_fcs ? 5'd4 : 5'd0;

  always_comb begin
    state_n    = state;
    acc_n      = acc;
    cnt_n      = cnt;
    hdr_left_n = hdr_left;
    first_n    = first;
    emit       = 1'b0;
    o_data     = {acc[0], acc[1], acc[2], acc[3]};
    o_eop      = 1'b0;
    o_empty    = '0;
    v          = '0;
    drop       = '0;
    hl         = '0;
    base       = cnt;

    if (adv) begin
      // ---- output side ----
      if (state == S_RUN) begin
        emit = (cnt > 5'd4 + fcs);
      end else begin
        emit = 1'b1;
        if (cnt <= 5'd4) begin
          o_eop   = 1'b1;
          o_empty = 2'(5'd4 - cnt);
          state_n = S_RUN;
        end
      end
      if (emit) begin
        for (int i = 0; i < 12; i++) acc_n[i] = acc[i+4];
        base  = (cnt >= 5'd4) ? cnt - 5'd4 : 5'd0;
        cnt_n = base;
        first_n = o_eop;
      end

      // ---- input side ----
      if (take) begin
        v    = in_eop ? 3'd4 - {1'b0, in_empty} : 3'd4;
        hl   = in_sop ? cfg_hdr_len : hdr_left;
        drop = (hl < {5'd0, v}) ? hl[2:0] : v;
        hdr_left_n = hl - {5'd0, drop};
        for (int j = 0; j < 4; j++) begin
          if (j >= int'(drop) && j < int'(v))
            acc_n[4'(int'(base) + j - int'(drop))] = in_data[31-8*j -: 8];
        end
        cnt_n = base + 5'(v - drop);
        if (in_eop) begin
          cnt_n      = (cnt_n > fcs) ? cnt_n - fcs : 5'd0;
          hdr_left_n = cfg_hdr_len;
          if (cnt_n == 5'd0) first_n = 1'b1;  // nothing to send
          else               state_n = S_FLUSH;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_RUN;
      cnt       <= '0;
      hdr_left  <= '0;
      first     <= 1'b1;
      for (int i = 0; i < 16; i++) acc[i] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_empty <= '0;
    end else begin
      state    <= state_n;
      acc      <= acc_n;
      cnt      <= cnt_n;
      hdr_left <= hdr_left_n;
      first    <= first_n;
      if (adv) begin
        out_valid <= emit;
        out_data  <= o_data;
        out_sop   <= emit && first;
        out_eop   <= o_eop;
        out_empty <= o_empty;
      end
    end
  end

endmodule
