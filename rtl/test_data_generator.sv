// Test data generator: stands in for the camera's image chain.
//
// Produces payload chunks on a 64 bit packet stream. Every chunk is
// cfg_len bytes long. Its first twelve bytes come from two 48 bit address
// registers (cfg_dst_addr, then cfg_src_addr); in an IP setting they are read
// as layer-4 header fields, for example UDP ports, length and checksum. The
// remaining bytes are content selected by cfg_mode:
//   GEN_INCR    byte k of the content has the value k mod 256
//   GEN_RANDOM  each 64 bit word position holds one step of a 64 bit
//               xorshift generator (x ^= x<<13; x ^= x>>7; x ^= x<<17),
//               seeded with cfg_pattern at start and running on across chunks
//   GEN_FIXED   byte k of the content is byte k mod 8 of cfg_pattern, so
//               every chunk is identical and its layer-4 checksum static
// After each chunk the generator pauses cfg_gap cycles before the next, which
// sets the data rate. A cfg_start pulse begins a run of cfg_num_pkts chunks
// (0: endless); cfg_stop ends the run after the current chunk. cfg_len,
// cfg_mode and cfg_gap are sampled at the start of each chunk.
//
// Timing: out_valid is high for every word of a chunk and a word advances
// when out_ready is high, so with out_ready held high a chunk of L bytes
// takes ceil(L/8) cycles followed by exactly cfg_gap idle cycles (chunks
// follow back to back when cfg_gap is 0). out_pkt_count
// counts finished chunks.
//
// The twelve address bytes, the three content modes and the pause after each
// chunk follow the design description; the generator's insides, the random
// number generator and the control pulses are choices of this
// implementation.
module test_data_generator
  import ipcam_pkg::*;
#(
  parameter int unsigned DATA_W = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_start,
  input  logic        cfg_stop,
  input  logic [31:0] cfg_num_pkts,
  input  logic [15:0] cfg_len,
  input  gen_mode_t   cfg_mode,
  input  logic [63:0] cfg_pattern,
  input  logic [47:0] cfg_dst_addr,
  input  logic [47:0] cfg_src_addr,
  input  logic [15:0] cfg_gap,
  output logic        busy,
  output logic [31:0] out_pkt_count,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic [$clog2(DATA_W/8)-1:0] out_empty
);

  localparam int unsigned NB = DATA_W / 8;
  localparam int unsigned EW = $clog2(NB);

  typedef enum logic [1:0] {S_IDLE, S_SEND, S_GAP} state_t;

  state_t      state;
  logic        run, endless, stop_req;
  logic [31:0] remaining;
  logic [15:0] len_q, gap_q, gcnt;
  gen_mode_t   mode_q;
  logic [12:0] wcnt;            // word within the chunk
  logic [12:0] last_w;
  logic [63:0] rng;
  logic [15:0] byte_idx;

  function automatic logic [63:0] xs64(input logic [63:0] x);
    logic [63:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 7);
    y = y ^ (y << 17);
    return y;
  endfunction

  assign busy      = run || (state != S_IDLE);
  assign last_w    = 13'((len_q + 16'(NB - 1)) / 16'(NB)) - 1'b1;
  assign out_valid = (state == S_SEND);
  assign out_sop   = out_valid && (wcnt == '0);
  assign out_eop   = out_valid && (wcnt == last_w);
  assign out_empty = out_eop ? EW'(16'(NB) * 16'(last_w + 1'b1) - len_q) : '0;

  always_comb begin
    for (int p = 0; p < int'(NB); p++) begin
      byte_idx = 16'(int'(wcnt) * int'(NB) + p);
      if (byte_idx < 16'd6)
        out_data[DATA_W-1-8*p -: 8] = cfg_dst_addr[47-8*byte_idx -: 8];
      else if (byte_idx < 16'd12)
        out_data[DATA_W-1-8*p -: 8] = cfg_src_addr[47-8*(byte_idx-6) -: 8];
      else begin
        unique case (mode_q)
          GEN_INCR:   out_data[DATA_W-1-8*p -: 8] = 8'(byte_idx - 16'd12);
          GEN_RANDOM: out_data[DATA_W-1-8*p -: 8] = rng[63-8*(p%8) -: 8];
          default:    out_data[DATA_W-1-8*p -: 8] = cfg_pattern[63-8*((byte_idx-16'd12)%8) -: 8];
        endcase
      end
      if (byte_idx >= len_q) out_data[DATA_W-1-8*p -: 8] = 8'd0;
    end
  end

  // begin the next chunk, sampling its settings
  task automatic launch();
    len_q  <= (cfg_len == '0) ? 16'd1 : cfg_len;
    mode_q <= cfg_mode;
    gap_q  <= cfg_gap;
    wcnt   <= '0;
    state  <= S_SEND;
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      run           <= 1'b0;
      endless       <= 1'b0;
      stop_req      <= 1'b0;
      remaining     <= '0;
      len_q         <= 16'd1;
      gap_q         <= '0;
      gcnt          <= '0;
      mode_q        <= GEN_INCR;
      wcnt          <= '0;
      rng           <= 64'h1;
      out_pkt_count <= '0;
    end else begin
      if (cfg_start) begin
        run           <= 1'b1;
        endless       <= (cfg_num_pkts == '0);
        remaining     <= cfg_num_pkts;
        stop_req      <= 1'b0;
        out_pkt_count <= '0;
        rng           <= (cfg_pattern == '0) ? 64'h1 : cfg_pattern;
      end else if (cfg_stop) begin
        stop_req <= 1'b1;
      end
      unique case (state)
        S_IDLE: begin
          if (run && !cfg_start) begin
            if (stop_req || (!endless && remaining == '0)) begin
              run <= 1'b0;
            end else begin
              launch();
            end
          end
        end
        S_SEND: if (out_ready) begin
          if (mode_q == GEN_RANDOM) rng <= xs64(rng);
          if (wcnt == last_w) begin
            out_pkt_count <= out_pkt_count + 1'b1;
            if (!endless) remaining <= remaining - 1'b1;
            gcnt <= gap_q;
            if (stop_req || cfg_stop || (!endless && remaining == 32'd1)) state <= S_IDLE;
            else if (gap_q == '0) launch();
            else state <= S_GAP;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        S_GAP: begin
          gcnt <= gcnt - 1'b1;
          if (gcnt == 16'd1) begin
            if (stop_req || cfg_stop) state <= S_IDLE;
            else launch();
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
