// Dual-clock FIFO for a 32 bit packet stream.
//
// Carries stream words (data, start, end, empty) from the write clock domain
// to the read clock domain. Write and read pointers are kept in Gray code and
// passed to the other domain through two-flop synchronisers, so full and
// empty are conservative: a word becomes visible on the read side a few read
// clocks after it is written. The read side is first-word-fall-through:
// out_valid is high whenever a word is available and the word is taken when
// out_ready is high too. in_ready is low while the FIFO is full.
//
// EOP_GAP read cycles are left idle after each word that ends a packet. The
// MAC transmit interface of the design needs one such cycle to append its
// checksum, so the FIFOs in front of the MACs use EOP_GAP = 1; elsewhere it
// is 0.
//
// The document uses a vendor dual-clock FIFO here and gives neither its depth
// nor its insides; this is a plain Gray-pointer FIFO with an assumed depth.
module dual_clock_fifo #(
  parameter int unsigned DEPTH   = 64,
  parameter int unsigned EOP_GAP = 0
) (
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [1:0]  in_empty,
  input  logic        rd_clk,
  input  logic        rd_rst_n,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic [1:0]  out_empty
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned GW = (EOP_GAP > 0) ? $clog2(EOP_GAP + 1) : 1;

  typedef struct packed {
    logic [31:0] data;
    logic        sop;
    logic        eop;
    logic [1:0]  empty;
  } word_t;

  word_t mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] wbin, wgray, rgray_w1, rgray_w2, rbin_w;
  logic [AW:0] rbin, rgray, wgray_r1, wgray_r2;
  logic        full, wr_en;

  assign rbin_w   = gray2bin(rgray_w2);
  assign full     = (wbin[AW] != rbin_w[AW]) && (wbin[AW-1:0] == rbin_w[AW-1:0]);
  assign in_ready = !full;
  assign wr_en    = in_valid && !full;

  always_ff @(posedge wr_clk) begin
    if (wr_en) mem[wbin[AW-1:0]] <= '{data: in_data, sop: in_sop, eop: in_eop, empty: in_empty};
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  // ---------------- read domain ----------------
  logic [GW-1:0] gap;
  logic        empty, rd_en;
  word_t       head;

  assign empty     = (rgray == wgray_r2);
  assign head      = mem[rbin[AW-1:0]];
  assign out_valid = !empty && (gap == '0);
  assign out_data  = head.data;
  assign out_sop   = head.sop;
  assign out_eop   = head.eop;
  assign out_empty = head.empty;
  assign rd_en     = out_valid && out_ready;

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
      gap      <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (gap != '0) gap <= gap - 1'b1;
      if (rd_en) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
        if (head.eop) gap <= GW'(EOP_GAP);
      end
    end
  end

endmodule
