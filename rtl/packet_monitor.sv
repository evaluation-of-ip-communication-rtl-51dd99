// Packet monitor: counts the payload that arrives on the receive path.
//
// Sits where the image chain would take return video. It accepts every word
// of a 64 bit packet stream (in_ready is always high) and counts the payload
// chunks (one per end of packet), the words and the payload bytes received,
// using the empty field of the last word. It also counts words that arrive
// outside a chunk or a start inside one, as framing errors; a word outside a
// chunk does not open one. All counters are
// readable at any time and cleared by reset or by the clear input.
//
// Counting received payload chunks follows the design description; the
// word, byte and framing-error counters and the widths are choices of this
// implementation.
module packet_monitor #(
  parameter int unsigned DATA_W = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [DATA_W-1:0] in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [$clog2(DATA_W/8)-1:0] in_empty,
  output logic [31:0] chunk_count,
  output logic [47:0] word_count,
  output logic [47:0] byte_count,
  output logic [31:0] framing_errors,
  output logic [DATA_W-1:0] last_data
);

  localparam int unsigned NB = DATA_W / 8;

  logic in_chunk;

  assign in_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chunk_count    <= '0;
      word_count     <= '0;
      byte_count     <= '0;
      framing_errors <= '0;
      in_chunk       <= 1'b0;
      last_data      <= '0;
    end else if (clear) begin
      chunk_count    <= '0;
      word_count     <= '0;
      byte_count     <= '0;
      framing_errors <= '0;
      in_chunk       <= 1'b0;
    end else if (in_valid) begin
      last_data  <= in_data;
      word_count <= word_count + 1'b1;
      byte_count <= byte_count + 48'(NB) - (in_eop ? 48'(in_empty) : 48'd0);
      if (in_sop == in_chunk) framing_errors <= framing_errors + 1'b1;
      if (in_eop) chunk_count <= chunk_count + 1'b1;
      in_chunk <= in_sop ? !in_eop : (in_chunk && !in_eop);
    end
  end

endmodule
