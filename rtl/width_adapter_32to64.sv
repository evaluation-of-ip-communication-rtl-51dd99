// 32 bit to 64 bit packet-stream width adapter.
//
// Pairs of 32 bit input words are packed into one 64 bit output word, the
// first word into the upper half. An end of packet on the first word of a
// pair closes the output word early, with empty increased by four; a start
// of packet always begins a new pair. The output word is registered;
// in_ready is high while the output register is free or being taken, so the
// adapter accepts a 32 bit word every cycle and emits a 64 bit word every
// second cycle.
//
// The document places vendor adapter cores of this function between its
// 32 bit and 64 bit modules; their insides are not given, and this is the
// simplest adapter that does the same job, in a single clock domain.
module width_adapter_32to64 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [1:0]  in_empty,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [63:0] out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic [2:0]  out_empty
);

  logic [31:0] hi;
  logic        hi_sop, have_hi;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi        <= '0;
      hi_sop    <= 1'b0;
      have_hi   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_empty <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (have_hi && !in_sop) begin
          out_valid <= 1'b1;
          out_data  <= {hi, in_data};
          out_sop   <= hi_sop;
          out_eop   <= in_eop;
          out_empty <= in_eop ? {1'b0, in_empty} : 3'd0;
          have_hi   <= 1'b0;
        end else if (in_eop) begin
          out_valid <= 1'b1;
          out_data  <= {in_data, 32'd0};
          out_sop   <= in_sop;
          out_eop   <= 1'b1;
          out_empty <= 3'd4 + {1'b0, in_empty};
          have_hi   <= 1'b0;
        end else begin
          hi      <= in_data;
          hi_sop  <= in_sop;
          have_hi <= 1'b1;
        end
      end
    end
  end

endmodule
