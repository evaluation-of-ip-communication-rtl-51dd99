// 64 bit to 32 bit packet-stream width adapter.
//
// Each 64 bit input word is sent as two 32 bit output words, the upper half
// (the earlier bytes) first. A last word whose lower half holds no data
// (empty of four or more) is sent as a single 32 bit word, with empty
// reduced by four. The input word is held in one register; in_ready is high
// when that register is free or its last half is being taken, so a steady
// input of one word every second cycle passes without stalls, which is the
// 64 bit rate at half the clock of the 32 bit side.
//
// The document places vendor adapter cores of this function between its
// 64 bit and 32 bit modules; their insides are not given, and this is the
// simplest adapter that does the same job, in a single clock domain.
module width_adapter_64to32 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [63:0] in_data,
  input  logic        in_sop,
  input  logic        in_eop,
  input  logic [2:0]  in_empty,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [31:0] out_data,
  output logic        out_sop,
  output logic        out_eop,
  output logic [1:0]  out_empty
);

  logic [63:0] w;
  logic        w_sop, w_eop, w_valid, half;
  logic [2:0]  w_empty;
  logic        last;

  // the half now on the output is the last of the word
  assign last      = half || (w_eop && w_empty >= 3'd4);
  assign out_valid = w_valid;
  assign out_data  = half ? w[31:0] : w[63:32];
  assign out_sop   = w_sop && !half;
  assign out_eop   = w_eop && last;
  assign out_empty = out_eop ? w_empty[1:0] : 2'd0;
  assign in_ready  = !w_valid || (out_ready && last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w       <= '0;
      w_sop   <= 1'b0;
      w_eop   <= 1'b0;
      w_empty <= '0;
      w_valid <= 1'b0;
      half    <= 1'b0;
    end else begin
      if (in_valid && in_ready) begin
        w       <= in_data;
        w_sop   <= in_sop;
        w_eop   <= in_eop;
        w_empty <= in_eop ? in_empty : 3'd0;
        w_valid <= 1'b1;
        half    <= 1'b0;
      end else if (out_valid && out_ready) begin
        if (last) w_valid <= 1'b0;
        else      half    <= 1'b1;
      end
    end
  end

endmodule
