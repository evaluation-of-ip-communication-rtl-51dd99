// Self-checking testbench for the packet monitor.
//
// Feeds random 64 bit chunks with random gaps and compares the chunk, word
// and byte counters with totals kept here after every chunk; then sends a word outside any
// chunk and a start inside a chunk, which must count as two framing errors,
// and checks that clear resets every counter.
// Chunk counting follows the design description; the other counters and
// the traffic are choices of this bench and of the monitor.
module tb_packet_monitor;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        clear, in_valid, in_ready, in_sop, in_eop;
  logic [63:0] in_data, last_data;
  logic [2:0]  in_empty;
  logic [31:0] chunk_count, framing_errors;
  logic [47:0] word_count, byte_count;

  packet_monitor dut (.clk, .rst_n, .clear, .in_valid, .in_ready, .in_data, .in_sop,
    .in_eop, .in_empty, .chunk_count, .word_count, .byte_count, .framing_errors, .last_data);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic word(input bit sop, input bit eop, input int empty, input logic [63:0] d);
    in_valid = 1'b1; in_sop = sop; in_eop = eop; in_empty = 3'(empty); in_data = d;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    longint chunks = 0, words = 0, bytes = 0;
    int len, nw;
    logic [63:0] d;
    clear = 0; in_valid = 0; in_sop = 0; in_eop = 0; in_empty = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(in_ready, "always ready");
    for (int k = 0; k < 200; k++) begin
      len = int'($urandom_range(200, 1));
      nw = (len + 7) / 8;
      for (int w = 0; w < nw; w++) begin
        d = {$urandom, $urandom};
        word(w == 0, w == nw - 1, (w == nw - 1) ? 8*nw - len : 0, d);
        if ($urandom_range(3) == 0) @(negedge clk);
      end
      chunks++; words += nw; bytes += len;
      check(chunk_count == 32'(chunks) && word_count == 48'(words) && byte_count == 48'(bytes)
            && last_data == d, $sformatf("counters after chunk %0d", k));
    end
    check(chunk_count == 32'(chunks), $sformatf("chunks %0d vs %0d", chunk_count, chunks));
    check(word_count == 48'(words), "words");
    check(byte_count == 48'(bytes), $sformatf("bytes %0d vs %0d", byte_count, bytes));
    check(last_data == d, "last word kept");
    check(framing_errors == 0, "no framing errors");
    word(1'b0, 1'b0, 0, 64'h1);   // outside a chunk
    word(1'b1, 1'b0, 0, 64'h2);   // starts a chunk
    word(1'b1, 1'b1, 0, 64'h3);   // start inside a chunk
    check(framing_errors == 2, "two framing errors");
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(chunk_count == 0 && word_count == 0 && byte_count == 0 && framing_errors == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
