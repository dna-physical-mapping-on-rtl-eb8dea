// tb_send_data: self-checking test of send_data.
//
// Random one- and two-word records are offered with random gaps while the
// receiving side stalls at random. The output stream must carry every
// record's words in order (first word, then second word of two-word
// records), rec_ready must drop once DEPTH records wait with the output
// stopped, and words_sent must equal the number of words delivered.
module tb_send_data;
  import c1p_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rec_valid, rec_ready, rec_two, out_valid, out_ready;
  logic [31:0] rec_w0, rec_w1, out_data, words_sent;
  int checks = 0, failures = 0;

  send_data #(.DEPTH(8)) dut (.clk, .rst_n, .rec_valid, .rec_ready, .rec_two, .rec_w0, .rec_w1,
                              .out_valid, .out_ready, .out_data, .words_sent);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] exp_words [$];

  initial begin
    int nrec, got, accepted;
    rec_valid = 0; rec_two = 0; rec_w0 = 0; rec_w1 = 0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill with output stopped: 8 records accepted, the 9th refused
    accepted = 0;
    for (int r = 0; r < 10; r++) begin
      @(negedge clk);
      rec_valid = 1; rec_two = r[0]; rec_w0 = $urandom; rec_w1 = $urandom;
      @(posedge clk);
      if (rec_ready) begin
        accepted++;
        exp_words.push_back(rec_w0);
        if (rec_two) exp_words.push_back(rec_w1);
      end
      #1 rec_valid = 0;
    end
    checks++;
    if (accepted != 8) begin failures++; $display("FAIL accepted %0d records while stalled", accepted); end
    nrec = 0; got = 0;
    while (nrec < 500 || got < exp_words.size()) begin
      @(negedge clk);
      rec_valid = (nrec < 500) && ($urandom % 2 == 0);
      rec_two = $urandom % 2; rec_w0 = $urandom; rec_w1 = $urandom;
      out_ready = ($urandom % 3 != 0);
      @(posedge clk);
      if (rec_valid && rec_ready) begin
        nrec++;
        exp_words.push_back(rec_w0);
        if (rec_two) exp_words.push_back(rec_w1);
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== exp_words[got]) begin
          failures++;
          $display("FAIL word %0d: %h exp %h", got, out_data, exp_words[got]);
        end
        got++;
      end
      #1;
    end
    checks++;
    if (words_sent !== 32'(got)) begin failures++; $display("FAIL words_sent %0d exp %0d", words_sent, got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
