// tb_receive_data: self-checking test of receive_data.
//
// A producer sends random packets (every opcode, unknown ones included, with
// small size fields) with random gaps; a consumer takes words with random
// stalls. Every word must come out in order, flagged as header on the first
// word of a packet, with the packet's opcode, and flagged last on the packet's
// final word, where the payload length is worked out here from the header
// fields. The FIFO is also filled with the consumer stopped: in_ready must go
// low after exactly DEPTH words.
module tb_receive_data;
  import c1p_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_header, out_last;
  logic [31:0] in_data, out_data;
  opcode_e out_op;
  int checks = 0, failures = 0;

  receive_data #(.DEPTH(16)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid,
                                  .out_ready, .out_data, .out_header, .out_last, .out_op);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stream: data, header flag, last flag, opcode
  logic [31:0] exp_data [$];
  bit          exp_hdr [$], exp_last [$];
  logic [3:0]  exp_op [$];

  function automatic int payload(input logic [3:0] op, input int a, input int b);
    case (op)
      4'h1: return a * b;
      4'h2: return a + b * ((a + 31) / 32);
      4'h6: return 2 * b;
      default: return 0;
    endcase
  endfunction

  task automatic make_packets(input int n);
    for (int p = 0; p < n; p++) begin
      logic [3:0] op;
      int a, b, len;
      op = 4'($urandom % 16);
      a = $urandom % 40; b = $urandom % 6;
      len = payload(op, a, b);
      exp_data.push_back({op, 14'(a), 14'(b)}); exp_hdr.push_back(1);
      exp_last.push_back(len == 0); exp_op.push_back(op);
      for (int w = 0; w < len; w++) begin
        exp_data.push_back($urandom); exp_hdr.push_back(0);
        exp_last.push_back(w == len - 1); exp_op.push_back(op);
      end
    end
  endtask

  initial begin
    int sent, got, total, full_at;
    in_valid = 0; in_data = 0; out_ready = 0;
    make_packets(300);
    total = exp_data.size();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill with consumer stopped
    full_at = -1;
    for (int w = 0; w < 20; w++) begin
      @(negedge clk);
      if (!in_ready && full_at < 0) full_at = w;
      in_valid = in_ready; in_data = exp_data[w];
      @(posedge clk);
      #1 in_valid = 0;
      if (in_ready == 0 && full_at < 0) full_at = w + 1;
    end
    checks++;
    if (full_at != 16) begin failures++; $display("FAIL full after %0d words", full_at); end
    sent = 16; got = 0;
    while (got < total) begin
      @(negedge clk);
      in_valid = (sent < total) && ($urandom % 4 != 0);
      in_data = (sent < total) ? exp_data[sent] : '0;
      out_ready = ($urandom % 3 != 0);
      @(posedge clk);
      if (out_valid && out_ready) begin
        checks++;
        if (out_data !== exp_data[got] || out_header !== exp_hdr[got] ||
            out_last !== exp_last[got] || 4'(out_op) !== exp_op[got]) begin
          failures++;
          $display("FAIL word %0d: %h h%b l%b op%0d, exp %h h%b l%b op%0d", got, out_data,
                   out_header, out_last, out_op, exp_data[got], exp_hdr[got], exp_last[got], exp_op[got]);
        end
        got++;
      end
      if (in_valid && in_ready) sent++;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
