// tb_c1p_control: self-checking test of c1p_control, connected to the real
// compare and construct engines and four bank models, with framed command
// words driven directly (header/last/opcode flags computed here) and result
// records taken directly, with random hold-off on rec_ready.
//
// Checks: the bank layout written by the load commands (block b of row r at
// word r*HB + b/2 of bank b%2; row indexes at bank 3 word k; column words at
// consecutive bank 2 words); demand comparison records; the complete
// comparison returning only intersecting pairs, in order, then the record
// count; set-construction words forwarded and counted; records held stable
// while rec_ready is low; unknown opcodes dropped.
module tb_c1p_control;
  import c1p_pkg::*;
  localparam int DEPTH = 8192;
  localparam int NR = 12, NB = 3;
  logic clk = 0, rst_n = 0;
  logic rx_valid, rx_ready, rx_header, rx_last;
  logic [31:0] rx_data;
  opcode_e rx_op;
  logic cmp_start, cmp_done, cmp_ext_clear, cmp_ext_valid, cmp_busy;
  logic [ROW_W-1:0] cmp_row_i, cmp_row_j, cst_ncrows, cst_ncols;
  logic [BLK_W-1:0] cmp_nblk, cst_nblk;
  logic [2:0] cmp_rel;
  logic [CNT_W-1:0] cmp_count;
  logic [31:0] cmp_ext_d1, cmp_ext_d2, cst_out_data, rec_w0, rec_w1;
  bank_req_t cmp_req0, cmp_req1, cst_req0, cst_req1, cst_req2, cst_req3;
  logic cst_start, cst_done, cst_out_valid, cst_out_ready, cst_busy;
  logic rec_valid, rec_ready, rec_two, busy;
  bank_req_t [NBANKS-1:0] bank_req;
  logic [NBANKS-1:0][31:0] bank_rdata;
  int checks = 0, failures = 0;

  c1p_control dut (.*);
  compare_engine u_cmp (.clk, .rst_n, .start(cmp_start), .row_i(cmp_row_i), .row_j(cmp_row_j),
    .nblk(cmp_nblk), .busy(cmp_busy), .done(cmp_done), .rel(cmp_rel), .count(cmp_count),
    .ext_clear(cmp_ext_clear), .ext_valid(cmp_ext_valid), .ext_d1(cmp_ext_d1), .ext_d2(cmp_ext_d2),
    .req0(cmp_req0), .req1(cmp_req1), .rdata0(bank_rdata[0]), .rdata1(bank_rdata[1]));
  construct_engine u_cst (.clk, .rst_n, .start(cst_start), .ncrows(cst_ncrows), .ncols(cst_ncols),
    .nblk(cst_nblk), .busy(cst_busy), .done(cst_done), .out_valid(cst_out_valid),
    .out_data(cst_out_data), .out_ready(cst_out_ready), .req0(cst_req0), .req1(cst_req1),
    .req2(cst_req2), .req3(cst_req3), .rdata0(bank_rdata[0]), .rdata1(bank_rdata[1]),
    .rdata2(bank_rdata[2]), .rdata3(bank_rdata[3]));
  for (genvar g = 0; g < NBANKS; g++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH)) bank (.clk, .req(bank_req[g]), .rdata(bank_rdata[g]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // framed words to send: data, header, last, op
  typedef struct { logic [31:0] d; bit h; bit l; opcode_e op; } fw_t;
  fw_t rxq [$];
  logic [31:0] expq [$];
  int held = 0;

  task automatic packet(input opcode_e op, input int a, input int b, input logic [31:0] pl [$]);
    rxq.push_back('{{op, ROW_W'(a), ROW_W'(b)}, 1, pl.size() == 0, op});
    foreach (pl[w]) rxq.push_back('{pl[w], 0, w == pl.size() - 1, op});
  endtask

  always @(negedge clk) begin
    rx_valid  <= rxq.size() > 0;
    rx_data   <= rxq.size() > 0 ? rxq[0].d : '0;
    rx_header <= rxq.size() > 0 ? rxq[0].h : 1'b0;
    rx_last   <= rxq.size() > 0 ? rxq[0].l : 1'b0;
    rx_op     <= rxq.size() > 0 ? rxq[0].op : OP_NOP;
    rec_ready <= ($urandom % 3 != 0);
  end

  logic [31:0] last_w0, last_w1;
  bit          waiting = 0;
  always @(posedge clk) if (rst_n) begin
    if (rx_valid && rx_ready) void'(rxq.pop_front());
    if (rec_valid && !rec_ready && dut.state != dut.S_CST_RUN) begin
      if (waiting && (rec_w0 !== last_w0 || rec_w1 !== last_w1)) begin
        failures++; $display("FAIL record changed while held");
      end
      waiting = 1; last_w0 = rec_w0; last_w1 = rec_w1; held++;
    end else waiting = 0;
    if (rec_valid && rec_ready) begin
      checks++;
      if (expq.size() == 0 || rec_w0 !== expq[0]) begin
        failures++; $display("FAIL rec_w0 %h exp %h", rec_w0, expq.size() ? expq[0] : 0);
      end
      if (expq.size()) void'(expq.pop_front());
      if (rec_two) begin
        checks++;
        if (expq.size() == 0 || rec_w1 !== expq[0]) begin
          failures++; $display("FAIL rec_w1 %h exp %h", rec_w1, expq.size() ? expq[0] : 0);
        end
        if (expq.size()) void'(expq.pop_front());
      end
    end
  end

  task automatic wait_done();
    int quiet;
    quiet = 0;
    while (quiet < 6) begin
      @(posedge clk);
      if (rxq.size() == 0 && expq.size() == 0 && !busy) quiet++; else quiet = 0;
    end
  endtask

  logic [31:0] m [NR][NB];
  logic [31:0] none [$];

  function automatic void rp(input int i, input int j, output logic [2:0] rel, output int cnt);
    rel = 0; cnt = 0;
    for (int b = 0; b < NB; b++) begin
      if ((m[i][b] & m[j][b]) != 0) rel[2] = 1;
      if ((m[i][b] & ~m[j][b]) != 0) rel[1] = 1;
      if ((m[j][b] & ~m[i][b]) != 0) rel[0] = 1;
      cnt += $countones(m[i][b] & m[j][b]);
    end
  endfunction

  initial begin
    logic [31:0] pl [$];
    logic [2:0] rel;
    int cnt, nrec;
    rx_valid = 0; rx_header = 0; rx_last = 0; rx_data = 0; rx_op = OP_NOP; rec_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load M
    pl = {};
    for (int r = 0; r < NR; r++) for (int b = 0; b < NB; b++) begin
      m[r][b] = (r % 4 == 1) ? 32'h0 : ($urandom & $urandom & $urandom);
      pl.push_back(m[r][b]);
    end
    packet(OP_LOAD_M, NR, NB, pl);
    wait_done();
    for (int r = 0; r < NR; r++) for (int b = 0; b < NB; b++) begin
      checks++;
      if ((b % 2 == 0 ? g_bank[0].bank.mem[r * 2 + b / 2] : g_bank[1].bank.mem[r * 2 + b / 2]) !== m[r][b]) begin
        failures++; $display("FAIL bank layout row %0d block %0d", r, b);
      end
    end
    // demand comparisons
    for (int t = 0; t < 10; t++) begin
      int i, j;
      i = $urandom % NR; j = $urandom % NR;
      rp(i, j, rel, cnt);
      packet(OP_CMP_PAIR, i, j, none);
      expq.push_back({TAG_PAIR, ROW_W'(i), ROW_W'(j)});
      expq.push_back({5'd0, rel, CNT_W'(cnt)});
    end
    packet(opcode_e'(4'hE), 3, 3, none);   // dropped
    wait_done();
    // complete comparison
    nrec = 0;
    packet(OP_CMP_ALL, 0, 0, none);
    for (int i = 0; i < NR; i++) for (int j = i + 1; j < NR; j++) begin
      rp(i, j, rel, cnt);
      if (rel[2]) begin
        expq.push_back({TAG_PAIR, ROW_W'(i), ROW_W'(j)});
        expq.push_back({5'd0, rel, CNT_W'(cnt)});
        nrec++;
      end
    end
    expq.push_back({TAG_DONE, 28'(nrec)});
    wait_done();
    checks++;
    if (nrec == 0 || nrec == NR * (NR - 1) / 2) begin failures++; $display("FAIL no filtering exercised"); end
    // component: rows 2,5,7; two columns
    pl = {32'd2, 32'd5, 32'd7, 32'hA000_0000, 32'h6000_0000};
    packet(OP_LOAD_COMP, 3, 2, pl);
    wait_done();
    checks++;
    if (g_bank[3].bank.mem[1] !== 32'd5 || g_bank[2].bank.mem[1] !== 32'h6000_0000) begin
      failures++; $display("FAIL component layout");
    end
    packet(OP_CONSTRUCT, 0, 0, none);
    for (int b = 0; b < NB; b++) expq.push_back(m[2][b] & ~m[5][b] & m[7][b]);
    for (int b = 0; b < NB; b++) expq.push_back(~m[2][b] & m[5][b] & m[7][b]);
    expq.push_back({TAG_DONE, 28'(2 * NB)});
    wait_done();
    checks++;
    if (held == 0) begin failures++; $display("FAIL rec_ready never held a record"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
