// tb_set_constructor: self-checking test of set_constructor.
//
// For random components (1 to 100 rows) it streams one row-set block per
// cycle, loads a new 32-row column block every 32 rows (first row = bit 31),
// and compares the final set block with the intersection, computed here, of
// S_row for rows with a 1 and ~S_row for rows with a 0. The example component
// of two rows {1,2,4,5,7,9} and {2,...,9} is checked against its column sets
// {1}, {2,4,5,7,9} and {3,6,8}. The index is checked to count down and wrap.
module tb_set_constructor;
  logic clk = 0, rst_n = 0;
  logic clear, col_load, row_valid;
  logic [31:0] col_in, row_in, p;
  logic [4:0]  index;
  int checks = 0, failures = 0;

  set_constructor dut (.clk, .rst_n, .clear, .col_load, .col_in, .row_valid, .row_in, .p, .index);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] rows [128];
  logic        colbit [128];

  task automatic run_col(input int n, input logic [31:0] expect_p, input string tag);
    logic [31:0] cw;
    for (int k = 0; k < n; k++) begin
      if (k % 32 == 0) begin
        cw = '0;
        for (int q = 0; q < 32 && k + q < n; q++) cw[31 - q] = colbit[k + q];
        col_load <= 1; col_in <= cw;
      end else begin
        col_load <= 0; col_in <= $urandom;  // ignored when not loading
      end
      clear <= (k == 0); row_valid <= 1; row_in <= rows[k];
      @(posedge clk);
    end
    col_load <= 0; row_valid <= 0; clear <= 0;
    @(posedge clk); #1;
    checks++;
    if (p !== expect_p) begin
      failures++;
      $display("FAIL %s: p=%h exp %h", tag, p, expect_p);
    end
    checks++;
    if (index !== 5'(31 - n)) begin
      failures++;
      $display("FAIL %s: index=%0d exp %0d", tag, index, 5'(31 - n));
    end
  endtask

  initial begin
    logic [31:0] e;
    clear = 0; col_load = 0; row_valid = 0; col_in = 0; row_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // example component: l1 = {1,2,4,5,7,9}, l2 = {2,...,9}; column k at bit k-1
    rows[0] = 32'b1_0101_1011; rows[1] = 32'b1_1111_1110;
    colbit[0] = 1; colbit[1] = 0; run_col(2, 32'b0_0000_0001, "example {1}");
    colbit[0] = 1; colbit[1] = 1; run_col(2, 32'b1_0101_1010, "example {2,4,5,7,9}");
    colbit[0] = 0; colbit[1] = 1; run_col(2, 32'b0_1010_0100, "example {3,6,8}");
    for (int t = 0; t < 400; t++) begin
      int n;
      n = 1 + ($urandom % 100);
      e = '1;
      for (int k = 0; k < n; k++) begin
        rows[k] = $urandom | $urandom;
        colbit[k] = ($urandom % 3) != 0;
        if (t % 5 == 0) colbit[k] = 1;
        e &= colbit[k] ? rows[k] : ~rows[k];
      end
      run_col(n, e, $sformatf("random %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
