// row_comparator: compares two clone rows of M one 32-bit block pair per cycle.
//
// For each block pair (d1 from row i, d2 from row j) it forms R = d1 & d2 and,
// in parallel, ORs three flags into sticky relation bits and adds popcount(R)
// to a running intersection count:
//   rel[2] = some R != 0           (the rows intersect)
//   rel[1] = some (d1 ^ R) != 0    (row i is not contained in row j)
//   rel[0] = some (d2 ^ R) != 0    (row j is not contained in row i)
// This follows the clone-comparison circuit of the source: AND, XOR and
// not-equal-to-zero units feeding OR-accumulated relation bits, and a 6-bit
// ones counter zero-extended into a 24-bit accumulating adder.
//
// Interface: 'clear' restarts the accumulation for a new pair; when 'valid'
// is also high that cycle the block is the first of the new pair. 'rel' and
// 'count' are the accumulator registers: they hold the result of all blocks
// accepted so far, updated one cycle after each valid block.
// Reset to zero is this design's choice.
module row_comparator #(
  parameter int unsigned W     = 32,
  parameter int unsigned CNT_W = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             valid,
  input  logic [W-1:0]     d1,
  input  logic [W-1:0]     d2,
  output logic [2:0]       rel,
  output logic [CNT_W-1:0] count
);

  localparam int unsigned PC_W = $clog2(W + 1);  // 6 bits for W = 32

  logic [W-1:0]     r_and;
  logic [2:0]       rel_blk;
  logic [PC_W-1:0]  ones;
  logic [2:0]       rel_base;
  logic [CNT_W-1:0] cnt_base;

  always_comb begin
    r_and      = d1 & d2;
    rel_blk[2] = (r_and != '0);
    rel_blk[1] = ((d1 ^ r_and) != '0);
    rel_blk[0] = ((d2 ^ r_and) != '0);
    ones = '0;
    for (int b = 0; b < int'(W); b++) ones += PC_W'(r_and[b]);
    rel_base = clear ? 3'b000 : rel;
    cnt_base = clear ? '0 : count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel   <= '0;
      count <= '0;
    end else if (valid) begin
      rel   <= rel_base | rel_blk;
      count <= cnt_base + CNT_W'(ones);
    end else if (clear) begin
      rel   <= '0;
      count <= '0;
    end
  end

endmodule
