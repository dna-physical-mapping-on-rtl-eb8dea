// set_constructor: builds one 32-bit block of the column set of a component
// column.
//
// The column set of component column c starts as "all columns" and is
// narrowed by every row of the component: if the row has a 1 in column c,
// the set keeps only the row's own columns (P &= S_row); if it has a 0, the
// row's columns are removed (P &= ~S_row). Starting from all ones makes the
// first 1 equivalent to copying S_row, as the source describes.
// Following the source's set-construction circuit, a 5-bit index selects one
// bit of the current 32-row block of the component column, a 2:1 multiplexer
// picks the row-set block or its inverse, an AND with the partial set P gives
// the new P, and the index is decremented by 1 after every row block.
//
// Interface: 'clear' sets P to all ones and the index to 31. 'col_load'
// latches a new 32-row block of the component column; a row block presented
// in the same cycle already uses it. 'row_valid' applies one row-set block.
// The first row of every 32-row group is bit 31 of its column block (the
// index counts down and wraps from 0 to 31). 'p' is the partial/final set,
// valid one cycle after the last row block. Reset values are this design's.
module set_constructor #(
  parameter int unsigned W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic                 col_load,
  input  logic [W-1:0]         col_in,
  input  logic                 row_valid,
  input  logic [W-1:0]         row_in,
  output logic [W-1:0]         p,
  output logic [$clog2(W)-1:0] index
);

  localparam int unsigned IDX_W = $clog2(W);

  logic [W-1:0]     col_q;
  logic [W-1:0]     col_now;
  logic [W-1:0]     p_base;
  logic [IDX_W-1:0] idx_base;
  logic             sel;
  logic [W-1:0]     row_sel;

  always_comb begin
    col_now  = col_load ? col_in : col_q;
    p_base   = clear ? '1 : p;
    idx_base = clear ? IDX_W'(W - 1) : index;
    sel      = col_now[idx_base];
    row_sel  = sel ? row_in : ~row_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_q <= '0;
      p     <= '1;
      index <= IDX_W'(W - 1);
    end else begin
      if (col_load) col_q <= col_in;
      if (row_valid) begin
        p     <= p_base & row_sel;
        index <= idx_base - IDX_W'(1);
      end else if (clear) begin
        p     <= '1;
        index <= IDX_W'(W - 1);
      end
    end
  end

endmodule
