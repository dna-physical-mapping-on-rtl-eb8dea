// c1p_pkg: types and constants shared by the consecutive-ones accelerator.
//
// The accelerator works on rows of a binary clone/probe matrix M cut into
// 32-bit blocks, the block width used by the clone comparator and the set
// constructor. Matrix, component and row-index data live in external
// synchronous SRAM banks of 2 MB (512K x 32-bit words). Commands from the
// host are 32-bit words; the header layout, opcodes and result tags below are
// this design's own encoding (the source names the operations, not a wire
// format):
//   header = {op[3:0], a[13:0], b[13:0]}
//   OP_LOAD_M      a = rows, b = blocks per row; payload rows*blocks words, row-major
//   OP_LOAD_COMP   a = component rows, b = component columns; payload a row
//                  indexes, then b*ceil(a/32) column words (column-major,
//                  component row k is bit 31-(k mod 32) of word k/32)
//   OP_CMP_PAIR    a = row i, b = row j (rows already in the banks)
//   OP_CMP_ALL     compare every pair i<j of the loaded matrix
//   OP_CONSTRUCT   build the column sets of the loaded component
//   OP_CMP_STREAM  b = blocks per row; payload 2*b words i0,j0,i1,j1,...
package c1p_pkg;

  localparam int unsigned DATA_W = 32;  // block width
  localparam int unsigned ADDR_W = 19;  // 2 MB bank / 4-byte words
  localparam int unsigned ROW_W  = 14;  // row / column index width
  localparam int unsigned BLK_W  = 8;   // blocks per row, up to 128 (4096 columns)
  localparam int unsigned CNT_W  = 24;  // intersection counter width
  localparam int unsigned NBANKS = 4;   // banks used: M even, M odd, component, row index

  localparam int unsigned BANK_M_EVEN = 0;
  localparam int unsigned BANK_M_ODD  = 1;
  localparam int unsigned BANK_COMP   = 2;
  localparam int unsigned BANK_IDX    = 3;

  typedef enum logic [3:0] {
    OP_NOP        = 4'h0,
    OP_LOAD_M     = 4'h1,
    OP_LOAD_COMP  = 4'h2,
    OP_CMP_PAIR   = 4'h3,
    OP_CMP_ALL    = 4'h4,
    OP_CONSTRUCT  = 4'h5,
    OP_CMP_STREAM = 4'h6
  } opcode_e;

  // Tags in the top nibble of result words (row indexes are 14 bits, so a
  // pair word never carries TAG_DONE).
  localparam logic [3:0] TAG_PAIR = 4'h1;
  localparam logic [3:0] TAG_DONE = 4'hD;

  // Relation bits of a clone comparison (Fig. 2 output numbering).
  localparam int unsigned REL_INTERSECT = 2;  // S_i and S_j share a column
  localparam int unsigned REL_I_NOT_IN_J = 1; // S_i has a column outside S_j
  localparam int unsigned REL_J_NOT_IN_I = 0; // S_j has a column outside S_i

  typedef struct packed {
    logic              en;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bank_req_t;

  typedef struct packed {
    logic [3:0]       op;
    logic [ROW_W-1:0] a;
    logic [ROW_W-1:0] b;
  } header_t;

  localparam bank_req_t BANK_IDLE = '{en: 1'b0, we: 1'b0, addr: '0, wdata: '0};

  function automatic bank_req_t bank_read(input logic [ADDR_W-1:0] addr);
    bank_req_t r;
    r.en = 1'b1; r.we = 1'b0; r.addr = addr; r.wdata = '0;
    return r;
  endfunction

  function automatic bank_req_t bank_write(input logic [ADDR_W-1:0] addr,
                                           input logic [DATA_W-1:0] data);
    bank_req_t r;
    r.en = 1'b1; r.we = 1'b1; r.addr = addr; r.wdata = data;
    return r;
  endfunction

  // Number of 32-row column words of a component with n rows.
  function automatic logic [ROW_W-1:0] col_words(input logic [ROW_W-1:0] n);
    return ROW_W'((32'(n) + 31) >> 5);
  endfunction

endpackage
