// receive_data: receives the 32-bit words the host software sends and frames
// them into commands for the controller.
//
// Incoming words are buffered in a FIFO. On its output side a word counter
// tracks packet boundaries: a word that arrives while no payload is pending
// is a header ({op, a, b}, see c1p_pkg), and its payload length is computed
// from the opcode:
//   OP_LOAD_M      a*b words (rows x blocks)
//   OP_LOAD_COMP   a + b*ceil(a/32) words (row indexes, then columns)
//   OP_CMP_STREAM  2*b words (block pairs of the two rows)
//   others         no payload
// Each word leaves with out_header (first word of a packet), out_op (the
// packet's opcode) and out_last (last word of the packet; a header without
// payload is its own last word). Handshakes are valid/ready on both sides.
// The source only names this unit and its role; the framing is this design's.
module receive_data
  import c1p_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [DATA_W-1:0] out_data,
  output logic              out_header,
  output logic              out_last,
  output opcode_e           out_op
);

  logic [31:0] remaining;
  opcode_e     cur_op;
  header_t     hdr;
  logic [31:0] len;

  sync_fifo #(.W(DATA_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data
  );

  always_comb begin
    hdr = header_t'(out_data);
    unique case (opcode_e'(hdr.op))
      OP_LOAD_M:     len = 32'(hdr.a) * 32'(hdr.b);
      OP_LOAD_COMP:  len = 32'(hdr.a) + 32'(hdr.b) * 32'(col_words(hdr.a));
      OP_CMP_STREAM: len = 32'(hdr.b) << 1;
      default:       len = '0;
    endcase
  end

  assign out_header = (remaining == '0);
  assign out_op     = out_header ? opcode_e'(hdr.op) : cur_op;
  assign out_last   = out_header ? (len == '0) : (remaining == 32'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remaining <= '0;
      cur_op    <= OP_NOP;
    end else if (out_valid && out_ready) begin
      if (out_header) begin
        remaining <= len;
        cur_op    <= opcode_e'(hdr.op);
      end else begin
        remaining <= remaining - 32'd1;
      end
    end
  end

endmodule
