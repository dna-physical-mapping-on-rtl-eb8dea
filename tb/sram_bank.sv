// sram_bank: behavioural model of one external synchronous SRAM bank of the
// FPGA board (2 MB, 512K x 32-bit words by default), for simulation only.
//
// A request with en = 1 is taken at the rising clock edge: a write stores
// wdata at addr, a read returns the word at addr on rdata after that edge, so
// the data is there one cycle after the request. rdata keeps its value
// between reads. The array starts cleared. Testbenches may also read and
// write 'mem' directly to load or inspect the bank.
module sram_bank
  import c1p_pkg::*;
#(
  parameter int unsigned DEPTH = 524288
) (
  input  logic              clk,
  input  bank_req_t         req,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];
  int unsigned reads = 0, writes = 0;

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) mem[a] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    if (req.en) begin
      if (32'(req.addr) >= DEPTH) begin
        $display("sram_bank: address %0d out of range", req.addr);
      end else if (req.we) begin
        mem[req.addr] <= req.wdata;
        writes++;
      end else begin
        rdata <= mem[req.addr];
        reads++;
      end
    end
  end

endmodule
