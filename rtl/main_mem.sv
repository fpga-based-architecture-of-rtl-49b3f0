// main_mem: the 576-word granule memory that the subcores pass data through.
// The Huffman subcore writes the decoded integers here, the requantizer, reorder
// and antialias subcores rewrite them in place, and the IMDCT leaves the time
// samples here for the filterbank.  One synchronous port: a write stores wdata
// at addr; every cycle rdata returns the word at the previous cycle's addr
// (read-first).  Sized by the document (576 words); the word width is this
// design's 32-bit fixed-point sample.
module main_mem
  import mp3_pkg::*;
#(
  parameter int DEPTH = 576
) (
  input  logic     clk,
  input  mem_req_t req,
  output sample_t  rdata
);
  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (req.we && int'(req.addr) < DEPTH) mem[req.addr] <= req.wdata;
    rdata <= (int'(req.addr) < DEPTH) ? mem[req.addr] : '0;
  end
endmodule
