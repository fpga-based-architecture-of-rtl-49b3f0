// bit_reservoir: circular byte store for the main data of MP3 frames.
// The synchronizer writes the main data bytes of each frame in stream order;
// since a granule's data may begin up to 511 bytes before the frame that
// carries its side information (main_data_begin), older bytes are kept until
// they are overwritten by later frames.  The Huffman subcore reads the store
// one bit at a time: it loads a bit pointer (set_ptr/ptr_in), then reads
// bit_out, the bit under the pointer, MSB of each byte first, and pulses adv
// to move to the next bit.  bit_out is combinational from the pointer (no read
// latency); a write becomes visible on the next cycle.  Pointers wrap modulo
// the store size.  The document only names this memory; its size (2048 bytes,
// enough for 511 reservoir bytes plus the largest 44.1 kHz frame) and the
// bit-serial read port are this design's choices.
module bit_reservoir #(
  parameter int BYTES = 2048,
  localparam int AW = $clog2(BYTES),
  localparam int PW = AW + 3
) (
  input  logic          clk,
  input  logic          rst_n,
  // write side (synchronizer)
  input  logic          wr_en,
  input  logic [7:0]    wr_data,
  output logic [AW-1:0] wr_ptr,     // byte address of the next write
  // read side (Huffman subcore)
  input  logic          set_ptr,
  input  logic [PW-1:0] ptr_in,
  input  logic          adv,
  output logic          bit_out,
  output logic [PW-1:0] bit_ptr
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr  <= '0;
      bit_ptr <= '0;
    end else begin
      if (wr_en) wr_ptr <= wr_ptr + 1'b1;
      if (set_ptr)  bit_ptr <= ptr_in;
      else if (adv) bit_ptr <= bit_ptr + 1'b1;
    end
  end

  logic [7:0] cur_byte;
  assign cur_byte = mem[bit_ptr[PW-1:3]];
  assign bit_out  = cur_byte[3'd7 - bit_ptr[2:0]];
endmodule
