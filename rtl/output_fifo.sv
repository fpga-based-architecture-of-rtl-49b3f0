// output_fifo: the interface subcore's sample buffer.  The decoder delivers
// 576 samples per granule in bursts while the I2S side consumes one sample
// per word-clock period, so a 1024-sample FIFO (the document's size) sits in
// between.  Write side: wr_valid/wr_ready (ready while not full); read side:
// rd_valid (not empty) with rd_data showing the oldest sample, removed by
// rd_pop.  Storage is a RAM with registered pointers; rd_data is read
// combinationally from it (first-word fall-through), a choice of this design.
module output_fifo #(
  parameter int DEPTH = 1024,
  parameter int W     = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  input  logic [W-1:0] wr_data,
  output logic         wr_ready,
  output logic         rd_valid,
  output logic [W-1:0] rd_data,
  input  logic         rd_pop,
  output logic [AW:0]  count
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign wr_ready = (count != (AW+1)'(DEPTH));
  assign rd_valid = (count != 0);
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_pop && rd_valid;
  assign rd_data  = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow: assert property (@(posedge clk) count <= (AW+1)'(DEPTH));
endmodule
