// reorder: rearranges the frequency lines of a short-block granule.  The
// Huffman data of a short block is ordered by scalefactor band, then window,
// then frequency; the IMDCT wants, inside each band, frequency first with the
// three windows interleaved.  Built, as in the document, around two memories:
// reorder_mem, a 576-word temporary copy of the granule, and reorder_lookup, a
// ROM that lists for each destination line the source line to fetch.  The
// ROM holds two 576-entry maps, pure short and mixed (lines 0..35 of a mixed
// block are long and stay in place); it is computed at elaboration from
//   src = 3*start(sfb) + w*width(sfb) + f  ->  des = 3*start(sfb) + 3*f + w.
// Timing: 577 cycles to copy the granule out of the main memory, 577 cycles to
// write it back in the new order, then a one-cycle done.  A granule that is
// not a short block is left alone (done after two cycles).
module reorder
  import mp3_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  gr_info_t gi,
  output logic     done,
  output mem_req_t mem,
  input  sample_t  mem_rdata
);
  typedef logic [9:0] lut_t [2*LINES];

  function automatic lut_t make_lookup();
    lut_t t;
    for (int m = 0; m < 2; m++) begin
      for (int i = 0; i < LINES; i++) t[m*LINES + i] = 10'(i);
      for (int sfb = (m == 1) ? 3 : 0; sfb < 13; sfb++) begin
        int st, wd;
        st = sfb_short(sfb);
        wd = sfb_short(sfb + 1) - st;
        for (int w = 0; w < 3; w++)
          for (int f = 0; f < wd; f++)
            t[m*LINES + 3*st + 3*f + w] = 10'(3*st + w*wd + f);
      end
    end
    return t;
  endfunction

  localparam lut_t LOOKUP = make_lookup();

  typedef enum logic [2:0] { O_IDLE, O_COPY, O_WRITE, O_DONE } ro_state_e;
  ro_state_e state;

  sample_t    reorder_mem [LINES];
  sample_t    tmp_rdata;
  logic [9:0] tmp_raddr;
  logic [10:0] cnt;
  logic        mixed;
  logic [9:0]  src_addr;

  assign src_addr = (cnt < 11'(LINES)) ? LOOKUP[(mixed ? LINES : 0) + int'(cnt[9:0])] : 10'd0;

  always_ff @(posedge clk) begin
    if (state == O_COPY && cnt != 0) reorder_mem[cnt - 1] <= mem_rdata;
    tmp_rdata <= reorder_mem[tmp_raddr];
  end

  always_comb begin
    mem = '0;
    tmp_raddr = src_addr;
    unique case (state)
      O_COPY: mem.addr = cnt[9:0];
      O_WRITE: if (cnt != 0) begin
        mem.we    = 1'b1;
        mem.addr  = cnt[9:0] - 1'b1;
        mem.wdata = tmp_rdata;
      end
      default: ;
    endcase
  end

  assign done = (state == O_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= O_IDLE;
      cnt   <= '0;
      mixed <= 1'b0;
    end else begin
      unique case (state)
        O_IDLE: if (start) begin
          cnt   <= '0;
          mixed <= gi.mixed_block;
          state <= (gi.window_switching && gi.block_type == 2'd2) ? O_COPY : O_DONE;
        end
        O_COPY: begin
          if (cnt == 11'(LINES)) begin
            cnt   <= '0;
            state <= O_WRITE;
          end else cnt <= cnt + 1'b1;
        end
        O_WRITE: begin
          if (cnt == 11'(LINES)) state <= O_DONE;
          else cnt <= cnt + 1'b1;
        end
        O_DONE: state <= O_IDLE;
        default: state <= O_IDLE;
      endcase
    end
  end
endmodule
