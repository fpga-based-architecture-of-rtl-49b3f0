// requantizer: turns the 576 Huffman-decoded integers is(i) of a granule,
// in place in the main memory, into the frequency lines
//   xr(i) = sign(is) * |is|^(4/3) * 2^(E/4)
// where, in quarter steps of the exponent,
//   long blocks:  E = global_gain - 210 - 2*(1+scalefac_scale)*(scalefac_l[sfb] + preflag*pretab[sfb])
//   short blocks: E = global_gain - 210 - 8*subblock_gain[w] - 2*(1+scalefac_scale)*scalefac_s[sfb][w]
//
// Structure as in the document: a frequency line counter walks i = 0..575
// and raises done when it has passed the last line; the |is|^(4/3) table look
// up (pow43_rom) serves |is| < 1024 directly and larger values as
// 16*table(|is|/8); a window divider (counters for position, window and band
// inside the short-block region) finds the scalefactor band and window of
// each line; the fractional part E mod 4 selects a gain-correction factor
// 2^((E mod 4)/4) that is applied with the shared multiplier, and a shifter
// applies 2^floor(E/4).  Results are saturated to the 32-bit sample format.
//
// Timing: three cycles per line (read, table look up, multiply/shift/write),
// 1728 cycles per granule plus two.  Mixed blocks treat lines 0..35 as long
// bands 0..7 and the rest as short bands 3..11.
module requantizer
  import mp3_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  gr_info_t  gi,
  input  sfl_t      scalefac_l,
  input  sfs_t      scalefac_s,
  output logic      done,
  output mem_req_t  mem,
  input  sample_t   mem_rdata,
  output mul_req_t  mul,
  input  mul_prod_t mul_prod
);
  typedef enum logic [2:0] { R_IDLE, R_READ, R_LUT, R_MUL, R_DONE } rq_state_e;
  rq_state_e state;

  line_t       cnt;              // frequency line counter
  logic        short_blk, mixed;
  logic [3:0]  s_sfb;            // short band
  logic [1:0]  s_win;            // short window
  logic [7:0]  s_pos;            // position inside the window
  logic        in_short;
  logic signed [31:0] lsfb;
  logic signed [31:0] e_cur;
  logic signed [15:0] e_reg;
  logic        neg_reg, big_reg;
  logic [9:0]  lut_addr;
  logic [23:0] lut_data;

  pow43_rom #(.DEPTH(1024), .W(24), .FRAC_BITS(10)) u_lut (
    .clk(clk), .addr(lut_addr), .data(lut_data)
  );

  // gain correction table 2^(k/4), k = 0..3
  typedef coef_t gc_t [4];
  function automatic gc_t make_gc();
    gc_t t;
    for (int k = 0; k < 4; k++) t[k] = to_coef(2.0 ** (real'(k) / 4.0), COEF_FRAC);
    return t;
  endfunction
  localparam gc_t GAIN_CORR = make_gc();

  // long scalefactor band of line cnt
  always_comb begin
    lsfb = 0;
    for (int b = 1; b <= 21; b++) if (int'(cnt) >= sfb_long(b)) lsfb = b;
  end

  assign in_short = short_blk && !(mixed && cnt < 10'd36);

  always_comb begin
    e_cur = int'(gi.global_gain) - 210;
    if (in_short)
      e_cur = e_cur - 8 * int'(gi.subblock_gain[s_win])
                    - 2 * (1 + int'(gi.scalefac_scale)) * int'(scalefac_s[s_sfb][s_win]);
    else
      e_cur = e_cur - 2 * (1 + int'(gi.scalefac_scale)) *
                      (int'(scalefac_l[lsfb]) + (gi.preflag ? pretab(lsfb) : 0));
  end

  // |is| and table address from the memory word read in R_READ
  sample_t    is_v;
  logic [13:0] mag;
  always_comb begin
    is_v = mem_rdata;
    mag  = (is_v < 0) ? 14'(-is_v) : 14'(is_v);
    if (is_v > 32'sd8191 || is_v < -32'sd8191) mag = 14'd8191;
    lut_addr = (mag >= 14'd1024) ? mag[12:3] : mag[9:0];
  end

  // multiply by the gain correction, then shift by floor(E/4)
  logic signed [15:0] e_floor;
  logic signed [31:0] sh;
  logic signed [63:0] scaled;
  logic signed [63:0] p64;
  sample_t            xr;
  always_comb begin
    mul.a = big_reg ? 32'(lut_data) << 4 : 32'(lut_data);
    mul.b = GAIN_CORR[e_reg[1:0]];
  end

  always_comb begin
    e_floor = e_reg >>> 2;
    // product has 10 + COEF_FRAC fractional bits; the sample has FRAC
    sh      = int'(e_floor) - (10 + COEF_FRAC - FRAC);
    p64     = 64'(mul_prod);
    if (sh >= 0) scaled = (sh > 20) ? 64'sh7FFF_FFFF_FFFF : (p64 <<< sh);
    else         scaled = (-sh > 62) ? 64'sd0 : (p64 >>> (-sh));
    xr      = sat32(neg_reg ? -scaled : scaled);
  end

  always_comb begin
    mem = '0;
    unique case (state)
      R_READ: mem.addr = cnt;
      R_MUL: begin
        mem.addr  = cnt;
        mem.we    = 1'b1;
        mem.wdata = xr;
      end
      default: ;
    endcase
  end

  assign done = (state == R_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      cnt <= '0; short_blk <= 1'b0; mixed <= 1'b0;
      s_sfb <= '0; s_win <= '0; s_pos <= '0;
      e_reg <= '0; neg_reg <= 1'b0; big_reg <= 1'b0;
    end else begin
      unique case (state)
        R_IDLE: if (start) begin
          cnt       <= '0;
          short_blk <= gi.window_switching && gi.block_type == 2'd2;
          mixed     <= gi.mixed_block;
          s_sfb     <= gi.mixed_block ? 4'd3 : 4'd0;
          s_win     <= '0;
          s_pos     <= '0;
          state     <= R_READ;
        end
        R_READ: state <= R_LUT;
        R_LUT: begin
          e_reg   <= 16'(e_cur);
          neg_reg <= is_v < 0;
          big_reg <= mag >= 14'd1024;
          state   <= R_MUL;
        end
        R_MUL: begin
          // advance the window divider for short-block lines
          if (in_short) begin
            if (int'(s_pos) == sfb_short(int'(s_sfb) + 1) - sfb_short(int'(s_sfb)) - 1) begin
              s_pos <= '0;
              if (s_win == 2'd2) begin
                s_win <= '0;
                s_sfb <= s_sfb + 1'b1;
              end else s_win <= s_win + 1'b1;
            end else s_pos <= s_pos + 1'b1;
          end
          cnt <= cnt + 1'b1;
          state <= (cnt == line_t'(LINES - 1)) ? R_DONE : R_READ;
        end
        R_DONE: state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
