// antialias: alias-reduction butterflies between neighbouring subbands.  For
// every boundary between subband sb-1 and sb, eight butterflies combine the
// lines lo = x[18*sb-1-i] and hi = x[18*sb+i], i = 0..7:
//   lo' = lo*cs[i] - hi*ca[i]      hi' = hi*cs[i] + lo*ca[i]
// with cs[i] = 1/sqrt(1+c[i]^2), ca[i] = c[i]/sqrt(1+c[i]^2) and the eight c[i]
// of the standard.  As in the document, one butterfly state reads the pair
// from the main memory, performs four multiplications one after the other on
// the shared multiplier, one addition and one subtraction, and writes both
// results back.  The constants sit in a small ROM (aa_rom), computed at
// elaboration.  Long blocks process all 31 boundaries, mixed blocks only the
// boundary between subbands 0 and 1, pure short blocks none.
// Timing: 8 cycles per butterfly, 1984 cycles for a long granule, then done.
module antialias
  import mp3_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  gr_info_t  gi,
  output logic      done,
  output mem_req_t  mem,
  input  sample_t   mem_rdata,
  output mul_req_t  mul,
  input  mul_prod_t mul_prod
);
  typedef coef_t aa_t [8];
  function automatic aa_t make_cs();
    aa_t t;
    for (int i = 0; i < 8; i++) t[i] = to_coef(1.0 / $sqrt(1.0 + aa_c(i) * aa_c(i)), COEF_FRAC);
    return t;
  endfunction
  function automatic aa_t make_ca();
    aa_t t;
    for (int i = 0; i < 8; i++) t[i] = to_coef(aa_c(i) / $sqrt(1.0 + aa_c(i) * aa_c(i)), COEF_FRAC);
    return t;
  endfunction
  localparam aa_t AA_CS = make_cs();
  localparam aa_t AA_CA = make_ca();

  typedef enum logic [3:0] {
    A_IDLE, A_RD_LO, A_RD_HI, A_M0, A_M1, A_M2, A_M3, A_WR_LO, A_WR_HI, A_DONE
  } aa_state_e;
  aa_state_e state;

  logic [4:0] sb, sb_last;
  logic [2:0] i;
  sample_t    lo, hi;
  logic signed [63:0] acc_lo, acc_hi;
  line_t      lo_addr, hi_addr;

  assign lo_addr = line_t'(18 * int'(sb) - 1 - int'(i));
  assign hi_addr = line_t'(18 * int'(sb) + int'(i));

  always_comb begin
    mem = '0;
    mul = '0;
    unique case (state)
      A_RD_LO: mem.addr = lo_addr;
      A_RD_HI: mem.addr = hi_addr;
      A_M0: begin mul.a = lo; mul.b = AA_CS[i]; end
      A_M1: begin mul.a = hi; mul.b = AA_CA[i]; end
      A_M2: begin mul.a = hi; mul.b = AA_CS[i]; end
      A_M3: begin mul.a = lo; mul.b = AA_CA[i]; end
      A_WR_LO: begin
        mem.addr = lo_addr; mem.we = 1'b1; mem.wdata = sat32(acc_lo >>> COEF_FRAC);
      end
      A_WR_HI: begin
        mem.addr = hi_addr; mem.we = 1'b1; mem.wdata = sat32(acc_hi >>> COEF_FRAC);
      end
      default: ;
    endcase
  end

  assign done = (state == A_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= A_IDLE;
      sb <= '0; sb_last <= '0; i <= '0;
      lo <= '0; hi <= '0; acc_lo <= '0; acc_hi <= '0;
    end else begin
      unique case (state)
        A_IDLE: if (start) begin
          sb <= 5'd1;
          i  <= '0;
          sb_last <= gi.mixed_block ? 5'd1 : 5'd31;
          if (gi.window_switching && gi.block_type == 2'd2 && !gi.mixed_block) state <= A_DONE;
          else state <= A_RD_LO;
        end
        A_RD_LO: state <= A_RD_HI;
        A_RD_HI: begin lo <= mem_rdata; state <= A_M0; end
        A_M0: begin hi <= mem_rdata; acc_lo <= 64'(mul_prod); state <= A_M1; end
        A_M1: begin acc_lo <= acc_lo - 64'(mul_prod); state <= A_M2; end
        A_M2: begin acc_hi <= 64'(mul_prod); state <= A_M3; end
        A_M3: begin acc_hi <= acc_hi + 64'(mul_prod); state <= A_WR_LO; end
        A_WR_LO: state <= A_WR_HI;
        A_WR_HI: begin
          i <= i + 1'b1;
          if (i == 3'd7) begin
            sb <= sb + 1'b1;
            state <= (sb == sb_last) ? A_DONE : A_RD_LO;
          end else state <= A_RD_LO;
        end
        A_DONE: state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end
endmodule
