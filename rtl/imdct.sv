// imdct: inverse modified DCT, windowing and overlap-add for the 32 subbands
// of a granule, in place in the main memory.
//
// Long blocks (block types 0, 1, 3): each subband's 18 lines X_k give 36
// samples  x_i = sum_k X_k cos(pi/72 (2i+19)(2k+1)).  As the document notes,
// only the first and third quarters (i = 0..8 and 18..26) are computed by
// multiply-accumulate on the shared multiplier; the others follow from the
// symmetries x_(17-i) = -x_i and x_(53-i) = x_i.  Short blocks (type 2) use
// three 12-point transforms y_w,i = sum_k X_(3k+w) cos(pi/24 (2i+7)(2k+1)),
// each windowed and overlapped at offset 6+6w inside the 36 outputs.  The
// 36 values are windowed (normal, start, stop or short sine window), the low
// half is added to the high half saved from the previous granule, and the high
// half is saved in the overlap memory for the next granule.  Subbands 0 and 1
// of a mixed block use the normal long window.
//
// All transform cosines and window sines are multiples of pi/72, so one
// 144-entry cosine ROM (cos(pi*j/72)) serves both, computed at elaboration.
// The 18 time samples of subband sb replace its frequency lines at addresses
// 18*sb .. 18*sb+17.  This design also applies the frequency inversion that
// the synthesis filterbank needs (odd samples of odd subbands negated), which
// the document does not mention.  After reset the overlap memory is cleared
// (576 cycles) before the first start is accepted.
// Timing per subband: 19 load cycles, 324 (long) or 216 (short) MAC cycles,
// 36 window cycles and 19 overlap/write cycles.
module imdct
  import mp3_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  gr_info_t  gi,
  output logic      done,
  output logic      busy,
  output mem_req_t  mem,
  input  sample_t   mem_rdata,
  output mul_req_t  mul,
  input  mul_prod_t mul_prod
);
  localparam cos144_t COS = make_cos144();

  typedef enum logic [2:0] { I_CLR, I_IDLE, I_LOAD, I_MAC, I_WIN, I_OUT, I_DONE } im_state_e;
  im_state_e state;

  sample_t     xk  [18];
  sample_t     raw [36];
  sample_t     z   [36];
  sample_t     ovl [LINES];
  sample_t     ovl_rdata;
  line_t       ovl_raddr, ovl_waddr;
  logic        ovl_we;
  sample_t     ovl_wdata;

  logic [4:0]  sb;
  logic [5:0]  cnt;        // load/window/output counter
  logic [4:0]  k;          // MAC inner index
  logic [5:0]  oi;         // MAC output index
  logic [1:0]  bt;         // block type of the current subband
  logic [1:0]  gbt;
  logic        gws, gmixed;
  logic signed [63:0] acc;

  // block type of the current subband
  always_comb begin
    bt = gws ? gbt : 2'd0;
    if (gws && gmixed && sb < 5'd2) bt = 2'd0;
  end

  // sin(pi*m/72) from the cosine ROM
  function automatic coef_t sin72(input int m);
    return COS[(36 - m + 144) % 144];
  endfunction

  function automatic coef_t long_win(input logic [1:0] t, input int r);
    coef_t one;
    one = to_coef(1.0, COEF_FRAC);
    case (t)
      2'd1: begin
        if (r < 18) return sin72(2 * r + 1);
        if (r < 24) return one;
        if (r < 30) return sin72(3 * (2 * (r - 18) + 1));
        return '0;
      end
      2'd3: begin
        if (r < 6)  return '0;
        if (r < 12) return sin72(3 * (2 * (r - 6) + 1));
        if (r < 18) return one;
        return sin72(2 * r + 1);
      end
      default: return sin72(2 * r + 1);
    endcase
  endfunction

  // output index of MAC step oi (long: 0..8, 18..26; short: 12w+i)
  logic signed [31:0] oidx;
  logic signed [31:0] cidx;
  logic signed [31:0] xsel;
  always_comb begin
    if (bt == 2'd2) begin
      oidx = int'(oi);
      xsel = 3 * int'(k) + int'(oi) / 12;
      cidx = (3 * (2 * (int'(oi) % 12) + 7) * (2 * int'(k) + 1)) % 144;
    end else begin
      oidx = (oi < 6'd9) ? int'(oi) : int'(oi) + 9;
      xsel = int'(k);
      cidx = ((2 * oidx + 19) * (2 * int'(k) + 1)) % 144;
    end
  end

  logic [4:0] k_last;
  logic [5:0] oi_last;
  assign k_last  = (bt == 2'd2) ? 5'd5 : 5'd17;
  assign oi_last = (bt == 2'd2) ? 6'd35 : 6'd17;

  // windowing step
  coef_t wcoef;
  logic signed [31:0] zidx;
  always_comb begin
    if (bt == 2'd2) begin
      wcoef = sin72(3 * (2 * (int'(cnt) % 12) + 1));
      zidx  = 6 + 6 * (int'(cnt) / 12) + int'(cnt) % 12;
    end else begin
      wcoef = long_win(bt, int'(cnt));
      zidx  = int'(cnt);
    end
  end

  logic signed [63:0] acc_next;
  assign acc_next = acc + 64'(mul_prod);

  sample_t outv;
  logic signed [31:0] r_out;
  always_comb begin
    r_out = int'(cnt) - 1;
    outv  = sat32(64'(z[r_out < 0 ? 0 : r_out]) + 64'(ovl_rdata));
    if (sb[0] && r_out >= 0 && r_out[0]) outv = -outv;
  end

  always_comb begin
    mem = '0;
    mul = '0;
    ovl_raddr = line_t'(18 * int'(sb) + int'(cnt));
    ovl_waddr = line_t'(18 * int'(sb) + r_out);
    ovl_we    = 1'b0;
    ovl_wdata = z[r_out < 0 ? 18 : r_out + 18];
    unique case (state)
      I_CLR: begin
        ovl_we    = 1'b1;
        ovl_waddr = line_t'(cnt) + line_t'(18 * int'(sb));
        ovl_wdata = '0;
      end
      I_LOAD: mem.addr = line_t'(18 * int'(sb) + int'(cnt));
      I_MAC: begin
        mul.a = xk[xsel];
        mul.b = COS[cidx];
      end
      I_WIN: begin
        mul.a = raw[cnt];
        mul.b = wcoef;
      end
      I_OUT: if (cnt != 0) begin
        mem.we    = 1'b1;
        mem.addr  = line_t'(18 * int'(sb) + r_out);
        mem.wdata = outv;
        ovl_we    = 1'b1;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (ovl_we) ovl[ovl_waddr] <= ovl_wdata;
    ovl_rdata <= ovl[ovl_raddr];
  end

  assign done = (state == I_DONE);
  assign busy = (state != I_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= I_CLR;
      sb <= '0; cnt <= '0; k <= '0; oi <= '0; acc <= '0;
      gbt <= '0; gws <= 1'b0; gmixed <= 1'b0;
      for (int j = 0; j < 18; j++) xk[j] <= '0;
      for (int j = 0; j < 36; j++) begin raw[j] <= '0; z[j] <= '0; end
    end else begin
      unique case (state)
        I_CLR: begin
          // clear the overlap memory, 18 words per subband step
          if (cnt == 6'd17) begin
            cnt <= '0;
            sb  <= sb + 1'b1;
            if (sb == 5'd31) state <= I_IDLE;
          end else cnt <= cnt + 1'b1;
        end
        I_IDLE: if (start) begin
          gbt    <= gi.block_type;
          gws    <= gi.window_switching;
          gmixed <= gi.mixed_block;
          sb     <= '0;
          cnt    <= '0;
          state  <= I_LOAD;
        end
        I_LOAD: begin
          if (cnt != 0) xk[cnt - 1] <= mem_rdata;
          if (cnt == 6'd18) begin
            cnt <= '0; k <= '0; oi <= '0; acc <= '0;
            state <= I_MAC;
          end else cnt <= cnt + 1'b1;
        end
        I_MAC: begin
          if (k == k_last) begin
            sample_t v;
            v = sat32(acc_next >>> COEF_FRAC);
            acc <= '0;
            k   <= '0;
            raw[oidx] <= v;
            if (bt != 2'd2) begin
              if (oidx < 9) raw[17 - oidx] <= -v;
              else          raw[53 - oidx] <= v;
            end
            if (oi == oi_last) begin
              cnt <= '0;
              for (int j = 0; j < 36; j++) z[j] <= '0;
              state <= I_WIN;
            end else oi <= oi + 1'b1;
          end else begin
            acc <= acc_next;
            k   <= k + 1'b1;
          end
        end
        I_WIN: begin
          if (bt == 2'd2) z[zidx] <= sat32(64'(z[zidx]) + (64'(mul_prod) >>> COEF_FRAC));
          else            z[zidx] <= sat32(64'(mul_prod) >>> COEF_FRAC);
          if (cnt == 6'd35) begin
            cnt   <= '0;
            state <= I_OUT;
          end else cnt <= cnt + 1'b1;
        end
        I_OUT: begin
          if (cnt == 6'd18) begin
            cnt <= '0;
            if (sb == 5'd31) state <= I_DONE;
            else begin
              sb    <= sb + 1'b1;
              state <= I_LOAD;
            end
          end else cnt <= cnt + 1'b1;
        end
        I_DONE: state <= I_IDLE;
        default: state <= I_IDLE;
      endcase
    end
  end
endmodule
