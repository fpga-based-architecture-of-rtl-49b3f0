// filterbank: polyphase synthesis filterbank.  For each of the 18 time slots
// of a granule it takes the 32 subband samples S_k (main memory address
// 18*k + slot), produces the 64-value vector
//   V_i = sum_k cos((16+i)(2k+1) pi/64) S_k
// pushes it into a 1024-word buffer that keeps the last 16 vectors, and forms
// 32 PCM samples
//   pcm_j = sum_{i=0..15} D[j+32i] * U[j+32i],
//   U[64m+j] = V[128m+j], U[64m+32+j] = V[128m+96+j]   (m = 0..7)
// where V[] counts from the newest vector.
//
// Matrixing uses a 32-point DCT X_n = sum_k S_k cos(pi(2k+1)n/64) computed
// with Lee's recursive algorithm, as the document proposes: each level splits
// a block of L values into g_k = x_k + x_(L-1-k) and
// h_k = (x_k - x_(L-1-k)) / (2 cos(pi(2k+1)/(2L))); after the five splitting
// levels (16 butterflies each, one per cycle, on this block's multiplier) five
// recombination levels rebuild X_2n = G_n and X_2n+1 = H_n + H_(n+1), one
// level per cycle.  V follows from X by symmetry:
//   V_i = X_(i+16) (i<16), 0 (i=16), -X_(48-i) (17..48), -X_(i-48) (49..63).
// The vector buffer is a circular RAM (the document's dual-port shift
// register) with a moving base address; after reset it is cleared (1024
// cycles).  The window D of the standard is not reproduced here: it sits in
// a 512-word coefficient RAM (20-bit, 18 fractional bits) loaded through
// d_we/d_addr/d_wdata before decoding starts.
//
// Output: 16-bit PCM with valid/ready; the filterbank stalls while
// pcm_ready is low.  The filterbank only reads the main memory, so the write
// fields of its mem request are constant zero.  Timing per slot: 33 load, 85 DCT, 64 vector-write and
// 17 cycles per PCM sample.
module filterbank
  import mp3_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               done,
  output logic               busy,
  output mem_req_t           mem,
  input  sample_t            mem_rdata,
  output logic               pcm_valid,
  output logic signed [15:0] pcm_data,
  input  logic               pcm_ready,
  input  logic               d_we,
  input  logic [8:0]         d_addr,
  input  coef_t              d_wdata
);
  localparam int LEE_FRAC = 14;

  typedef coef_t lee_t [31];
  function automatic lee_t make_lee();
    lee_t t;
    int o;
    o = 0;
    for (int lv = 0; lv < 5; lv++) begin
      int l;
      l = 32 >> lv;
      for (int kk = 0; kk < l / 2; kk++) begin
        t[o] = to_coef(1.0 / (2.0 * $cos(PI * (2 * kk + 1) / (2.0 * l))), LEE_FRAC);
        o++;
      end
    end
    return t;
  endfunction
  localparam lee_t LEE = make_lee();

  typedef enum logic [3:0] {
    F_CLR, F_IDLE, F_LOAD, F_FWD, F_REC, F_VWR, F_WIN, F_OUT, F_DONE
  } fb_state_e;
  fb_state_e state;

  sample_t     a [32];
  sample_t     b [32];
  sample_t     rec [32];
  sample_t     vram [1024];
  sample_t     v_rdata;
  logic [9:0]  v_raddr, v_waddr;
  logic        v_we;
  sample_t     v_wdata;
  coef_t       dram [512];
  coef_t       d_rdata;
  logic [8:0]  d_raddr;

  logic [4:0]  slot;
  logic [10:0] cnt;
  logic [2:0]  lv;        // DCT level
  logic [3:0]  bf;        // butterfly index
  logic [9:0]  off;       // base of the newest V vector
  logic [4:0]  j;         // PCM sample index
  logic [4:0]  ii;        // window term index (0..16, pipelined)
  logic signed [63:0] acc;

  // ---------------------------------------------------------------- DCT datapath
  logic signed [31:0] half, blk, kk, base, ci;
  sample_t bx, by;
  logic signed [32:0] dif;
  logic signed [63:0] hprod;
  always_comb begin
    half = 16 >> lv;
    blk  = int'(bf) >> (4 - int'(lv));
    kk   = int'(bf) & (half - 1);
    base = blk * 2 * half;
    ci   = (lv == 0) ? kk : (lv == 1) ? 16 + kk : (lv == 2) ? 24 + kk : (lv == 3) ? 28 + kk : 30;
    bx   = a[base + kk];
    by   = a[base + 2 * half - 1 - kk];
    dif  = 33'(bx) - 33'(by);
    hprod = 64'(dif) * 64'(LEE[ci]);
  end

  // recombination of one level (block size 2 << lv)
  always_comb begin
    int h, bs;
    h = 1 << lv;
    for (int p = 0; p < 32; p++) begin
      int n, q;
      bs = (p / (2 * h)) * (2 * h);
      q  = p - bs;
      n  = q / 2;
      if (q % 2 == 0) rec[p] = a[bs + n];
      else if (n + 1 < h) rec[p] = sat32(64'(a[bs + h + n]) + 64'(a[bs + h + n + 1]));
      else rec[p] = a[bs + h + n];
    end
  end

  // V vector element cnt from the DCT output
  sample_t vval;
  always_comb begin
    int i;
    i = int'(cnt[5:0]);
    if (i < 16)       vval = a[i + 16];
    else if (i == 16) vval = '0;
    else if (i <= 48) vval = -a[48 - i];
    else              vval = -a[i - 48];
  end

  // window addresses for term ii of sample j
  always_comb begin
    int vi;
    vi = (ii[0] == 1'b0) ? 128 * (int'(ii) / 2) + int'(j) : 128 * (int'(ii) / 2) + 96 + int'(j);
    v_raddr = off + 10'(vi);
    d_raddr = 9'(int'(j) + 32 * int'(ii));
  end

  always_comb begin
    v_we    = 1'b0;
    v_waddr = off + 10'(cnt[5:0]);
    v_wdata = vval;
    if (state == F_CLR) begin
      v_we    = 1'b1;
      v_waddr = cnt[9:0];
      v_wdata = '0;
    end else if (state == F_VWR) begin
      v_we = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (v_we) vram[v_waddr] <= v_wdata;
    v_rdata <= vram[v_raddr];
    if (d_we) dram[d_addr] <= d_wdata;
    d_rdata <= dram[d_raddr];
  end

  always_comb begin
    mem = '0;
    mem.addr = line_t'(18 * int'(cnt[5:0]) + int'(slot));
  end

  logic signed [63:0] pcm_wide;
  always_comb begin
    pcm_wide = acc >>> (FRAC + COEF_FRAC - 15);
    if (pcm_wide > 64'sd32767)       pcm_data = 16'sh7FFF;
    else if (pcm_wide < -64'sd32768) pcm_data = -16'sh8000;
    else                             pcm_data = pcm_wide[15:0];
  end

  assign pcm_valid = (state == F_OUT);
  assign done      = (state == F_DONE);
  assign busy      = (state != F_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_CLR;
      slot <= '0; cnt <= '0; lv <= '0; bf <= '0; off <= '0; j <= '0; ii <= '0; acc <= '0;
      for (int p = 0; p < 32; p++) begin a[p] <= '0; b[p] <= '0; end
    end else begin
      unique case (state)
        F_CLR: begin
          cnt <= cnt + 1'b1;
          if (cnt == 11'd1023) state <= F_IDLE;
        end
        F_IDLE: if (start) begin
          slot  <= '0;
          cnt   <= '0;
          state <= F_LOAD;
        end
        F_LOAD: begin
          if (cnt != 0) a[cnt - 1] <= mem_rdata;
          if (cnt == 11'd32) begin
            lv <= '0; bf <= '0;
            state <= F_FWD;
          end else cnt <= cnt + 1'b1;
        end
        F_FWD: begin
          b[base + kk]        <= sat32(64'(bx) + 64'(by));
          b[base + half + kk] <= sat32(hprod >>> LEE_FRAC);
          if (bf == 4'd15) begin
            bf <= '0;
            state <= F_REC;            // copy b -> a in the next cycle
          end else bf <= bf + 1'b1;
        end
        F_REC: begin
          // first visit after each forward level: copy, continue splitting
          if (cnt != 11'h7FF) begin
            for (int p = 0; p < 32; p++) a[p] <= b[p];
            if (lv == 3'd4) begin
              cnt <= 11'h7FF;          // splitting finished, start recombining
              lv  <= '0;
            end else begin
              lv <= lv + 1'b1;
              state <= F_FWD;
            end
          end else begin
            for (int p = 0; p < 32; p++) a[p] <= rec[p];
            if (lv == 3'd4) begin
              cnt   <= '0;
              off   <= off - 10'd64;
              state <= F_VWR;
            end else lv <= lv + 1'b1;
          end
        end
        F_VWR: begin
          if (cnt == 11'd63) begin
            cnt <= '0; j <= '0; ii <= '0; acc <= '0;
            state <= F_WIN;
          end else cnt <= cnt + 1'b1;
        end
        F_WIN: begin
          // address of term ii issued this cycle, data of term ii-1 arrives
          if (ii != 0) acc <= acc + 64'(v_rdata) * 64'(d_rdata);
          if (ii == 5'd16) state <= F_OUT;
          else ii <= ii + 1'b1;
        end
        F_OUT: if (pcm_ready) begin
          acc <= '0;
          ii  <= '0;
          if (j == 5'd31) begin
            j <= '0;
            if (slot == 5'd17) state <= F_DONE;
            else begin
              slot  <= slot + 1'b1;
              cnt   <= '0;
              state <= F_LOAD;
            end
          end else begin
            j <= j + 1'b1;
            state <= F_WIN;
          end
        end
        F_DONE: state <= F_IDLE;
        default: state <= F_IDLE;
      endcase
    end
  end
endmodule
