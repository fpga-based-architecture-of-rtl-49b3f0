// huffman: decodes the scalefactors and the 576 quantized frequency lines of
// one granule from the bit reservoir, writing the signed integers to the main
// memory.
//
// The state machine follows the document's Huffman subcore: IDLE waits for
// start; CONT1/CONT2 pick the scalefactor layout (long, short or mixed
// window); CALC_SF1 (mixed), CALC_SF2 (short) and CALC_SF4..CALC_SF7 (the four
// scalefactor-selection groups of a long block, which in granule 1 reuse the
// granule-0 values when their scfsi bit is set) read the scalefactors with
// the slen1/slen2 widths chosen by scalefac_compress; INIT_DEC computes the
// region boundaries; DEC_BV/HUFFMAN_LOOP decode a big-values pair with the
// table chosen by the region; INIT_LOOP_LINBITS, DO_LINBITS_X/_SIGN_X and
// DO_LINBITS_Y/_SIGN_Y add the linbits to an escape value of 15 and read the
// sign bits; DEC_RC1/HUFFMAN_LOOP2/SIGN_V..SIGN_Y/DONE_HLOOP2 decode count1
// quadruples until part2_3_length bits are used (a quadruple that overruns
// the budget is discarded); FILL_ZEROS clears the rzero region; READY reports
// completion (done pulse).  WR_PAIR/WR_QUAD are this design's write-back
// states.
//
// Huffman code tables: the document stores 17 distinct tables in block RAM
// but does not give their contents, which are those of ISO/IEC 11172-3.  Here
// they live in a loadable table RAM (tbl_we/tbl_addr/tbl_wdata) as binary
// trees: word t (t = 0..31 big-values tables, 32/33 = count1 tables A/B) holds
// the address of the table's root node; a node is two consecutive words,
// selected by the next bitstream bit.  A word with bit 15 set is a leaf
// holding x in [7:4] and y in [3:0] (or v,w,x,y in [3:0] for count1);
// otherwise [11:0] is the address of the next node.  The table RAM has a
// one-cycle read latency, so the tree walk takes two cycles per code bit.
// Table 0 (and tables 4 and 14, which do not exist) decode to zeros without
// reading bits.  Linbits per table are the standard's constants.
module huffman
  import mp3_pkg::*;
#(
  parameter int TBL_DEPTH = 4096,
  parameter int PW        = 14       // bit reservoir pointer width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           gr,             // granule index (scfsi applies in granule 1)
  input  gr_info_t       gi,
  input  logic [3:0]     scfsi,
  input  logic [PW-1:0]  start_ptr,      // bit address of part2 of this granule
  output logic           done,
  // bit reservoir
  output logic           res_set_ptr,
  output logic [PW-1:0]  res_ptr,
  output logic           res_adv,
  input  logic           res_bit,
  // main memory
  output mem_req_t       mem,
  // scalefactors for the requantizer
  output sfl_t           scalefac_l,
  output sfs_t           scalefac_s,
  // table RAM load port
  input  logic           tbl_we,
  input  logic [$clog2(TBL_DEPTH)-1:0] tbl_addr,
  input  logic [15:0]    tbl_wdata
);
  localparam int TAW = $clog2(TBL_DEPTH);

  typedef enum logic [4:0] {
    IDLE, CONT1, CONT2, CALC_SF1, CALC_SF2, CALC_SF4, CALC_SF5, CALC_SF6, CALC_SF7,
    DONE_SF, INIT_DEC, DEC_BV, HUFFMAN_LOOP, INIT_LOOP_LINBITS, DO_LINBITS_X,
    DO_LINBITS_SIGN_X, DO_LINBITS_Y, DO_LINBITS_SIGN_Y, WR_PAIR, DEC_RC1,
    HUFFMAN_LOOP2, SIGN_V, SIGN_W, SIGN_X, SIGN_Y, DONE_HLOOP2, WR_QUAD,
    FILL_ZEROS, READY
  } huff_state_e;

  huff_state_e state;

  // ---------------------------------------------------------------- table RAM
  logic [15:0]    tbl [TBL_DEPTH];
  logic [TAW-1:0] tbl_raddr;
  logic [15:0]    tbl_rdata;
  always_ff @(posedge clk) begin
    if (tbl_we) tbl[tbl_addr] <= tbl_wdata;
    tbl_rdata <= tbl[tbl_raddr];
  end

  // ---------------------------------------------------------------- registers
  gr_info_t    g;
  logic        grn;
  logic [3:0]  scfsi_r;
  logic [12:0] used;          // bits consumed since start_ptr
  logic [9:0]  idx;           // current frequency line
  logic [9:0]  r1, r2, bv_end;
  logic [4:0]  tsel;
  logic [3:0]  lb;            // linbits of the current table
  logic [3:0]  lbc;           // linbits still to read
  logic        rd_pend;       // table RAM read in flight
  logic        root_pend;     // waiting for the root address of a table
  logic [TAW-1:0] node;
  logic [13:0] xv, yv;        // magnitudes
  logic        xs, ys;        // signs
  logic [3:0]  q;             // count1 quadruple v,w,x,y (magnitude bits)
  logic [3:0]  qs;            // their signs
  logic [1:0]  wcnt;
  // scalefactor reader
  logic [5:0]  sf_slot;
  logic        sf_load;
  logic [2:0]  nb;            // bits left for the current field
  logic [13:0] acc;
  logic        sf_skip;

  logic adv;
  assign res_adv = adv;

  // slot -> (long band, or short band/window) for the scalefactor layouts
  function automatic int slot_slen(input huff_state_e st, input int slot, input logic [3:0] c);
    int sfb;
    if (st == CALC_SF1) begin                 // mixed: long 0..7, then short 3..11 x3
      if (slot < 8) return slen1(int'(c));
      sfb = 3 + (slot - 8) / 3;
      return (sfb < 6) ? slen1(int'(c)) : slen2(int'(c));
    end else if (st == CALC_SF2) begin        // short 0..11 x3
      sfb = slot / 3;
      return (sfb < 6) ? slen1(int'(c)) : slen2(int'(c));
    end
    return (slot < 11) ? slen1(int'(c)) : slen2(int'(c));
  endfunction

  function automatic huff_state_e long_state(input int band);
    if (band < 6)  return CALC_SF4;
    if (band < 11) return CALC_SF5;
    if (band < 16) return CALC_SF6;
    return CALC_SF7;
  endfunction

  function automatic int long_group(input int band);
    if (band < 6)  return 0;
    if (band < 11) return 1;
    if (band < 16) return 2;
    return 3;
  endfunction

  logic is_long_sf;
  assign is_long_sf = (state == CALC_SF4) || (state == CALC_SF5) ||
                      (state == CALC_SF6) || (state == CALC_SF7);

  // ------------------------------------------------------- combinational control
  always_comb begin
    adv         = 1'b0;
    tbl_raddr   = node + TAW'(res_bit);
    res_set_ptr = (state == IDLE) && start;
    res_ptr     = start_ptr;
    mem         = '0;
    unique case (state)
      CALC_SF1, CALC_SF2, CALC_SF4, CALC_SF5, CALC_SF6, CALC_SF7:
        adv = !sf_load && (nb != 0);
      DO_LINBITS_X, DO_LINBITS_Y: adv = (lbc != 0);
      DO_LINBITS_SIGN_X: adv = (xv != 0);
      DO_LINBITS_SIGN_Y: adv = (yv != 0);
      SIGN_V: adv = q[3];
      SIGN_W: adv = q[2];
      SIGN_X: adv = q[1];
      SIGN_Y: adv = q[0];
      DEC_BV: tbl_raddr = TAW'(tsel);
      DEC_RC1: tbl_raddr = TAW'(32 + int'(g.count1table_select));
      HUFFMAN_LOOP, HUFFMAN_LOOP2: begin
        tbl_raddr = node + TAW'(res_bit);
        adv = !rd_pend && !root_pend;
      end
      WR_PAIR: begin
        mem.we    = 1'b1;
        mem.addr  = idx + line_t'(wcnt[0]);
        mem.wdata = wcnt[0] ? (ys ? -sample_t'(yv) : sample_t'(yv))
                            : (xs ? -sample_t'(xv) : sample_t'(xv));
      end
      WR_QUAD: begin
        mem.we    = 1'b1;
        mem.addr  = idx + line_t'(wcnt);
        mem.wdata = q[3 - wcnt] ? (qs[3 - wcnt] ? -32'sd1 : 32'sd1) : 32'sd0;
      end
      FILL_ZEROS: begin
        mem.we   = 1'b1;
        mem.addr = idx;
      end
      default: ;
    endcase
  end

  // table for the current big-values line
  always_comb begin
    if (idx < r1)      tsel = g.table_select[0];
    else if (idx < r2) tsel = g.table_select[1];
    else               tsel = g.table_select[2];
  end

  assign done = (state == READY);

  // ------------------------------------------------------------- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      g <= '0; grn <= 1'b0; scfsi_r <= '0; used <= '0; idx <= '0;
      r1 <= '0; r2 <= '0; bv_end <= '0; lb <= '0; lbc <= '0; rd_pend <= 1'b0; root_pend <= 1'b0;
      node <= '0; xv <= '0; yv <= '0; xs <= 1'b0; ys <= 1'b0; q <= '0; qs <= '0;
      wcnt <= '0; sf_slot <= '0; sf_load <= 1'b0; nb <= '0; acc <= '0; sf_skip <= 1'b0;
      scalefac_l <= '0; scalefac_s <= '0;
    end else begin
      if (adv) used <= used + 1'b1;
      unique case (state)
        IDLE: if (start) begin
          g       <= gi;
          grn     <= gr;
          scfsi_r <= scfsi;
          used    <= '0;
          state   <= CONT1;
        end
        CONT1: begin
          sf_slot <= '0;
          sf_load <= 1'b1;
          if (g.window_switching && g.block_type == 2'd2) state <= CONT2;
          else state <= CALC_SF4;
        end
        CONT2: state <= g.mixed_block ? CALC_SF1 : CALC_SF2;

        CALC_SF1, CALC_SF2, CALC_SF4, CALC_SF5, CALC_SF6, CALC_SF7: begin
          if (sf_load) begin
            // a band group whose scfsi bit is set in granule 1 carries no bits
            if (is_long_sf && grn && scfsi_r[3 - long_group(int'(sf_slot))]) begin
              nb      <= '0;
              sf_skip <= 1'b1;
            end else begin
              nb      <= 3'(slot_slen(state, int'(sf_slot), g.scalefac_compress));
              sf_skip <= 1'b0;
            end
            acc     <= '0;
            sf_load <= 1'b0;
          end else if (nb != 0) begin
            acc <= {acc[12:0], res_bit};
            nb  <= nb - 1'b1;
          end else begin
            // store the finished field
            if (state == CALC_SF2) begin
              scalefac_s[sf_slot / 3][sf_slot % 3] <= acc[3:0];
            end else if (state == CALC_SF1) begin
              if (sf_slot < 8) scalefac_l[sf_slot] <= acc[3:0];
              else scalefac_s[3 + (sf_slot - 8) / 3][(sf_slot - 8) % 3] <= acc[3:0];
            end else if (!sf_skip) begin
              scalefac_l[sf_slot] <= acc[3:0];
            end
            sf_slot <= sf_slot + 1'b1;
            sf_load <= 1'b1;
            if ((state == CALC_SF2 && sf_slot == 6'd35) ||
                (state == CALC_SF1 && sf_slot == 6'd34) ||
                ((state == CALC_SF4 || state == CALC_SF5 || state == CALC_SF6 ||
                  state == CALC_SF7) && sf_slot == 6'd20))
              state <= DONE_SF;
            else if (state != CALC_SF1 && state != CALC_SF2)
              state <= long_state(int'(sf_slot) + 1);
          end
        end

        DONE_SF: begin
          // bands that carry no scalefactor in the bitstream
          if (g.window_switching && g.block_type == 2'd2) scalefac_s[12] <= '0;
          else scalefac_l[21] <= '0;
          state <= INIT_DEC;
        end

        INIT_DEC: begin
          if (g.window_switching) begin
            r1 <= 10'd36;
            r2 <= 10'd576;
          end else begin
            r1 <= 10'(sfb_long(int'(g.region0_count) + 1));
            r2 <= 10'(sfb_long(int'(g.region0_count) + int'(g.region1_count) + 2));
          end
          bv_end <= (g.big_values > 9'd288) ? 10'd576 : {g.big_values, 1'b0};
          idx    <= '0;
          state  <= DEC_BV;
        end

        DEC_BV: begin
          if (idx >= bv_end) state <= DEC_RC1;
          else begin
            lb <= 4'(linbits(int'(tsel)));
            xs <= 1'b0; ys <= 1'b0;
            if (tsel == 5'd0 || tsel == 5'd4 || tsel == 5'd14) begin
              xv <= '0; yv <= '0; wcnt <= '0;
              state <= WR_PAIR;
            end else begin
              root_pend <= 1'b1;
              state <= HUFFMAN_LOOP;
            end
          end
        end

        HUFFMAN_LOOP, HUFFMAN_LOOP2: begin
          if (root_pend) begin
            node      <= tbl_rdata[TAW-1:0];
            root_pend <= 1'b0;
          end else if (!rd_pend) begin
            rd_pend <= 1'b1;            // address node+bit issued, bit consumed
          end else begin
            rd_pend <= 1'b0;
            if (tbl_rdata[15]) begin
              if (state == HUFFMAN_LOOP) begin
                xv <= 14'(tbl_rdata[7:4]);
                yv <= 14'(tbl_rdata[3:0]);
                state <= INIT_LOOP_LINBITS;
              end else begin
                q  <= tbl_rdata[3:0];
                qs <= '0;
                state <= SIGN_V;
              end
            end else begin
              node <= tbl_rdata[TAW-1:0];
            end
          end
        end

        INIT_LOOP_LINBITS: begin
          acc <= '0;
          lbc <= lb;
          if (xv == 14'd15 && lb != 0) state <= DO_LINBITS_X;
          else state <= DO_LINBITS_SIGN_X;
        end

        DO_LINBITS_X, DO_LINBITS_Y: begin
          if (lbc != 0) begin
            acc <= {acc[12:0], res_bit};
            lbc <= lbc - 1'b1;
          end else begin
            if (state == DO_LINBITS_X) begin
              xv    <= xv + acc;
              state <= DO_LINBITS_SIGN_X;
            end else begin
              yv    <= yv + acc;
              state <= DO_LINBITS_SIGN_Y;
            end
          end
        end

        DO_LINBITS_SIGN_X: begin
          if (xv != 0) xs <= res_bit;
          acc <= '0;
          lbc <= lb;
          if (yv == 14'd15 && lb != 0) state <= DO_LINBITS_Y;
          else state <= DO_LINBITS_SIGN_Y;
        end

        DO_LINBITS_SIGN_Y: begin
          if (yv != 0) ys <= res_bit;
          wcnt  <= '0;
          state <= WR_PAIR;
        end

        WR_PAIR: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt[0]) begin
            idx   <= idx + 10'd2;
            state <= DEC_BV;
          end
        end

        DEC_RC1: begin
          if (used >= 13'(g.part2_3_length) || idx > 10'd572) state <= FILL_ZEROS;
          else begin
            root_pend <= 1'b1;
            state <= HUFFMAN_LOOP2;
          end
        end

        SIGN_V: begin if (q[3]) qs[3] <= res_bit; state <= SIGN_W; end
        SIGN_W: begin if (q[2]) qs[2] <= res_bit; state <= SIGN_X; end
        SIGN_X: begin if (q[1]) qs[1] <= res_bit; state <= SIGN_Y; end
        SIGN_Y: begin if (q[0]) qs[0] <= res_bit; state <= DONE_HLOOP2; end

        DONE_HLOOP2: begin
          wcnt <= '0;
          if (used > 13'(g.part2_3_length)) state <= FILL_ZEROS;  // overrun: drop quad
          else state <= WR_QUAD;
        end

        WR_QUAD: begin
          wcnt <= wcnt + 1'b1;
          if (wcnt == 2'd3) begin
            idx   <= idx + 10'd4;
            state <= DEC_RC1;
          end
        end

        FILL_ZEROS: begin
          if (idx >= 10'd575) state <= READY;
          idx <= idx + 1'b1;
        end

        READY: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end
endmodule
