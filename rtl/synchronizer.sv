// synchronizer: finds MP3 frames in the input byte stream, checks their
// headers, extracts the side information and copies the main data into the
// bit reservoir.
//
// State machine (names as in the document): FIND_SYNC looks for the 12-bit
// sync word of ones (searched at byte boundaries: a 0xFF byte followed by a
// byte whose upper nibble is 0xF); HEADER collects the rest of the 32-bit
// header; VALIDATE rejects a header whose id, layer, bitrate or sampling
// frequency field is reserved (or is not MPEG-1 Layer III at 44.1 kHz, the
// only rate this core decodes) and goes to RESTART; SIDE_INFO skips the
// optional CRC word and collects the 17-byte (single channel) or 32-byte
// side information; MAIN_DATA writes the remaining bytes of the frame to the
// bit reservoir; DECODE presents the frame (frame_valid, side_info,
// main_start) until the controller answers frame_done; RESTART clears the
// search state and returns to FIND_SYNC.
//
// The frame length is 144*bitrate/44.1 kHz bytes plus the padding byte.  For a
// stereo stream only channel 0 is decoded (the document's core is mono); the
// part2_3_length of channel 1 is passed on so that its bits can be skipped.
// Input handshake: a byte is taken on each cycle with in_valid && in_ready.
module synchronizer
  import mp3_pkg::*;
#(
  parameter int RES_AW = 11
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [7:0]        in_data,
  output logic              in_ready,
  // bit reservoir write port
  output logic              res_wr_en,
  output logic [7:0]        res_wr_data,
  input  logic [RES_AW-1:0] res_wr_ptr,
  // frame hand-off to the controller
  output logic              frame_valid,
  output side_info_t        side_info,
  output logic [RES_AW-1:0] main_start,   // reservoir address of this frame's main data
  input  logic              frame_done,
  output logic              bad_header    // pulses when VALIDATE rejects a header
);
  typedef enum logic [2:0] {
    FIND_SYNC, HEADER, VALIDATE, SIDE_INFO, MAIN_DATA, DECODE, RESTART
  } sync_state_e;

  sync_state_e state;
  logic [31:0]  hdr;
  logic [1:0]   hdr_cnt;
  logic [255:0] si_vec;
  logic [5:0]   si_cnt;      // side-info bytes still to collect (incl. CRC)
  logic [1:0]   crc_cnt;
  logic [10:0]  main_cnt;    // main-data bytes still to copy
  logic         take;

  // 144000*bitrate/44100 (truncated) for the Layer III bitrate index.
  function automatic int frame_bytes(input logic [3:0] idx);
    int br;
    case (idx)
      4'd1: br = 32;   4'd2: br = 40;   4'd3: br = 48;   4'd4: br = 56;
      4'd5: br = 64;   4'd6: br = 80;   4'd7: br = 96;   4'd8: br = 112;
      4'd9: br = 128;  4'd10: br = 160; 4'd11: br = 192; 4'd12: br = 224;
      4'd13: br = 256; 4'd14: br = 320; default: br = 0;
    endcase
    return (144000 * br) / 44100;
  endfunction

  // Field of n (<= 12) bits at MSB-first position pos of v.
  function automatic logic [11:0] get(input logic [255:0] v, input int pos, input int n);
    logic [255:0] t;
    t = v << pos;
    return t[255 -: 12] >> (12 - n);
  endfunction

  function automatic side_info_t parse(input logic [255:0] v, input bit st, input logic [1:0] md);
    side_info_t s;
    int p;
    int nch;
    s = '0;
    nch = st ? 2 : 1;
    s.stereo = st;
    s.mode   = md;
    p = 0;
    s.main_data_begin = 9'(get(v, p, 9)); p += 9;
    p += st ? 3 : 5;                         // private bits
    s.scfsi = 4'(get(v, p, 4)); p += 4 * nch;
    for (int g = 0; g < 2; g++) begin
      for (int c = 0; c < nch; c++) begin
        gr_info_t gi;
        logic [11:0] p23;
        gi = '0;
        p23 = get(v, p, 12); p += 12;
        gi.part2_3_length    = p23;
        gi.big_values        = 9'(get(v, p, 9)); p += 9;
        gi.global_gain       = 8'(get(v, p, 8)); p += 8;
        gi.scalefac_compress = 4'(get(v, p, 4)); p += 4;
        gi.window_switching  = get(v, p, 1) != 0; p += 1;
        // both layouts of the next 22 bits are decoded at fixed offsets
        if (gi.window_switching) begin
          gi.block_type      = 2'(get(v, p, 2));
          gi.mixed_block     = get(v, p + 2, 1) != 0;
          gi.table_select[0] = 5'(get(v, p + 3, 5));
          gi.table_select[1] = 5'(get(v, p + 8, 5));
          gi.subblock_gain[0] = 3'(get(v, p + 13, 3));
          gi.subblock_gain[1] = 3'(get(v, p + 16, 3));
          gi.subblock_gain[2] = 3'(get(v, p + 19, 3));
          gi.region0_count   = (gi.block_type == 2'd2 && !gi.mixed_block) ? 4'd8 : 4'd7;
          gi.region1_count   = 3'd0;
        end else begin
          gi.table_select[0] = 5'(get(v, p, 5));
          gi.table_select[1] = 5'(get(v, p + 5, 5));
          gi.table_select[2] = 5'(get(v, p + 10, 5));
          gi.region0_count   = 4'(get(v, p + 15, 4));
          gi.region1_count   = 3'(get(v, p + 19, 3));
        end
        p += 22;
        gi.preflag            = get(v, p, 1) != 0; p += 1;
        gi.scalefac_scale     = get(v, p, 1) != 0; p += 1;
        gi.count1table_select = get(v, p, 1) != 0; p += 1;
        if (c == 0) s.gr[g] = gi;
        else        s.p23_other[g] = p23;
      end
    end
    return s;
  endfunction

  logic       hdr_ok;
  logic       is_stereo;
  logic [5:0] side_len;
  logic signed [31:0] flen;

  always_comb begin
    hdr_ok = (hdr[31:20] == 12'hFFF) && hdr[19] && (hdr[18:17] == 2'b01) &&
             (hdr[15:12] != 4'h0) && (hdr[15:12] != 4'hF) && (hdr[11:10] == 2'b00);
    is_stereo = (hdr[7:6] != 2'b11);
    side_len  = is_stereo ? 6'd32 : 6'd17;
    flen      = frame_bytes(hdr[15:12]) + int'(hdr[9]);
  end

  always_comb begin
    unique case (state)
      FIND_SYNC, HEADER, SIDE_INFO: in_ready = 1'b1;
      MAIN_DATA: in_ready = (main_cnt != 0);
      default: in_ready = 1'b0;
    endcase
  end
  assign take        = in_valid && in_ready;
  assign res_wr_en   = take && (state == MAIN_DATA);
  assign res_wr_data = in_data;
  assign frame_valid = (state == DECODE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= FIND_SYNC;
      hdr        <= '0;
      hdr_cnt    <= '0;
      si_vec     <= '0;
      si_cnt     <= '0;
      crc_cnt    <= '0;
      main_cnt   <= '0;
      side_info  <= '0;
      main_start <= '0;
      bad_header <= 1'b0;
    end else begin
      bad_header <= 1'b0;
      unique case (state)
        FIND_SYNC: if (take) begin
          hdr <= {hdr[23:0], in_data};
          if (hdr[7:0] == 8'hFF && in_data[7:4] == 4'hF) begin
            state   <= HEADER;
            hdr_cnt <= 2'd2;
          end
        end
        HEADER: if (take) begin
          hdr     <= {hdr[23:0], in_data};
          hdr_cnt <= hdr_cnt - 1'b1;
          if (hdr_cnt == 2'd1) state <= VALIDATE;
        end
        VALIDATE: begin
          if (hdr_ok) begin
            state    <= SIDE_INFO;
            crc_cnt  <= hdr[16] ? 2'd0 : 2'd2;
            si_cnt   <= side_len;
            main_cnt <= 11'(flen - 4 - int'(side_len) - (hdr[16] ? 0 : 2));
          end else begin
            state      <= RESTART;
            bad_header <= 1'b1;
          end
        end
        SIDE_INFO: if (take) begin
          if (crc_cnt != 0) crc_cnt <= crc_cnt - 1'b1;
          else begin
            si_vec <= {si_vec[247:0], in_data};
            si_cnt <= si_cnt - 1'b1;
            if (si_cnt == 6'd1) begin
              state      <= MAIN_DATA;
              main_start <= res_wr_ptr;
            end
          end
        end
        MAIN_DATA: begin
          if (main_cnt == 0) begin
            state     <= DECODE;
            side_info <= is_stereo ? parse(si_vec, 1'b1, hdr[7:6]) : parse(si_vec << 120, 1'b0, hdr[7:6]);
          end else if (take) begin
            main_cnt <= main_cnt - 1'b1;
            if (main_cnt == 11'd1) begin
              state     <= DECODE;
              side_info <= is_stereo ? parse(si_vec, 1'b1, hdr[7:6]) : parse(si_vec << 120, 1'b0, hdr[7:6]);
            end
          end
        end
        DECODE: if (frame_done) state <= RESTART;
        RESTART: begin
          state <= FIND_SYNC;
          hdr   <= '0;
        end
        default: state <= RESTART;
      endcase
    end
  end
endmodule
