// mp3_pkg: types, constants and coefficient functions shared by the MP3
// decoding core.
//
// Number formats (this design's choice): every spectral or time-domain value
// travels as a 32-bit signed fixed-point word with FRAC=20 fractional bits
// (range +-2048).  Trigonometric and gain coefficients are 20-bit signed with
// COEF_FRAC=18 fractional bits (range +-2).  The scalefactor band tables are the
// 44.1 kHz tables of ISO/IEC 11172-3; only 44.1 kHz streams are decoded.
// Coefficient tables that follow from a closed formula (cosines, sines, alias
// reduction constants, 2^(k/4) gain correction, |x|^(4/3)) are computed here at
// elaboration time, so the ROMs need no data files.
package mp3_pkg;

  localparam int FRAC      = 20;
  localparam int COEF_FRAC = 18;
  localparam int LINES     = 576;   // frequency lines per granule

  typedef logic signed [31:0] sample_t;
  typedef logic signed [19:0] coef_t;
  typedef logic [9:0]         line_t;   // 0..575

  // Pipeline stage that currently owns the main memory and the shared
  // multiplier.
  typedef enum logic [2:0] {
    ST_IDLE, ST_HUFF, ST_REQ, ST_REORD, ST_ALIAS, ST_IMDCT, ST_FBANK
  } stage_e;

  // Request from a subcore to the shared main memory (read data returns one
  // cycle after the address).
  typedef struct packed {
    line_t   addr;
    logic    we;
    sample_t wdata;
  } mem_req_t;

  // Operands for the shared multiplier: a 32-bit sample times a 20-bit
  // coefficient, full 52-bit product returned combinationally.
  typedef struct packed {
    logic signed [31:0] a;
    coef_t              b;
  } mul_req_t;
  typedef logic signed [51:0] mul_prod_t;

  // Granule/channel side information (one channel is decoded).
  typedef struct packed {
    logic [11:0] part2_3_length;
    logic [8:0]  big_values;
    logic [7:0]  global_gain;
    logic [3:0]  scalefac_compress;
    logic        window_switching;
    logic [1:0]  block_type;
    logic        mixed_block;
    logic [2:0][4:0] table_select;
    logic [2:0][2:0] subblock_gain;
    logic [3:0]  region0_count;
    logic [2:0]  region1_count;
    logic        preflag;
    logic        scalefac_scale;
    logic        count1table_select;
  } gr_info_t;

  typedef struct packed {
    logic [8:0]      main_data_begin;
    logic [3:0]      scfsi;
    logic [1:0][11:0] p23_other;   // part2_3_length of channel 1 (stereo), per granule
    logic            stereo;
    logic [1:0]      mode;
    gr_info_t [1:0]  gr;
  } side_info_t;

  // Scalefactor storage handed from the Huffman subcore to the requantizer.
  typedef logic [21:0][3:0]      sfl_t;   // long bands 0..21
  typedef logic [12:0][2:0][3:0] sfs_t;   // short bands 0..12, windows 0..2

  // Scalefactor band boundaries, 44.1 kHz.
  function automatic int sfb_long(input int b);
    case (b)
      0: return 0;    1: return 4;    2: return 8;    3: return 12;
      4: return 16;   5: return 20;   6: return 24;   7: return 30;
      8: return 36;   9: return 44;   10: return 52;  11: return 62;
      12: return 74;  13: return 90;  14: return 110; 15: return 134;
      16: return 162; 17: return 196; 18: return 238; 19: return 288;
      20: return 342; 21: return 418; default: return 576;
    endcase
  endfunction

  function automatic int sfb_short(input int b);
    case (b)
      0: return 0;   1: return 4;   2: return 8;   3: return 12;
      4: return 16;  5: return 22;  6: return 30;  7: return 40;
      8: return 52;  9: return 66;  10: return 84; 11: return 106;
      12: return 136; default: return 192;
    endcase
  endfunction

  function automatic int pretab(input int b);
    case (b)
      11, 12, 13, 14: return 1;
      15, 16: return 2;
      17, 18, 19: return 3;
      20: return 2;
      default: return 0;
    endcase
  endfunction

  // Linbits of Huffman tables 0..31.
  function automatic int linbits(input int t);
    case (t)
      16: return 1;  17: return 2;  18: return 3;  19: return 4;
      20: return 6;  21: return 8;  22: return 10; 23: return 13;
      24: return 4;  25: return 5;  26: return 6;  27: return 7;
      28: return 8;  29: return 9;  30: return 11; 31: return 13;
      default: return 0;
    endcase
  endfunction

  // slen1/slen2 selected by scalefac_compress.
  function automatic int slen1(input int c);
    case (c)
      4, 11, 12, 13: return 3;
      5, 6, 7: return 1;
      8, 9, 10: return 2;
      14, 15: return 4;
      default: return 0;
    endcase
  endfunction

  function automatic int slen2(input int c);
    case (c)
      1, 5, 8, 11: return 1;
      2, 6, 9, 12, 14: return 2;
      3, 7, 10, 13, 15: return 3;
      default: return 0;
    endcase
  endfunction

  localparam real PI = 3.14159265358979323846;

  function automatic coef_t to_coef(input real v, input int frac);
    real s;
    s = v * (2.0 ** frac);
    return coef_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  // Quarter-wave based cosine table cos(pi*j/72), j = 0..143, used by the
  // IMDCT for its transform kernel and (as a shifted sine) for its windows.
  typedef coef_t cos144_t [144];
  function automatic cos144_t make_cos144();
    cos144_t t;
    for (int j = 0; j < 144; j++) t[j] = to_coef($cos(PI * j / 72.0), COEF_FRAC);
    return t;
  endfunction

  // Alias reduction constants cs_i, ca_i from c_i of the standard.
  function automatic real aa_c(input int i);
    case (i)
      0: return -0.6;    1: return -0.535;  2: return -0.33;   3: return -0.185;
      4: return -0.095;  5: return -0.041;  6: return -0.0142; default: return -0.0037;
    endcase
  endfunction

  // Saturating conversion of a wide value to sample_t.
  function automatic sample_t sat32(input logic signed [63:0] v);
    if (v > 64'sh7FFF_FFFF) return sample_t'(32'h7FFF_FFFF);
    if (v < -64'sh8000_0000) return sample_t'(32'h8000_0000);
    return sample_t'(v[31:0]);
  endfunction

endpackage
