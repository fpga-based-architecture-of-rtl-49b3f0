// mp3_decoder_top: the MP3 (MPEG-1 Layer III) decoding core.
//
// Bytes of an MP3 stream enter at in_data (valid/ready).  The synchronizer
// finds and validates each frame, parses its side information and copies its
// main data into the bit reservoir.  The controller then runs, per granule,
// the Huffman decoder (reading the reservoir bit by bit and writing 576
// integers to the main memory), the requantizer, the reorder stage, the
// alias-reduction butterflies, the IMDCT and the synthesis filterbank.  All of
// them work in place on the one 576-word main memory, and the requantizer,
// antialias and IMDCT share one multiplier; the controller's stage code picks
// who drives both.  The filterbank's PCM samples go through a 1024-sample FIFO
// to the I2S interface (bclk, ws, sd), whose divider makes the word clock
// from the system clock (24 MHz / 544 = 44.118 kHz).  pcm_valid/pcm_data
// mirror each sample as it enters the FIFO.  init_busy is high while the
// IMDCT overlap memory and the filterbank V memory are cleared after reset
// (1024 cycles); bit_pos is the reservoir read position in bits;
// fifo_level is the FIFO fill and sample_tick pulses once per output frame.
//
// Coefficient tables that the document takes from ISO/IEC 11172-3 without
// giving them, the Huffman code tables and the synthesis window D, are loaded
// through tbl_* and d_* before the first frame; all other tables are built in.
// One channel is decoded (channel 0 of a stereo stream), 44.1 kHz only.
module mp3_decoder_top
  import mp3_pkg::*;
#(
  parameter int RES_BYTES = 2048,
  parameter int TBL_DEPTH = 4096,
  parameter int FIFO_DEPTH = 1024,
  parameter int I2S_DIV   = 544
) (
  input  logic        clk,
  input  logic        rst_n,
  // MP3 byte stream
  input  logic        in_valid,
  input  logic [7:0]  in_data,
  output logic        in_ready,
  // Huffman table RAM load port
  input  logic        tbl_we,
  input  logic [$clog2(TBL_DEPTH)-1:0] tbl_addr,
  input  logic [15:0] tbl_wdata,
  // synthesis window RAM load port
  input  logic        d_we,
  input  logic [8:0]  d_addr,
  input  logic [19:0] d_wdata,
  // I2S output
  output logic        i2s_bclk,
  output logic        i2s_ws,
  output logic        i2s_sd,
  // status
  output logic        pcm_valid,
  output logic [15:0] pcm_data,
  output logic        bad_header,
  output logic        underflow,
  output logic [15:0] granules_done,
  output logic [2:0]  stage_code,
  output logic        init_busy,
  output logic [$clog2(FIFO_DEPTH):0] fifo_level,
  output logic        sample_tick,
  output logic [$clog2(RES_BYTES)+2:0] bit_pos
);
  localparam int RES_AW = $clog2(RES_BYTES);
  localparam int PW     = RES_AW + 3;

  // ------------------------------------------------------------ synchronizer
  logic              res_wr_en;
  logic [7:0]        res_wr_data;
  logic [RES_AW-1:0] res_wr_ptr;
  logic              frame_valid, frame_done;
  side_info_t        side_info;
  logic [RES_AW-1:0] main_start;

  synchronizer #(.RES_AW(RES_AW)) u_sync (
    .clk, .rst_n, .in_valid, .in_data, .in_ready,
    .res_wr_en, .res_wr_data, .res_wr_ptr,
    .frame_valid, .side_info, .main_start, .frame_done, .bad_header
  );

  // ------------------------------------------------------------ bit reservoir
  logic          res_set_ptr, res_adv, res_bit;
  logic [PW-1:0] res_ptr;

  bit_reservoir #(.BYTES(RES_BYTES)) u_res (
    .clk, .rst_n,
    .wr_en(res_wr_en), .wr_data(res_wr_data), .wr_ptr(res_wr_ptr),
    .set_ptr(res_set_ptr), .ptr_in(res_ptr), .adv(res_adv),
    .bit_out(res_bit), .bit_ptr(bit_pos)
  );

  // ------------------------------------------------------------ controller
  stage_e        stage;
  logic          gr;
  gr_info_t      gi;
  logic [PW-1:0] huff_ptr;
  logic start_huff, start_req, start_reord, start_alias, start_imdct, start_fbank;
  logic done_huff, done_req, done_reord, done_alias, done_imdct, done_fbank;

  controller #(.RES_AW(RES_AW)) u_ctrl (
    .clk, .rst_n, .frame_valid, .side_info, .main_start, .frame_done,
    .stage, .gr, .gi, .huff_ptr,
    .start_huff, .start_req, .start_reord, .start_alias, .start_imdct, .start_fbank,
    .done_huff, .done_req, .done_reord, .done_alias, .done_imdct, .done_fbank,
    .granules_done
  );
  assign stage_code = stage;

  // ------------------------------------------------------------ main memory
  mem_req_t m_huff, m_req, m_reord, m_alias, m_imdct, m_fbank, m_sel;
  sample_t  m_rdata;

  always_comb begin
    unique case (stage)
      ST_HUFF:  m_sel = m_huff;
      ST_REQ:   m_sel = m_req;
      ST_REORD: m_sel = m_reord;
      ST_ALIAS: m_sel = m_alias;
      ST_IMDCT: m_sel = m_imdct;
      ST_FBANK: m_sel = m_fbank;
      default:  m_sel = '0;
    endcase
  end

  main_mem #(.DEPTH(LINES)) u_mem (.clk, .req(m_sel), .rdata(m_rdata));

  // ------------------------------------------------------------ shared multiplier
  mul_req_t  mul_req, mul_alias, mul_imdct;
  mul_prod_t mul_prod;

  shared_mult u_mult (
    .stage, .req_req(mul_req), .alias_req(mul_alias), .imdct_req(mul_imdct), .prod(mul_prod)
  );

  // ------------------------------------------------------------ subcores
  sfl_t scalefac_l;
  sfs_t scalefac_s;

  huffman #(.TBL_DEPTH(TBL_DEPTH), .PW(PW)) u_huff (
    .clk, .rst_n, .start(start_huff), .gr, .gi, .scfsi(side_info.scfsi),
    .start_ptr(huff_ptr), .done(done_huff),
    .res_set_ptr, .res_ptr, .res_adv, .res_bit,
    .mem(m_huff), .scalefac_l, .scalefac_s,
    .tbl_we, .tbl_addr, .tbl_wdata
  );

  requantizer u_req (
    .clk, .rst_n, .start(start_req), .gi, .scalefac_l, .scalefac_s, .done(done_req),
    .mem(m_req), .mem_rdata(m_rdata), .mul(mul_req), .mul_prod
  );

  reorder u_reord (
    .clk, .rst_n, .start(start_reord), .gi, .done(done_reord),
    .mem(m_reord), .mem_rdata(m_rdata)
  );

  antialias u_alias (
    .clk, .rst_n, .start(start_alias), .gi, .done(done_alias),
    .mem(m_alias), .mem_rdata(m_rdata), .mul(mul_alias), .mul_prod
  );

  logic imdct_busy, fbank_busy;
  imdct u_imdct (
    .clk, .rst_n, .start(start_imdct), .gi, .done(done_imdct), .busy(imdct_busy),
    .mem(m_imdct), .mem_rdata(m_rdata), .mul(mul_imdct), .mul_prod
  );

  logic               fb_valid, fb_ready;
  logic signed [15:0] fb_data;
  filterbank u_fbank (
    .clk, .rst_n, .start(start_fbank), .done(done_fbank), .busy(fbank_busy),
    .mem(m_fbank), .mem_rdata(m_rdata),
    .pcm_valid(fb_valid), .pcm_data(fb_data), .pcm_ready(fb_ready),
    .d_we, .d_addr, .d_wdata(coef_t'(d_wdata))
  );

  assign init_busy = imdct_busy || fbank_busy;
  assign pcm_valid = fb_valid && fb_ready;
  assign pcm_data  = fb_data;

  // ------------------------------------------------------------ interface
  logic        fifo_valid, fifo_pop;
  logic [15:0] fifo_data;

  output_fifo #(.DEPTH(FIFO_DEPTH), .W(16)) u_fifo (
    .clk, .rst_n, .wr_valid(fb_valid), .wr_data(fb_data), .wr_ready(fb_ready),
    .rd_valid(fifo_valid), .rd_data(fifo_data), .rd_pop(fifo_pop), .count(fifo_level)
  );

  i2s_interface #(.DIV(I2S_DIV), .BITS(16)) u_i2s (
    .clk, .rst_n, .smp_valid(fifo_valid), .smp_data(fifo_data), .smp_pop(fifo_pop),
    .bclk(i2s_bclk), .ws(i2s_ws), .sd(i2s_sd), .word_tick(sample_tick), .underflow
  );
endmodule
