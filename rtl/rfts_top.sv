// rfts_top: Reconfigurable Fault Tolerant System (RFTS) checker.
//
// The checker scans a block of data read from a memory (the "text", a string
// of 8-bit characters) for every fault pattern held in a reloadable fault
// database, and reports each occurrence with its pattern id and position.
// It is a two-stage pattern matcher:
//   text_pump          prefetches the text from off-chip memory into
//   text_buffer        a sliding window, read by
//   filtering_engine   which skips safe positions using the on-chip
//   ss_table           shift-signature table (shift values and Bloom
//                      signatures merged in one 32 KB table), and hands the
//                      rare candidate positions to
//   exact_match_engine which confirms them by walking a compact trie in
//                      off-chip memory through
//   node_cache         a trie-node cache, and
//   load_store_if      which shares the memory port with the text pump.
// Reconfiguration: the shift-signature table is written through the sst_*
// port and the trie is written into off-chip memory by the host; pulse
// cache_flush after the trie changes. Neither table changes the logic.
//
// Operation: with the tables loaded, pulse start with text_base (memory word
// address of the text) and text_len (characters). Matches stream out on
// match_valid/match_ready; done rises when the whole text has been checked
// and every candidate verified, and stays high until the next start.
// Memory port: valid/ready read requests, one per cycle; read data returns in
// request order with mem_resp_valid after any latency.
module rfts_top
  import rfts_pkg::*;
#(
  parameter int unsigned TBUF_WORDS  = 16,   // text buffer, 128-bit words
  parameter int unsigned CACHE_LINES = 64,   // node cache lines
  parameter int unsigned OUTST       = 8     // reads in flight at the memory
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  logic              start,
  input  maddr_t            text_base,
  input  logic [31:0]       text_len,
  output logic              busy,
  output logic              done,
  // shift-signature table load
  input  logic              sst_we,
  input  logic [SST_AW-1:0] sst_waddr,
  input  logic [SST_DW-1:0] sst_wdata,
  input  logic              cache_flush,
  // off-chip memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output maddr_t            mem_req_addr,
  input  logic              mem_resp_valid,
  input  mdata_t            mem_resp_data,
  // fault reports
  output logic              match_valid,
  input  logic              match_ready,
  output logic [PID_W-1:0]  match_pid,
  output logic [31:0]       match_pos,
  // statistics
  output logic [31:0]       st_shift,
  output logic [31:0]       st_sig_reject,
  output logic [31:0]       st_cand,
  output logic [31:0]       st_false_pos,
  output logic [31:0]       st_matches,
  output logic [31:0]       st_nodes,
  output logic [31:0]       st_cache_hits,
  output logic [31:0]       st_cache_misses
);
  // text buffer / pump
  logic [31:0]                      avail_chars, ptr, sl_pos;
  logic [$clog2(TBUF_WORDS+1)-1:0]  space;
  logic                             buf_clear, buf_wr, pump_busy;
  mdata_t                           buf_wdata;
  logic [WIN_LEN*8-1:0]             win_data;
  logic [SLICE_LEN*8-1:0]           sl_data;
  // table
  logic                             sst_rd_en;
  logic [SST_AW-1:0]                sst_rd_addr;
  logic [SST_DW-1:0]                sst_rd_data;
  // engines
  logic                             cand_valid, cand_ready, eme_done, fe_busy, fe_done;
  logic [31:0]                      cand_pos;
  logic                             nreq_valid, nreq_ready, nresp_valid;
  maddr_t                           nreq_addr;
  mdata_t                           nresp_data;
  // memory clients: 0 = text pump, 1 = node cache
  logic [1:0]                       c_req_valid, c_req_ready, c_resp_valid;
  maddr_t                           c_req_addr [2];
  mdata_t                           c_resp_data;

  text_pump #(.DEPTH(TBUF_WORDS)) u_pump (
    .clk, .rst_n, .start, .text_base, .text_len,
    .buf_space (space),
    .req_valid (c_req_valid[0]), .req_ready (c_req_ready[0]), .req_addr (c_req_addr[0]),
    .resp_valid(c_resp_valid[0]), .resp_data(c_resp_data),
    .buf_clear, .buf_wr, .buf_wdata, .busy(pump_busy)
  );

  text_buffer #(.DEPTH(TBUF_WORDS)) u_tbuf (
    .clk, .rst_n, .clear(buf_clear),
    .wr_valid(buf_wr), .wr_data(buf_wdata),
    .avail_chars, .space, .release_pos(ptr),
    .win_pos(ptr), .win_data, .sl_pos, .sl_data
  );

  ss_table u_sst (
    .clk, .we(sst_we), .waddr(sst_waddr), .wdata(sst_wdata),
    .rd_en(sst_rd_en), .rd_addr(sst_rd_addr), .rd_data(sst_rd_data)
  );

  filtering_engine u_fe (
    .clk, .rst_n, .start, .text_len, .busy(fe_busy), .done(fe_done),
    .ptr, .win_data, .avail_chars,
    .sst_rd_en, .sst_rd_addr, .sst_rd_data(sst_entry_t'(sst_rd_data)),
    .cand_valid, .cand_ready, .cand_pos, .eme_done,
    .n_shift(st_shift), .n_sig_reject(st_sig_reject), .n_cand(st_cand)
  );

  exact_match_engine u_eme (
    .clk, .rst_n, .start, .text_len,
    .cand_valid, .cand_ready, .cand_pos, .done(eme_done),
    .sl_pos, .sl_data, .avail_chars,
    .nreq_valid, .nreq_ready, .nreq_addr, .nresp_valid, .nresp_data,
    .m_valid(match_valid), .m_ready(match_ready), .m_pid(match_pid), .m_pos(match_pos),
    .n_nodes(st_nodes), .n_matches(st_matches), .n_false_pos(st_false_pos)
  );

  node_cache #(.LINES(CACHE_LINES)) u_cache (
    .clk, .rst_n, .flush(cache_flush),
    .req_valid(nreq_valid), .req_ready(nreq_ready), .req_addr(nreq_addr),
    .resp_valid(nresp_valid), .resp_data(nresp_data),
    .m_req_valid(c_req_valid[1]), .m_req_ready(c_req_ready[1]), .m_req_addr(c_req_addr[1]),
    .m_resp_valid(c_resp_valid[1]), .m_resp_data(c_resp_data),
    .hits(st_cache_hits), .misses(st_cache_misses)
  );

  load_store_if #(.NC(2), .OUTST(OUTST)) u_lsif (
    .clk, .rst_n,
    .c_req_valid, .c_req_ready, .c_req_addr, .c_resp_valid, .c_resp_data,
    .m_req_valid(mem_req_valid), .m_req_ready(mem_req_ready), .m_req_addr(mem_req_addr),
    .m_resp_valid(mem_resp_valid), .m_resp_data(mem_resp_data)
  );

  // The run is over when the filter has passed the end of the text (it only
  // gets there after its last candidate is verified) and the pump is idle.
  assign done = fe_done && !pump_busy;
  assign busy = fe_busy || pump_busy;
endmodule
