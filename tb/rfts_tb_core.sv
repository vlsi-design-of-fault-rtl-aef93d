// rfts_tb_core: end-to-end test of rfts_top (instantiated with its default
// parameters) against the off-chip memory model.
//
// For each of NRUNS runs it generates a fault-pattern set, loads the
// shift-signature table through the configuration port and the trie into the
// memory model, flushes the node cache (a reconfiguration of the fault
// database), generates a text with planted patterns, runs the checker and
// compares the reported (position, pattern id) pairs with a direct search of
// the text. It counts how often each mechanism of the design occurred and
// fails a run in which one never did: shift skips, signature rejects,
// candidates, false positives, matches, sibling-chain steps, descents to a
// child, node-cache hits and misses, memory back-pressure, text-buffer-full
// stalls of the pump, match back-pressure, and reconfiguration.
module rfts_tb_core #(
  parameter int NPAT     = 2000,
  parameter int MINL     = 8,
  parameter int MAXL     = 40,
  parameter int ALPHA    = 256,
  parameter int TEXT_LEN = 3000,
  parameter int PLANTS   = 60,
  parameter int NRUNS    = 2,
  parameter int WATCHDOG = 2_000_000,
  // Code-word mode: when WORDn is not 0, run n uses patterns of exactly WORDn
  // characters (whole code words) planted at multiples of WORDn.
  parameter int WORD0    = 0,
  parameter int WORD1    = 0
) ();
  import rfts_pkg::*;
  import rfts_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              start = 1'b0, sst_we = 1'b0, cache_flush = 1'b0, match_ready;
  maddr_t            text_base;
  logic [31:0]       text_len;
  logic [SST_AW-1:0] sst_waddr;
  logic [SST_DW-1:0] sst_wdata;
  logic              busy, done, match_valid;
  logic [PID_W-1:0]  match_pid;
  logic [31:0]       match_pos;
  logic              mem_req_valid, mem_req_ready, mem_resp_valid;
  maddr_t            mem_req_addr;
  mdata_t            mem_resp_data;
  logic [31:0] st_shift, st_sig_reject, st_cand, st_false_pos, st_matches,
               st_nodes, st_cache_hits, st_cache_misses;

  rfts_top u_dut (
    .clk, .rst_n, .start, .text_base, .text_len, .busy, .done,
    .sst_we, .sst_waddr, .sst_wdata, .cache_flush,
    .mem_req_valid, .mem_req_ready, .mem_req_addr, .mem_resp_valid, .mem_resp_data,
    .match_valid, .match_ready, .match_pid, .match_pos,
    .st_shift, .st_sig_reject, .st_cand, .st_false_pos, .st_matches,
    .st_nodes, .st_cache_hits, .st_cache_misses
  );

  offchip_mem_model u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_addr(mem_req_addr),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data)
  );

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles <= cycles + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters (observed at the design's internal signals) -------
  int unsigned ev_sibling = 0, ev_child = 0, ev_mem_stall = 0, ev_pump_full = 0,
               ev_match_bp = 0, ev_reconfig = 0;
  always @(posedge clk) if (rst_n) begin
    if (u_dut.u_eme.st == u_dut.u_eme.E_CMP && !u_dut.u_eme.eq &&
        u_dut.u_eme.node_q.valid && u_dut.u_eme.node_q.sibling != '0) ev_sibling++;
    if (u_dut.u_eme.st == u_dut.u_eme.E_CMP && u_dut.u_eme.eq &&
        u_dut.u_eme.node_q.slen == 3'(SLICE_LEN) && u_dut.u_eme.node_q.child != '0) ev_child++;
    if (mem_req_valid && !mem_req_ready) ev_mem_stall++;
    if (u_dut.u_pump.busy && u_dut.u_pump.issued < u_dut.u_pump.n_words &&
        u_dut.u_tbuf.space == '0) ev_pump_full++;
    if (match_valid && !match_ready) ev_match_bp++;
  end

  // ---- collect reports ----------------------------------------------------------
  bit got [longint];
  int dup_reports = 0;
  always @(posedge clk) begin
    match_ready <= ($urandom_range(3) != 0);
    if (match_valid && match_ready) begin
      longint k;
      k = longint'(match_pos) * 65536 + longint'(match_pid);
      if (got.exists(k)) dup_reports++;
      got[k] = 1'b1;
    end
  end

  bytes_t text;
  bit     exp [longint];

  task automatic load_tables();
    build_sst();
    build_trie();
    for (int i = 0; i < 2**SST_AW; i++) begin
      @(negedge clk);
      sst_we = 1'b1; sst_waddr = SST_AW'(i); sst_wdata = sst_img[i];
    end
    @(negedge clk) sst_we = 1'b0;
    for (int i = 0; i < 2**ROOT_AW; i++) u_mem.mem[i] = '0;
    foreach (img[a]) u_mem.mem[a] = img[a];
    cache_flush = 1'b1;
    @(negedge clk) cache_flush = 1'b0;
    ev_reconfig++;
  endtask

  task automatic run_once(int r, int word);
    int unsigned nwords;
    longint t0;
    gen_text(text, TEXT_LEN, ALPHA, PLANTS, (word != 0) ? word : 1);
    reference(text, exp);
    // text lives above the trie nodes
    text_base = maddr_t'(next_free + 16);
    nwords = (TEXT_LEN + CHARS_PER_WORD - 1) / CHARS_PER_WORD;
    for (int w = 0; w < int'(nwords); w++) begin
      mdata_t d;
      d = '0;
      for (int c = 0; c < CHARS_PER_WORD; c++)
        if (w*CHARS_PER_WORD + c < TEXT_LEN) d[c*8 +: 8] = text[w*CHARS_PER_WORD + c];
      u_mem.mem[int'(text_base) + w] = d;
    end
    got.delete();
    dup_reports = 0;
    text_len = 32'(TEXT_LEN);
    @(negedge clk) start = 1'b1;
    t0 = cycles;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    repeat (4) @(negedge clk);
    $display("run %0d: %0d patterns, %0d trie nodes, %0d chars, %0d cycles; shift %0d, sig-reject %0d, cand %0d, false-pos %0d, matches %0d (expected %0d), nodes %0d, cache hit/miss %0d/%0d",
             r, pats.size(), n_nodes_built, TEXT_LEN, cycles - t0, st_shift, st_sig_reject,
             st_cand, st_false_pos, st_matches, exp.size(), st_nodes, st_cache_hits, st_cache_misses);
    check(got.size() == exp.size(), $sformatf("run %0d: %0d distinct reports, %0d expected", r, got.size(), exp.size()));
    foreach (exp[k]) check(got.exists(k), $sformatf("run %0d: missed pattern %0d at %0d", r, k % 65536, k / 65536));
    foreach (got[k]) if (!exp.exists(k)) check(1'b0, $sformatf("run %0d: false report pattern %0d at %0d", r, k % 65536, k / 65536));
    check(dup_reports == 0, "duplicate reports");
    check(int'(st_matches) == exp.size(), "match counter");
    // Every position is accounted for exactly once by the filter.
    check(st_cand == st_false_pos + 32'(count_match_positions()), "candidates = false positives + matching positions");
  endtask

  function automatic int count_match_positions();
    bit pos [longint];
    foreach (exp[k]) pos[k / 65536] = 1'b1;
    return pos.size();
  endfunction

  int unsigned tot_shift = 0, tot_rej = 0, tot_cand = 0, tot_fp = 0, tot_match = 0, tot_hit = 0, tot_miss = 0;

  initial begin
    text_base = '0; text_len = '0; sst_waddr = '0; sst_wdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NRUNS; r++) begin
      int word;
      word = (r == 0) ? WORD0 : (r == 1) ? WORD1 : 0;
      if (word != 0) gen_patterns(NPAT, word, word, ALPHA);
      else           gen_patterns(NPAT, MINL, MAXL, ALPHA);
      load_tables();
      run_once(r, word);
      tot_shift += st_shift; tot_rej += st_sig_reject; tot_cand += st_cand;
      tot_fp += st_false_pos; tot_match += st_matches;
      tot_hit = st_cache_hits; tot_miss = st_cache_misses;
    end
    $display("mechanisms: shift %0d, sig-reject %0d, candidate %0d, false-pos %0d, match %0d, sibling %0d, child %0d, cache hit %0d, cache miss %0d, mem stall %0d, pump buffer-full %0d, match back-pressure %0d, reconfig %0d",
             tot_shift, tot_rej, tot_cand, tot_fp, tot_match, ev_sibling, ev_child, tot_hit, tot_miss,
             ev_mem_stall, ev_pump_full, ev_match_bp, ev_reconfig);
    check(tot_shift > 0, "shift skip never happened");
    check(tot_rej > 0, "signature reject never happened");
    check(tot_cand > 0, "candidate never happened");
    check(tot_fp > 0, "false positive never happened");
    check(tot_match > 0, "match never happened");
    check(ev_sibling > 0, "sibling step never happened");
    check(ev_child > 0, "child descent never happened");
    check(tot_hit > 0, "cache hit never happened");
    check(tot_miss > 0, "cache miss never happened");
    check(ev_mem_stall > 0, "memory back-pressure never happened");
    check(ev_pump_full > 0, "text buffer full never happened");
    check(ev_match_bp > 0, "match back-pressure never happened");
    check(ev_reconfig > 1, "reconfiguration never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
