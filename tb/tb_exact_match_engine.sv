// tb_exact_match_engine: hands every position of a random text (with planted
// fault patterns) to the exact-match engine as a candidate. The trie of a
// 600-pattern set sits in a node memory with a random 1..8-cycle latency;
// text arrives gradually; match reports see random back-pressure. The
// reported (position, pattern id) pairs must equal a direct search of the
// text exactly, with no duplicates; done must pulse once per candidate; the
// engine must never use text before it arrives; candidates without a match
// must be counted as false positives.
module tb_exact_match_engine;
  import rfts_pkg::*;
  import rfts_tb_pkg::*;
  localparam int TEXT_LEN = 1500;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, cand_valid = 1'b0, cand_ready, done, nreq_valid, nreq_ready, nresp_valid = 1'b0;
  logic m_valid, m_ready;
  logic [31:0] text_len = 32'(TEXT_LEN), cand_pos = '0, sl_pos, avail_chars = '0, m_pos;
  logic [SLICE_LEN*8-1:0] sl_data;
  maddr_t nreq_addr;
  mdata_t nresp_data = '0;
  logic [PID_W-1:0] m_pid;
  logic [31:0] n_nodes, n_matches, n_false_pos;
  int checks = 0, failures = 0, dones = 0, dups = 0;
  bytes_t text;
  bit exp [longint];
  bit got [longint];
  logic [7:0] tarr [TEXT_LEN + 64];

  exact_match_engine u_dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  always_comb
    for (int i = 0; i < SLICE_LEN; i++) sl_data[i*8 +: 8] = tarr[(int'(sl_pos) + i) % (TEXT_LEN + 64)];

  // text arrives 16 characters every 4 cycles
  int tick = 0;
  always @(posedge clk) if (rst_n) begin
    tick <= tick + 1;
    if (tick % 4 == 0 && int'(avail_chars) < TEXT_LEN + 16) avail_chars <= avail_chars + 32'd16;
  end

  // node memory: accept when idle, answer after 1..8 cycles
  assign nreq_ready = 1'b1;
  initial begin
    forever begin
      @(posedge clk);
      if (nreq_valid && nreq_ready) begin
        maddr_t a;
        a = nreq_addr;
        repeat ($urandom_range(7)) @(posedge clk);
        #1 nresp_valid = 1'b1; nresp_data = img.exists(int'(a)) ? img[int'(a)] : '0;
        @(posedge clk);
        #1 nresp_valid = 1'b0;
      end
    end
  end

  // reports
  always @(posedge clk) begin
    m_ready <= ($urandom_range(2) != 0);
    if (rst_n && done) dones++;
    if (rst_n && u_dut.st == u_dut.E_SLICE && int'(avail_chars) >= int'(u_dut.need_end))
      chk(int'(sl_pos) + SLICE_LEN <= int'(avail_chars) || int'(sl_pos) + SLICE_LEN > TEXT_LEN,
          "slice used before its text arrived");
    if (m_valid && m_ready) begin
      longint k;
      k = longint'(m_pos) * 65536 + longint'(m_pid);
      if (got.exists(k)) dups++;
      got[k] = 1'b1;
    end
  end

  initial begin
    int ncand, nmatchpos;
    bit mp [longint];
    gen_patterns(600, 8, 30, 256);
    build_trie();
    gen_text(text, TEXT_LEN, 256, 60);
    reference(text, exp);
    foreach (tarr[i]) tarr[i] = (i < TEXT_LEN) ? text[i] : 8'h00;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    ncand = 0;
    for (int p = 0; p + WIN_LEN <= TEXT_LEN; p++) begin
      cand_valid = 1'b1; cand_pos = 32'(p);
      #1;
      chk(cand_ready, "ready when idle");
      @(negedge clk);                // accepted at the edge just passed
      cand_valid = 1'b0;
      ncand++;
      while (u_dut.st != u_dut.E_IDLE) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    foreach (exp[k]) mp[k / 65536] = 1'b1;
    nmatchpos = mp.size();
    chk(got.size() == exp.size(), $sformatf("%0d reports, %0d expected", got.size(), exp.size()));
    foreach (exp[k]) chk(got.exists(k), $sformatf("missed pattern %0d at %0d", k % 65536, k / 65536));
    foreach (got[k]) if (!exp.exists(k)) chk(1'b0, $sformatf("false report %0d at %0d", k % 65536, k / 65536));
    chk(dups == 0, "duplicate reports");
    chk(dones == ncand, $sformatf("done pulses %0d for %0d candidates", dones, ncand));
    chk(int'(n_matches) == exp.size(), "match counter");
    chk(int'(n_false_pos) == ncand - nmatchpos, "false-positive counter");
    $display("candidates %0d, matches %0d, nodes %0d, false positives %0d", ncand, n_matches, n_nodes, n_false_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
