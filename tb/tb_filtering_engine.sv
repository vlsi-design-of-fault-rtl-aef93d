// tb_filtering_engine: runs the filtering engine over a random text with
// planted fault patterns, with the shift-signature table built from a
// 500-pattern set, text arriving 16 characters at a time, and a stand-in
// exact-match engine that takes a random time per candidate. Checks: every
// position where a pattern really starts (direct search) is handed on as a
// candidate (the filter has no false negatives); candidates come in strictly
// increasing order; the engine never reads a window beyond the characters
// available; the statistics add up; shifts, signature rejects and candidates
// all occur; done is reached with the window past the end of the text.
module tb_filtering_engine;
  import rfts_pkg::*;
  import rfts_tb_pkg::*;
  localparam int TEXT_LEN = 4000;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0, busy, done, sst_rd_en, cand_valid, cand_ready, eme_done = 1'b0;
  logic [31:0] text_len = 32'(TEXT_LEN), ptr, avail_chars = '0, cand_pos;
  logic [WIN_LEN*8-1:0] win_data;
  logic [SST_AW-1:0] sst_rd_addr;
  sst_entry_t sst_rd_data;
  logic [31:0] n_shift, n_sig_reject, n_cand;
  int checks = 0, failures = 0;
  bytes_t text;
  bit exp [longint];
  int cands[$];

  filtering_engine u_dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // table: one-cycle read
  always @(posedge clk) if (sst_rd_en) sst_rd_data <= sst_entry_t'(sst_img[sst_rd_addr]);
  // window
  logic [7:0] tarr [TEXT_LEN + 64];
  always_comb
    for (int i = 0; i < WIN_LEN; i++)
      win_data[i*8 +: 8] = tarr[(int'(ptr) + i) % (TEXT_LEN + 64)];
  // text arrives 16 characters every 3 cycles
  int tick = 0;
  always @(posedge clk) if (rst_n) begin
    tick <= tick + 1;
    if (tick % 3 == 0 && int'(avail_chars) < TEXT_LEN + 16) avail_chars <= avail_chars + 32'd16;
    if (sst_rd_en) chk(int'(ptr) + WIN_LEN <= int'(avail_chars), "window read before its text arrived");
  end
  // stand-in exact-match engine
  assign cand_ready = 1'b1;
  initial begin
    forever begin
      @(posedge clk);
      if (cand_valid && cand_ready) begin
        cands.push_back(int'(cand_pos));
        repeat ($urandom_range(6)) @(posedge clk);
        #1 eme_done = 1'b1;
        @(posedge clk);
        #1 eme_done = 1'b0;
      end
    end
  end

  initial begin
    gen_patterns(500, 8, 30, 256);
    build_sst();
    gen_text(text, TEXT_LEN, 256, 80);
    reference(text, exp);
    foreach (tarr[i]) tarr[i] = (i < TEXT_LEN) ? text[i] : 8'h00;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (!done) @(negedge clk);
    foreach (exp[k]) begin
      int p;
      bit f;
      p = int'(k / 65536);
      f = 1'b0;
      foreach (cands[i]) if (cands[i] == p) f = 1'b1;
      chk(f, $sformatf("pattern start %0d not passed on", p));
    end
    for (int i = 1; i < cands.size(); i++) chk(cands[i] > cands[i-1], "candidates out of order");
    chk(int'(n_cand) == cands.size(), "candidate count");
    chk(n_shift > 0 && n_sig_reject > 0 && n_cand > 0, "all three filter outcomes occur");
    chk(int'(ptr) + WIN_LEN > TEXT_LEN, "stopped at the end of the text");
    $display("shift %0d, sig-reject %0d, candidates %0d, expected matches %0d, final ptr %0d",
             n_shift, n_sig_reject, n_cand, exp.size(), ptr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
