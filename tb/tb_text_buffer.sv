// tb_text_buffer: appends random words to a 4-word buffer while a release
// pointer moves forward, and checks the reported space, the character count
// and every window and slice read against a shadow copy of the text.
module tb_text_buffer;
  localparam int DEPTH = 4, CPW = 16, WIN = 8, SL = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear = 1'b0, wr_valid = 1'b0;
  logic [CPW*8-1:0] wr_data = '0;
  logic [31:0] avail_chars, release_pos = '0, win_pos = '0, sl_pos = '0;
  logic [$clog2(DEPTH+1)-1:0] space;
  logic [WIN*8-1:0] win_data;
  logic [SL*8-1:0]  sl_data;
  byte unsigned text[$];
  int checks = 0, failures = 0;

  text_buffer #(.DEPTH(DEPTH)) u_dut (.*);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int written;
    written = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    chk(avail_chars == 0 && int'(space) == DEPTH, "empty after clear");
    for (int step = 0; step < 2000; step++) begin
      int used;
      used = written - int'(release_pos / CPW);
      chk(int'(space) == DEPTH - used, $sformatf("space %0d, expected %0d", space, DEPTH - used));
      chk(int'(avail_chars) == written * CPW, "avail_chars");
      // check reads at random positions inside [release_pos, avail)
      if (int'(avail_chars) >= int'(release_pos) + WIN) begin
        repeat (4) begin
          int p, q;
          p = int'(release_pos) + $urandom_range(int'(avail_chars) - int'(release_pos) - WIN);
          q = int'(release_pos) + $urandom_range(int'(avail_chars) - int'(release_pos) - SL);
          win_pos = 32'(p); sl_pos = 32'(q);
          #1;
          for (int i = 0; i < WIN; i++)
            chk(win_data[i*8 +: 8] == text[p+i], $sformatf("window at %0d char %0d", p, i));
          for (int i = 0; i < SL; i++)
            chk(sl_data[i*8 +: 8] == text[q+i], $sformatf("slice at %0d char %0d", q, i));
        end
      end
      // write when there is room, or release
      if (space != 0 && $urandom_range(1) == 0) begin
        wr_valid = 1'b1;
        for (int c = 0; c < CPW; c++) begin
          wr_data[c*8 +: 8] = 8'($urandom);
          text.push_back(wr_data[c*8 +: 8]);
        end
        written++;
      end else if (int'(release_pos) + 8 <= written * CPW) begin
        release_pos = release_pos + 32'($urandom_range(7, 1));
      end
      @(negedge clk);
      wr_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
