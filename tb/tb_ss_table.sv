// tb_ss_table: writes random shift-signature entries through the
// configuration port, reads them back and checks data and the one-cycle read
// latency against a shadow copy; also checks read-during-write returns the
// old entry and that an unselected read holds its output.
module tb_ss_table;
  localparam int AW = 14, DW = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we = 1'b0, rd_en = 1'b0;
  logic [AW-1:0] waddr = '0, rd_addr = '0;
  logic [DW-1:0] wdata = '0, rd_data;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  ss_table u_dut (.clk, .we, .waddr, .wdata, .rd_en, .rd_addr, .rd_data);

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    // fill everything
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = DW'($urandom); shadow[i] = wdata;
    end
    @(negedge clk) we = 1'b0;
    // random reads, one per cycle, checked one cycle later
    for (int n = 0; n < 3000; n++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      rd_en = 1'b1; rd_addr = a;
      @(negedge clk);
      chk(rd_data == shadow[a], $sformatf("read %0d: %h, expected %h", a, rd_data, shadow[a]));
    end
    // read during write: old value
    rd_en = 1'b1; rd_addr = 14'd77; we = 1'b1; waddr = 14'd77; wdata = ~shadow[77];
    @(negedge clk);
    chk(rd_data == shadow[77], "read during write returns old entry");
    shadow[77] = wdata;
    we = 1'b0;
    @(negedge clk);
    chk(rd_data == shadow[77], "new entry after write");
    // hold when not enabled
    rd_en = 1'b0; rd_addr = 14'd5;
    @(negedge clk);
    chk(rd_data == shadow[77], "output held while rd_en low");
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
