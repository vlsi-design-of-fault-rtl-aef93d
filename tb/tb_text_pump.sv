// tb_text_pump: the pump streams a text from the memory model into a
// modelled 4-word buffer whose release pointer advances at random. Checks:
// the words arrive in order with the right contents, exactly
// ceil(text_len/16) of them, never more than the free space, the pump reads
// ahead (several reads in flight) and busy falls at the end. Two runs, the
// second restarting with another base and length.
module tb_text_pump;
  import rfts_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic start = 1'b0;
  maddr_t text_base = '0;
  logic [31:0] text_len = '0;
  logic [$clog2(DEPTH+1)-1:0] buf_space;
  logic req_valid, req_ready, resp_valid, buf_clear, buf_wr, busy;
  maddr_t req_addr;
  mdata_t resp_data, buf_wdata;
  int checks = 0, failures = 0;
  int written = 0, released = 0, max_inflight = 0, issued = 0, returned = 0;

  text_pump #(.DEPTH(DEPTH)) u_dut (.*);
  offchip_mem_model #(.LAT(6), .STALL_PCT(25)) u_mem (.clk, .rst_n, .req_valid, .req_ready,
    .req_addr, .resp_valid, .resp_data);

  assign buf_space = ($clog2(DEPTH+1))'(DEPTH - (written - released));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic mdata_t word_at(int a);
    return {4{32'(a) ^ 32'h5A5A_0000}};
  endfunction

  int base_i;
  always @(posedge clk) if (rst_n) begin
    if (req_valid && req_ready) issued++;
    if (resp_valid) returned++;
    if (issued - returned > max_inflight) max_inflight = issued - returned;
    if (buf_wr) begin
      chk(written - released < DEPTH, "write into a full buffer");
      chk(buf_wdata == word_at(base_i + written), $sformatf("word %0d contents", written));
      written++;
    end
    if (written > released && $urandom_range(3) == 0) released++;
  end

  task automatic run(int base, int len);
    int n;
    n = (len + 15) / 16;
    for (int i = 0; i < n + 4; i++) u_mem.mem[base + i] = word_at(base + i);
    base_i = base;
    @(negedge clk);
    text_base = maddr_t'(base); text_len = 32'(len); start = 1'b1;
    @(negedge clk) start = 1'b0;
    written = 0; released = 0;
    chk(busy, "busy after start");
    while (busy) @(negedge clk);
    repeat (10) @(negedge clk);
    chk(written == n, $sformatf("%0d words written, %0d expected", written, n));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(1000, 1000);
    run(77, 33);
    chk(max_inflight > 1, "no read-ahead");
    $display("max in flight %0d", max_inflight);
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
