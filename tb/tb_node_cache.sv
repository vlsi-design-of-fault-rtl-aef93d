// tb_node_cache: random node reads, drawn from a small address set so that
// lines are reused and evicted, through an 8-line cache to the memory model.
// Checks every response's data, that each request is answered, the hit and
// miss counts against an independent direct-mapped tag model, that a hit
// answers in two cycles, and that flush forces misses afterwards.
module tb_node_cache;
  import rfts_pkg::*;
  localparam int LINES = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic   flush = 1'b0, req_valid = 1'b0, req_ready, resp_valid;
  maddr_t req_addr = '0, m_req_addr;
  mdata_t resp_data, m_resp_data;
  logic   m_req_valid, m_req_ready, m_resp_valid;
  logic [31:0] hits, misses;
  int checks = 0, failures = 0;

  node_cache #(.LINES(LINES)) u_dut (.*);
  offchip_mem_model #(.LAT(7), .STALL_PCT(20)) u_mem (.clk, .rst_n, .req_valid(m_req_valid),
    .req_ready(m_req_ready), .req_addr(m_req_addr), .resp_valid(m_resp_valid), .resp_data(m_resp_data));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic mdata_t word_at(maddr_t a);
    return {4{13'd0, a}} ^ 128'hF0F0_1111_2222_3333_4444_5555_6666_7777;
  endfunction

  // reference model of a direct-mapped cache
  bit          ref_v [LINES];
  maddr_t      ref_a [LINES];
  int          exp_hits = 0, exp_misses = 0;

  task automatic access(maddr_t a);
    bit h;
    int lat, ix;
    ix = int'(a) % LINES;
    h = ref_v[ix] && ref_a[ix] == a;
    if (h) exp_hits++; else exp_misses++;
    ref_v[ix] = 1'b1; ref_a[ix] = a;
    req_valid = 1'b1; req_addr = a;
    #1;
    chk(req_ready, "ready when idle");
    // accepted at the next rising edge
    @(negedge clk);
    req_valid = 1'b0;
    lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    chk(resp_data == word_at(a), $sformatf("data for %0d", a));
    if (h) chk(lat == 2, $sformatf("hit latency %0d", lat));
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    for (int i = 0; i < 64; i++) u_mem.mem[i] = word_at(maddr_t'(i));
    foreach (ref_v[i]) ref_v[i] = 1'b0;
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 1500; n++) begin
      access(maddr_t'($urandom_range(23)));
      if (n == 700) begin
        flush = 1'b1;
        @(negedge clk) flush = 1'b0;
        foreach (ref_v[i]) ref_v[i] = 1'b0;
      end
    end
    chk(int'(hits) == exp_hits, $sformatf("hits %0d, expected %0d", hits, exp_hits));
    chk(int'(misses) == exp_misses, $sformatf("misses %0d, expected %0d", misses, exp_misses));
    chk(exp_hits > 100 && exp_misses > 100, "both hits and misses exercised");
    $display("hits %0d misses %0d", hits, misses);
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
