// tb_load_store_if: two clients issue random reads at random times through
// the interface to the memory model (latency 9, random back-pressure). Each
// client must get exactly its own responses, in its own request order, with
// the data of the address it asked for; both clients must be served while
// competing (round-robin) and more than one read must be in flight.
module tb_load_store_if;
  import rfts_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [1:0] c_req_valid = '0, c_req_ready, c_resp_valid;
  maddr_t     c_req_addr [2];
  mdata_t     c_resp_data;
  logic       m_req_valid, m_req_ready, m_resp_valid;
  maddr_t     m_req_addr;
  mdata_t     m_resp_data;
  int checks = 0, failures = 0;
  maddr_t pend [2][$];
  int served [2];
  int both_req_cycles = 0, max_out = 0, out_n = 0;
  bit stop = 1'b0;
  bit [1:0] acc = '0;

  load_store_if #(.NC(2), .OUTST(8)) u_dut (.*);
  offchip_mem_model #(.LAT(9), .STALL_PCT(15)) u_mem (.clk, .rst_n, .req_valid(m_req_valid),
    .req_ready(m_req_ready), .req_addr(m_req_addr), .resp_valid(m_resp_valid), .resp_data(m_resp_data));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic mdata_t word_at(maddr_t a);
    return {4{13'd0, a}} ^ 128'h1234_5678_9ABC_DEF0_0FED_CBA9_8765_4321;
  endfunction

  initial begin
    c_req_addr[0] = '0; c_req_addr[1] = '0;
    served[0] = 0; served[1] = 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (c_req_valid == 2'b11) both_req_cycles++;
    if (m_req_valid && m_req_ready) out_n++;
    if (m_resp_valid) out_n--;
    if (out_n > max_out) max_out = out_n;
    for (int c = 0; c < 2; c++) begin
      if (c_resp_valid[c]) begin
        chk(pend[c].size() > 0, "response without request");
        if (pend[c].size() > 0) begin
          chk(c_resp_data == word_at(pend[c][0]), $sformatf("client %0d data", c));
          void'(pend[c].pop_front());
          served[c]++;
        end
      end
      acc[c] = c_req_valid[c] && c_req_ready[c];
      if (acc[c]) pend[c].push_back(c_req_addr[c]);
    end
    chk(!(c_resp_valid[0] && c_resp_valid[1]), "one response at a time");
  end

  // clients: hold a request until accepted, then pick a new one
  always @(negedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++)
      if (!c_req_valid[c] || acc[c]) begin
        c_req_valid[c] <= !stop && ($urandom_range(2) != 0);
        c_req_addr[c]  <= maddr_t'($urandom_range(4095));
      end
  end

  initial begin
    repeat (3) @(negedge clk);
    for (int i = 0; i < 4096; i++) u_mem.mem[i] = word_at(maddr_t'(i));
    rst_n = 1'b1;
    repeat (3000) @(negedge clk);
    stop = 1'b1;
    repeat (40) @(negedge clk);
    chk(pend[0].size() == 0 && pend[1].size() == 0, "all requests answered");
    chk(served[0] > 300 && served[1] > 300, $sformatf("both clients served (%0d, %0d)", served[0], served[1]));
    chk(both_req_cycles > 0, "clients never competed");
    chk(max_out > 1, "never more than one read in flight");
    $display("served %0d/%0d, max in flight %0d", served[0], served[1], max_out);
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
