// load_store_if: shares the single off-chip memory port between NC clients
// (client 0: text pump, client 1: exact-match engine through its node cache).
//
// Requests are granted round-robin, one per cycle, when the memory accepts
// and the response-order FIFO has room. The memory returns read data in
// request order; the FIFO remembers which client each outstanding read belongs
// to and routes each response back to it. Up to OUTST reads may be in flight,
// which lets the text pump's prefetch and the trie-node reads overlap the
// memory latency. The source design only names a load/store interface for
// bandwidth sharing; arbitration and ordering are this implementation's
// choice, and only loads are needed by the checker.
module load_store_if
  import rfts_pkg::*;
#(
  parameter int unsigned NC    = 2,
  parameter int unsigned OUTST = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // clients
  input  logic [NC-1:0]  c_req_valid,
  output logic [NC-1:0]  c_req_ready,
  input  maddr_t         c_req_addr [NC],
  output logic [NC-1:0]  c_resp_valid,
  output mdata_t         c_resp_data,
  // memory
  output logic           m_req_valid,
  input  logic           m_req_ready,
  output maddr_t         m_req_addr,
  input  logic           m_resp_valid,
  input  mdata_t         m_resp_data
);
  localparam int unsigned IDW = (NC > 1) ? $clog2(NC) : 1;
  localparam int unsigned FW  = $clog2(OUTST);

  logic [IDW-1:0] id_fifo [OUTST];
  logic [FW:0]    wp, rp;
  logic           fifo_full;
  logic [IDW-1:0] last, gnt;
  logic           gnt_any;

  assign fifo_full = (wp - rp) == (FW+1)'(OUTST);

  // Round-robin: first requesting client after the last one granted.
  always_comb begin
    gnt     = last;
    gnt_any = 1'b0;
    for (int k = 1; k <= NC; k++) begin
      logic [IDW-1:0] c;
      c = IDW'((int'(last) + k) % NC);
      if (!gnt_any && c_req_valid[c]) begin
        gnt     = c;
        gnt_any = 1'b1;
      end
    end
  end

  assign m_req_valid = gnt_any && !fifo_full;
  assign m_req_addr  = c_req_addr[gnt];

  always_comb begin
    c_req_ready = '0;
    c_req_ready[gnt] = m_req_valid && m_req_ready;
  end

  logic [IDW-1:0] head;
  assign head        = id_fifo[rp[FW-1:0]];
  assign c_resp_data = m_resp_data;
  always_comb begin
    c_resp_valid = '0;
    c_resp_valid[head] = m_resp_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; last <= IDW'(NC - 1);
    end else begin
      if (m_req_valid && m_req_ready) begin
        wp   <= wp + 1'b1;
        last <= gnt;
      end
      if (m_resp_valid) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (m_req_valid && m_req_ready) id_fifo[wp[FW-1:0]] <= gnt;
  end

  // A response can only arrive for a request that was sent.
  a_resp_expected: assert property (@(posedge clk) disable iff (!rst_n)
    m_resp_valid |-> wp != rp);
endmodule
