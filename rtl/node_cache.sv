// node_cache: read-only, direct-mapped cache of trie nodes between the
// exact-match engine and the load/store interface.
//
// Each of the LINES lines holds one 128-bit trie node (one memory word), its
// tag and a valid bit. A hit answers two cycles after the request is accepted; a miss
// forwards the read to memory, fills the line from the response and answers
// with it. One request is handled at a time. flush clears every valid bit, and
// must be pulsed whenever the trie in memory is rewritten (a reconfiguration
// of the fault database). The source design states only that the exact-match
// engine uses caching to hide off-chip latency; organisation and size are this
// implementation's choice.
module node_cache
  import rfts_pkg::*;
#(
  parameter int unsigned LINES = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  // engine side
  input  logic   req_valid,
  output logic   req_ready,
  input  maddr_t req_addr,
  output logic   resp_valid,
  output mdata_t resp_data,
  // memory side
  output logic   m_req_valid,
  input  logic   m_req_ready,
  output maddr_t m_req_addr,
  input  logic   m_resp_valid,
  input  mdata_t m_resp_data,
  // statistics
  output logic [31:0] hits,
  output logic [31:0] misses
);
  localparam int unsigned IW = $clog2(LINES);
  localparam int unsigned TW = MEM_AW - IW;

  typedef enum logic [1:0] {C_IDLE, C_LOOK, C_MREQ, C_MWAIT} cstate_t;
  cstate_t st;

  mdata_t          data_q [LINES];
  logic [TW-1:0]   tag_q  [LINES];
  logic [LINES-1:0] vld_q;
  maddr_t          addr_q;
  logic [IW-1:0]   idx;
  logic            hit;

  assign idx        = addr_q[IW-1:0];
  assign hit        = vld_q[idx] && (tag_q[idx] == addr_q[MEM_AW-1:IW]);
  assign req_ready  = (st == C_IDLE) && !flush;
  assign m_req_valid = (st == C_MREQ);
  assign m_req_addr  = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= C_IDLE; vld_q <= '0; addr_q <= '0;
      resp_valid <= 1'b0; resp_data <= '0; hits <= '0; misses <= '0;
    end else begin
      resp_valid <= 1'b0;
      if (flush) vld_q <= '0;
      unique case (st)
        C_IDLE: if (req_valid && req_ready) begin
          addr_q <= req_addr;
          st     <= C_LOOK;
        end
        C_LOOK: if (hit) begin
          resp_valid <= 1'b1;
          resp_data  <= data_q[idx];
          hits       <= hits + 32'd1;
          st         <= C_IDLE;
        end else begin
          misses <= misses + 32'd1;
          st     <= C_MREQ;
        end
        C_MREQ:  if (m_req_ready) st <= C_MWAIT;
        C_MWAIT: if (m_resp_valid) begin
          resp_valid <= 1'b1;
          resp_data  <= m_resp_data;
          vld_q[idx] <= 1'b1;
          st         <= C_IDLE;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (st == C_MWAIT && m_resp_valid) begin
      data_q[idx] <= m_resp_data;
      tag_q[idx]  <= addr_q[MEM_AW-1:IW];
    end
  end
endmodule
