// exact_match_engine: back end of the checker. It verifies a candidate
// position from the filtering engine against the complete fault database,
// kept as a compact trie in off-chip memory, and reports every pattern that
// really starts there.
//
// Each pattern is cut into SLICE_LEN-character slices; the trie has one node
// per slice, linked by a child pointer (next slice of the same patterns) and a
// sibling pointer (another slice at the same depth). Per check the engine
//  1. takes the next slice of the text,
//  2. forms the node address: a hash of the slice selects a root bucket at
//     depth 0, deeper down it follows the pointer of the previous node,
//  3. fetches the node (through the node cache; a miss costs an off-chip
//     access),
//  4. compares the node's slice (its first slen characters) with the text.
// On a match a node marked is_end reports its pattern id; a full slice then
// descends to its child, a partial (last) slice goes on along the siblings.
// On a mismatch the engine follows the sibling pointer. A null pointer ends the
// check and eme_done is pulsed. The trie is built so that partial slices
// precede full ones in a sibling chain; with that order one pass finds every
// pattern that starts at the candidate. The four-step flow and the
// child/sibling trie follow the source design; the node layout (one 128-bit
// word, rfts_pkg::trie_node_t), the hashed root level and the ordering rule
// are this implementation's choice.
//
// Interface: cand_valid/cand_ready with cand_pos; slices are read from the
// text buffer through sl_pos/sl_data once avail_chars covers them (or the end
// of the text); node reads use a valid/ready request with a later resp_valid;
// matches leave through m_valid/m_ready (the engine waits while m_ready is
// low). done pulses one cycle when a candidate is finished. start (pulse)
// abandons any check in progress and clears the statistics.
module exact_match_engine
  import rfts_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,      // new run: clears the statistics
  input  logic [31:0]            text_len,
  // candidate from the filtering engine
  input  logic                   cand_valid,
  output logic                   cand_ready,
  input  logic [31:0]            cand_pos,
  output logic                   done,
  // text buffer
  output logic [31:0]            sl_pos,
  input  logic [SLICE_LEN*8-1:0] sl_data,
  input  logic [31:0]            avail_chars,
  // node reads
  output logic                   nreq_valid,
  input  logic                   nreq_ready,
  output maddr_t                 nreq_addr,
  input  logic                   nresp_valid,
  input  mdata_t                 nresp_data,
  // match reports: pattern id and start position
  output logic                   m_valid,
  input  logic                   m_ready,
  output logic [PID_W-1:0]       m_pid,
  output logic [31:0]            m_pos,
  // statistics
  output logic [31:0]            n_nodes,     // nodes compared
  output logic [31:0]            n_matches,
  output logic [31:0]            n_false_pos  // candidates with no pattern
);
  typedef enum logic [2:0] {E_IDLE, E_SLICE, E_FETCH, E_WAIT, E_CMP, E_REPORT, E_DONE} estate_t;
  estate_t st;

  logic [31:0]                 pos, off;
  logic [SLICE_LEN*8-1:0]      slice_q;
  maddr_t                      addr_q;
  trie_node_t                  node_q;
  logic                        depth0, found;
  logic [31:0]                 left;        // text characters from pos+off on
  logic [31:0]                 need_end;
  logic                        eq;
  logic                        after_report_down; // after E_REPORT: descend (1) or sibling (0)

  assign sl_pos   = pos + off;
  assign left     = text_len - (pos + off);
  assign need_end = (left >= 32'(SLICE_LEN)) ? pos + off + 32'(SLICE_LEN) : text_len;

  // Compare the first slen characters of the node with the text slice.
  always_comb begin
    eq = node_q.valid && (node_q.slen != 3'd0) && (32'(node_q.slen) <= left);
    for (int i = 0; i < SLICE_LEN; i++)
      if (i < int'(node_q.slen) && node_q.slice[i*8 +: 8] != slice_q[i*8 +: 8]) eq = 1'b0;
  end

  assign cand_ready = (st == E_IDLE);
  assign nreq_valid = (st == E_FETCH);
  assign nreq_addr  = addr_q;
  assign m_valid    = (st == E_REPORT);
  assign m_pid      = node_q.pid;
  assign m_pos      = pos;
  assign done       = (st == E_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= E_IDLE; pos <= '0; off <= '0; slice_q <= '0; addr_q <= '0;
      node_q <= '0; depth0 <= 1'b0; found <= 1'b0; after_report_down <= 1'b0;
      n_nodes <= '0; n_matches <= '0; n_false_pos <= '0;
    end else if (start) begin
      st <= E_IDLE;
      n_nodes <= '0; n_matches <= '0; n_false_pos <= '0;
    end else begin
      unique case (st)
        E_IDLE: if (cand_valid) begin
          pos    <= cand_pos;
          off    <= '0;
          depth0 <= 1'b1;
          found  <= 1'b0;
          st     <= E_SLICE;
        end
        E_SLICE: if (avail_chars >= need_end) begin
          slice_q <= sl_data;
          if (depth0) addr_q <= maddr_t'(root_hash(sl_data));
          st <= E_FETCH;
        end
        E_FETCH: if (nreq_ready) st <= E_WAIT;
        E_WAIT: if (nresp_valid) begin
          node_q <= trie_node_t'(nresp_data);
          st     <= E_CMP;
        end
        E_CMP: begin
          n_nodes <= n_nodes + 32'd1;
          depth0  <= 1'b0;
          if (eq && node_q.is_end) begin
            after_report_down <= (node_q.slen == 3'(SLICE_LEN));
            st <= E_REPORT;
          end else if (eq && node_q.slen == 3'(SLICE_LEN)) begin
            // descend
            if (node_q.child != '0 && left > 32'(SLICE_LEN)) begin
              off    <= off + 32'(SLICE_LEN);
              addr_q <= node_q.child;
              st     <= E_SLICE;
            end else st <= E_DONE;
          end else if (node_q.valid && node_q.sibling != '0) begin
            addr_q <= node_q.sibling;
            st     <= E_FETCH;
          end else st <= E_DONE;
        end
        E_REPORT: if (m_ready) begin
          n_matches <= n_matches + 32'd1;
          found     <= 1'b1;
          if (after_report_down && node_q.child != '0 && left > 32'(SLICE_LEN)) begin
            off    <= off + 32'(SLICE_LEN);
            addr_q <= node_q.child;
            st     <= E_SLICE;
          end else if (!after_report_down && node_q.sibling != '0) begin
            addr_q <= node_q.sibling;
            st     <= E_FETCH;
          end else st <= E_DONE;
        end
        E_DONE: begin
          if (!found) n_false_pos <= n_false_pos + 32'd1;
          st <= E_IDLE;
        end
        default: st <= E_IDLE;
      endcase
    end
  end

  a_report_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid && !m_ready |=> m_valid && $stable(m_pid) && $stable(m_pos));
endmodule
