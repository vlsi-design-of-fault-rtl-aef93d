// filtering_engine: front end of the checker. It moves a pattern pointer over
// the text and passes on only candidate positions where a fault pattern may
// start.
//
// At pointer p the engine looks at the WIN-character window text[p .. p+WIN-1].
// The last BLK characters of the window (the "bad-character" block) are hashed
// to an address of the shift-signature table and the entry is read (one cycle).
//  * S-flag set: the carry is a shift value. No pattern can start at p, so the
//    pointer moves right by the carry (at least 1) without further work.
//  * S-flag clear: the block ends the window of some pattern, and the carry is
//    the Bloom signature of the tail characters of all such patterns. The four
//    tail characters of the window are hashed to a signature; if any of its
//    bits is missing from the carry, p is safe and the pointer moves by one.
//    Otherwise p is a candidate: it is handed to the exact-match engine and
//    the engine waits for eme_done before moving on by one.
// This merge of a shift table and a Bloom-filter signature table into one
// table follows the source design; the window and block lengths, the hash
// functions and the two-cycle-per-position schedule are this implementation's
// choice. Patterns must be at least WIN characters long.
//
// Interface: start (pulse) with text_len; the engine reads windows through
// win_pos/win_data and checks availability against avail_chars; ptr doubles as
// the text buffer's release position. cand_valid/cand_ready hand a candidate
// over, eme_done (pulse) ends its verification. done rises when the window
// passes the end of the text and stays until the next start.
module filtering_engine
  import rfts_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [31:0]          text_len,
  output logic                 busy,
  output logic                 done,
  // text buffer
  output logic [31:0]          ptr,
  input  logic [WIN_LEN*8-1:0] win_data,
  input  logic [31:0]          avail_chars,
  // shift-signature table
  output logic                 sst_rd_en,
  output logic [SST_AW-1:0]    sst_rd_addr,
  input  sst_entry_t           sst_rd_data,
  // exact-match engine
  output logic                 cand_valid,
  input  logic                 cand_ready,
  output logic [31:0]          cand_pos,
  input  logic                 eme_done,
  // statistics
  output logic [31:0]          n_shift,      // positions left by a shift
  output logic [31:0]          n_sig_reject, // positions rejected by the signature
  output logic [31:0]          n_cand        // candidates passed on
);
  typedef enum logic [2:0] {F_IDLE, F_CHECK, F_LOOK, F_CAND, F_WAIT, F_DONE} fstate_t;
  fstate_t st;

  logic [CARRY_W-1:0] sig;
  logic [31:0]        shift;
  logic               win_in_text, win_ready;

  assign win_in_text = (ptr + 32'(WIN_LEN)) <= text_len;
  assign win_ready   = (ptr + 32'(WIN_LEN)) <= avail_chars;

  assign sst_rd_addr = sst_index(win_data[(WIN_LEN-2)*8 +: 8], win_data[(WIN_LEN-1)*8 +: 8]);
  assign sst_rd_en   = (st == F_CHECK) && win_in_text && win_ready;
  assign sig         = bloom_sig(win_data[(WIN_LEN-4)*8 +: 32]);
  assign shift       = (sst_rd_data.carry == '0) ? 32'd1 : 32'(sst_rd_data.carry);

  assign cand_valid = (st == F_CAND);
  assign cand_pos   = ptr;
  assign busy       = (st != F_IDLE) && (st != F_DONE);
  assign done       = (st == F_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; ptr <= '0;
      n_shift <= '0; n_sig_reject <= '0; n_cand <= '0;
    end else if (start) begin
      st <= F_CHECK; ptr <= '0;
      n_shift <= '0; n_sig_reject <= '0; n_cand <= '0;
    end else begin
      unique case (st)
        F_CHECK:
          if (!win_in_text)   st <= F_DONE;
          else if (win_ready) st <= F_LOOK;
        F_LOOK:
          if (sst_rd_data.s_flag) begin
            ptr     <= ptr + shift;
            n_shift <= n_shift + 32'd1;
            st      <= F_CHECK;
          end else if ((sig & ~sst_rd_data.carry) != '0) begin
            ptr          <= ptr + 32'd1;
            n_sig_reject <= n_sig_reject + 32'd1;
            st           <= F_CHECK;
          end else begin
            n_cand <= n_cand + 32'd1;
            st     <= F_CAND;
          end
        F_CAND: if (cand_ready) st <= F_WAIT;
        F_WAIT: if (eme_done) begin
          ptr <= ptr + 32'd1;
          st  <= F_CHECK;
        end
        default: ;
      endcase
    end
  end

  // A candidate is held, with its position, until the exact-match engine takes it.
  a_cand_stable: assert property (@(posedge clk) disable iff (!rst_n)
    cand_valid && !cand_ready && !start |=> cand_valid && $stable(cand_pos));
endmodule
