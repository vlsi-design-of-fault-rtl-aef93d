// text_buffer: sliding window over the text stream being checked.
//
// The text pump appends whole memory words (CPW characters each, character 0
// in the low byte) at wr_valid. Characters are addressed by their absolute
// position in the text. The buffer is a ring of DEPTH words; a word may be
// overwritten once every character in it lies below release_pos (the
// filtering engine's pattern pointer, the oldest position anyone still reads).
//
// Two combinational read ports: a WIN-character window for the filtering
// engine and an SL-character slice for the exact-match engine. The reader
// must itself check that the characters it uses lie below avail_chars (the
// number of characters written so far) and not below release_pos.
//
// space reports how many words may still be appended. The source design only
// names the text buffer; its size and ports are this implementation's choice.
module text_buffer #(
  parameter int unsigned DEPTH = 16,                          // words, a power of two
  parameter int unsigned CPW   = rfts_pkg::CHARS_PER_WORD,    // chars per word
  parameter int unsigned WIN   = rfts_pkg::WIN_LEN,
  parameter int unsigned SL    = rfts_pkg::SLICE_LEN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,          // start of a new text
  // write side (text pump)
  input  logic                 wr_valid,
  input  logic [CPW*8-1:0]     wr_data,
  output logic [31:0]          avail_chars,
  output logic [$clog2(DEPTH+1)-1:0] space,
  input  logic [31:0]          release_pos,
  // window read (filtering engine)
  input  logic [31:0]          win_pos,
  output logic [WIN*8-1:0]     win_data,
  // slice read (exact-match engine)
  input  logic [31:0]          sl_pos,
  output logic [SL*8-1:0]      sl_data
);
  localparam int unsigned IW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(CPW);

  logic [7:0]  mem [DEPTH][CPW];
  logic [31:0] wr_words;                 // words written since clear

  always_ff @(posedge clk) begin
    if (wr_valid)
      for (int c = 0; c < CPW; c++)
        mem[wr_words[IW-1:0]][c] <= wr_data[c*8 +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          wr_words <= '0;
    else if (clear)      wr_words <= '0;
    else if (wr_valid)   wr_words <= wr_words + 32'd1;
  end

  assign avail_chars = wr_words << CW;

  // Words still in use: from the word holding release_pos up to the newest.
  logic [31:0] used;
  assign used  = wr_words - (release_pos >> CW);
  assign space = (used >= DEPTH) ? '0 : ($clog2(DEPTH+1))'(DEPTH - used);

  function automatic logic [7:0] rd_char(input logic [31:0] pos);
    return mem[pos[CW +: IW]][pos[CW-1:0]];
  endfunction

  always_comb begin
    for (int i = 0; i < WIN; i++) win_data[i*8 +: 8] = rd_char(win_pos + 32'(i));
    for (int i = 0; i < SL;  i++) sl_data[i*8 +: 8]  = rd_char(sl_pos + 32'(i));
  end
endmodule
