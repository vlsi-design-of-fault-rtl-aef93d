// text_pump: streams the text to be checked from off-chip memory into the
// text buffer, ahead of the matching engines.
//
// After start it reads ceil(text_len / CPW) consecutive memory words from
// text_base, keeping as many reads in flight as the text buffer has free
// words (counting words already requested but not yet returned), so that
// reading overlaps the matching. Returned words are written straight into the
// buffer in order. The source design only says that the pump prefetches the
// text in a streaming way; the flow control is this implementation's choice.
//
// Memory side: valid/ready request (one address per accepted cycle), responses
// in request order with resp_valid, any latency.
module text_pump
  import rfts_pkg::*;
#(
  parameter int unsigned DEPTH = 16,                    // text buffer words
  parameter int unsigned CPW   = CHARS_PER_WORD
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  maddr_t                      text_base,
  input  logic [31:0]                 text_len,       // characters
  input  logic [$clog2(DEPTH+1)-1:0]  buf_space,
  // memory read port
  output logic                        req_valid,
  input  logic                        req_ready,
  output maddr_t                      req_addr,
  input  logic                        resp_valid,
  input  mdata_t                      resp_data,
  // text buffer write
  output logic                        buf_clear,
  output logic                        buf_wr,
  output mdata_t                      buf_wdata,
  output logic                        busy
);
  localparam int unsigned CW = $clog2(CPW);

  logic [31:0] n_words, issued, received;
  logic [31:0] inflight;

  assign inflight  = issued - received;
  assign req_valid = busy && (issued < n_words) && (32'(buf_space) > inflight);
  assign req_addr  = text_base + maddr_t'(issued);
  assign buf_clear = start;
  assign buf_wr    = resp_valid && busy;
  assign buf_wdata = resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; n_words <= '0; issued <= '0; received <= '0;
    end else if (start) begin
      busy     <= 1'b1;
      n_words  <= (text_len + 32'(CPW - 1)) >> CW;
      issued   <= '0;
      received <= '0;
    end else if (busy) begin
      if (req_valid && req_ready) issued <= issued + 32'd1;
      if (resp_valid)             received <= received + 32'd1;
      if (received == n_words)    busy <= 1'b0;
    end
  end

  // The buffer must never be written past its free space.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    buf_wr |-> buf_space != 0);
endmodule
