// offchip_mem_model: behavioural model of the off-chip memory that holds the
// trie database and the text (not synthesizable logic; testbench use only).
//
// 2**AW words of 128 bits. Read requests use valid/ready; ready drops at
// random in STALL_PCT percent of cycles to exercise back-pressure. Each
// accepted read (outside reset) returns its word LAT cycles later, in request order, on
// resp_valid. Testbenches load the contents directly through the mem array.
module offchip_mem_model
  import rfts_pkg::*;
#(
  parameter int unsigned LAT       = 12,
  parameter int unsigned STALL_PCT = 20
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req_valid,
  output logic   req_ready,
  input  maddr_t req_addr,
  output logic   resp_valid,
  output mdata_t resp_data
);
  mdata_t mem [2**MEM_AW];

  logic [LAT-1:0] v_pipe;
  mdata_t         d_pipe [LAT];

  initial begin
    for (int i = 0; i < 2**MEM_AW; i++) mem[i] = '0;
    v_pipe    = '0;
    req_ready = 1'b1;
  end

  always @(posedge clk) begin
    req_ready <= ($urandom_range(99) >= STALL_PCT);
    v_pipe    <= rst_n ? {v_pipe[LAT-2:0], req_valid && req_ready} : '0;
    d_pipe[0] <= mem[req_addr];
    for (int i = 1; i < LAT; i++) d_pipe[i] <= d_pipe[i-1];
  end

  assign resp_valid = v_pipe[LAT-1];
  assign resp_data  = d_pipe[LAT-1];
endmodule
