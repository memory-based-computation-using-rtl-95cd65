// main_mem_model: behavioural model of the main memory page that holds the
// addition result tables, for simulation only (not synthesizable).
//
// The page is the one an operating system would fill: the line at byte
// address {pagebase, X, 8'b0} holds, for every Y = 0..255 in ascending order,
// the entry {c1, s1, c0, s0} with {c0, s0} = X + Y and {c1, s1} = X + Y + 1.
// The model computes the entries instead of storing them. A line request is
// accepted when the model is idle; chunk 0 follows FIRST_LAT cycles later and
// every further chunk NEXT_LAT cycles after the previous one (100 and 4 in the
// evaluated system). Requests outside the page PAGE are counted as errors.
module main_mem_model
  import mbc_pkg::*;
#(
  parameter int unsigned FIRST_LAT = 100,
  parameter int unsigned NEXT_LAT  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [PAGEBASE_W-1:0] page,
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic [PA_W-1:0]       req_addr,
  output logic                  rdata_valid,
  output chunk_t                rdata,
  output int unsigned           n_req,
  output int unsigned           n_bad
);

  logic        busy;
  logic [7:0]  x;
  int unsigned timer, chunk;

  function automatic chunk_t make_chunk(input logic [7:0] xv, input int unsigned c);
    chunk_t r;
    for (int e = 0; e < CHUNK_ENTRIES; e++) begin
      logic [7:0] yv;
      logic [8:0] a0, a1;
      yv = 8'(c * CHUNK_ENTRIES + e);
      a0 = {1'b0, xv} + {1'b0, yv};
      a1 = a0 + 9'd1;
      r[e*ENTRY_W +: ENTRY_W] = {a1[8], a1[7:0], a0[8], a0[7:0]};
    end
    return r;
  endfunction

  assign req_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; x <= '0; timer <= 0; chunk <= 0;
      rdata_valid <= 1'b0; rdata <= '0; n_req <= 0; n_bad <= 0;
    end else begin
      rdata_valid <= 1'b0;
      if (!busy && req_valid) begin
        busy  <= 1'b1;
        x     <= req_addr[15:8];
        timer <= FIRST_LAT - 1;
        chunk <= 0;
        n_req <= n_req + 1;
        if (req_addr[31:16] != page || req_addr[7:0] != 8'h00) n_bad <= n_bad + 1;
      end else if (busy) begin
        if (timer == 0) begin
          rdata_valid <= 1'b1;
          rdata       <= make_chunk(x, chunk);
          timer       <= NEXT_LAT - 1;
          chunk       <= chunk + 1;
          if (chunk == CHUNKS - 1) busy <= 1'b0;
        end else begin
          timer <= timer - 1;
        end
      end
    end
  end

endmodule
