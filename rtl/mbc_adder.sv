// mbc_adder: 32-bit adder realised by table lookups (memory-based addition).
//
// The operands are cut into four 8-bit slices. For each slice i a lookup of
// (X = a[8i+7:8i], Y = b[8i+7:8i]) is sent to the lookup hierarchy, as the
// operands and the slice number (the address generator selects the slices),
// which
// returns the slice sum and carry for carry in 0 and 1. When all four entries
// are in, a carry-select network forms the 32-bit sum and carry out.
//
// Interfaces
//   in_valid/in_ready with a, b, cin : one addition at a time.
//   out_valid pulses for one cycle with sum and cout.
//   lk_*  : request/response port of an mbc_lookup.
// Timing: two cycles per slice plus one when every slice hits in L1, so an
// addition takes 9 cycles from acceptance to out_valid; misses add the miss
// time of the slice. The slice width, slicing and carry select follow the
// described scheme; issuing the slices one after another is this design's.
module mbc_adder
  import mbc_pkg::*;
#(
  parameter int unsigned SLICES = 4,
  localparam int unsigned SL_W = (SLICES > 1) ? $clog2(SLICES) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [SLICES*SLICE_W-1:0] a,
  input  logic [SLICES*SLICE_W-1:0] b,
  input  logic                      cin,
  output logic                      out_valid,
  output logic [SLICES*SLICE_W-1:0] sum,
  output logic                      cout,
  // lookup port
  output logic                      lk_valid,
  input  logic                      lk_ready,
  output logic [SLICES*SLICE_W-1:0] lk_a,
  output logic [SLICES*SLICE_W-1:0] lk_b,
  output logic [SL_W-1:0]           lk_slice,
  input  logic                      lk_resp_valid,
  input  lut_entry_t                lk_resp_entry
);

  typedef enum logic [1:0] { S_IDLE, S_REQ, S_WAIT, S_DONE } state_e;
  state_e state_q;

  logic [SLICES*SLICE_W-1:0] a_q, b_q;
  logic                      cin_q;
  logic [SL_W-1:0]           sl_q;
  lut_entry_t                ent_q [SLICES];

  assign in_ready  = (state_q == S_IDLE);
  assign lk_valid  = (state_q == S_REQ);
  assign lk_a      = a_q;
  assign lk_b      = b_q;
  assign lk_slice  = sl_q;
  assign out_valid = (state_q == S_DONE);

  carry_select #(.SLICES(SLICES)) u_csel (.ent(ent_q), .cin(cin_q), .sum(sum), .cout(cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      a_q     <= '0;
      b_q     <= '0;
      cin_q   <= 1'b0;
      sl_q    <= '0;
      for (int i = 0; i < SLICES; i++) ent_q[i] <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (in_valid) begin
          a_q     <= a;
          b_q     <= b;
          cin_q   <= cin;
          sl_q    <= '0;
          state_q <= S_REQ;
        end
        S_REQ: if (lk_ready) state_q <= S_WAIT;
        S_WAIT: if (lk_resp_valid) begin
          ent_q[sl_q] <= lk_resp_entry;
          if (sl_q == SL_W'(SLICES-1)) state_q <= S_DONE;
          else begin
            sl_q    <= sl_q + 1'b1;
            state_q <= S_REQ;
          end
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
