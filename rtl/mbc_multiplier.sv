// mbc_multiplier: shift-and-add integer multiplier whose additions are done
// by the memory-based adder.
//
// The partial product starts at zero. While the multiplier has a set bit, the
// priority encoder finds the lowest one, the shifter weights the multiplicand
// by its position, and the weighted multiplicand is added to the partial
// product through the add port (an mbc_adder). The bit is then cleared. The
// result is the low 32 bits of the product.
//
// Interfaces
//   in_valid/in_ready with mcand (multiplicand) and mplier (multiplier).
//   out_valid pulses for one cycle with product.
//   add_* : request/response port of an mbc_adder.
// Timing: one addition per set multiplier bit plus two cycles of control per
// addition; a zero multiplier finishes in two cycles. The algorithm (check the
// multiplier bits, add the shifted multiplicand, shifter network, priority
// encoder) follows the described scheme; skipping zero bits with the encoder
// and keeping only the low word are this design's choices.
module mbc_multiplier (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [31:0] mcand,
  input  logic [31:0] mplier,
  output logic        out_valid,
  output logic [31:0] product,
  // add port
  output logic        add_valid,
  input  logic        add_ready,
  output logic [31:0] add_a,
  output logic [31:0] add_b,
  input  logic        add_done,
  input  logic [31:0] add_sum,
  output logic        add_issued   // pulse per addition started (for counting)
);

  typedef enum logic [1:0] { S_IDLE, S_LOOP, S_WAIT, S_DONE } state_e;
  state_e state_q;

  logic [31:0] mcand_q, m_q, pp_q, shifted;
  logic [4:0]  idx, idx_q;
  logic        any;

  prio_enc32 u_pe (.v(m_q), .valid(any), .idx(idx));
  shifter32  u_sh (.in(mcand_q), .sh(idx), .out(shifted));

  assign in_ready   = (state_q == S_IDLE);
  assign add_valid  = (state_q == S_LOOP) && any;
  assign add_a      = pp_q;
  assign add_b      = shifted;
  assign add_issued = add_valid && add_ready;
  assign out_valid  = (state_q == S_DONE);
  assign product    = pp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      mcand_q <= '0;
      m_q     <= '0;
      pp_q    <= '0;
      idx_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (in_valid) begin
          mcand_q <= mcand;
          m_q     <= mplier;
          pp_q    <= '0;
          state_q <= S_LOOP;
        end
        S_LOOP: begin
          if (!any) state_q <= S_DONE;
          else if (add_ready) begin
            idx_q   <= idx;
            state_q <= S_WAIT;
          end
        end
        S_WAIT: if (add_done) begin
          pp_q       <= add_sum;
          m_q[idx_q] <= 1'b0;
          state_q    <= S_LOOP;
        end
        S_DONE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
