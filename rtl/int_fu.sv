// int_fu: a conventional integer functional unit of the processor, the unit
// whose work the memory-based scheme takes over when it is defective or hot.
// IS_MUL selects an adder (a + b) or a multiplier (low 32 bits of a * b). It
// is fully pipelined: a result leaves LAT cycles after its operands entered,
// with the destination tag that came with them. Latencies are this design's
// (1 for the adder, 3 for the multiplier by default in the top).
module int_fu #(
  parameter bit          IS_MUL = 1'b0,
  parameter int unsigned LAT    = 1,
  parameter int unsigned TAG_W  = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [TAG_W-1:0] tag,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [31:0]      out_result
);

  logic             v_q [LAT];
  logic [TAG_W-1:0] t_q [LAT];
  logic [31:0]      r_q [LAT];
  logic [31:0]      r;

  assign r = IS_MUL ? 32'(a * b) : a + b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        v_q[i] <= 1'b0; t_q[i] <= '0; r_q[i] <= '0;
      end
    end else begin
      v_q[0] <= in_valid;
      t_q[0] <= tag;
      r_q[0] <= r;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1]; t_q[i] <= t_q[i-1]; r_q[i] <= r_q[i-1];
      end
    end
  end

  assign out_valid  = v_q[LAT-1];
  assign out_tag    = t_q[LAT-1];
  assign out_result = r_q[LAT-1];

endmodule
