// tb_int_fu: checks an adder unit (latency 1) and a multiplier unit
// (latency 3): result values, tags and the cycle each result appears.
module tb_int_fu;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic v; logic [31:0] a, b; logic [7:0] tag;
  logic av, mv; logic [7:0] at, mt; logic [31:0] ar, mr;
  int checks = 0, failures = 0;

  int_fu #(.IS_MUL(1'b0), .LAT(1)) u_add (.clk, .rst_n, .in_valid(v), .a, .b, .tag,
    .out_valid(av), .out_tag(at), .out_result(ar));
  int_fu #(.IS_MUL(1'b1), .LAT(3)) u_mul (.clk, .rst_n, .in_valid(v), .a, .b, .tag,
    .out_valid(mv), .out_tag(mt), .out_result(mr));

  logic [31:0] qa [$], qb [$];
  logic [7:0]  qt [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    v = 0; a = 0; b = 0; tag = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      v = 1; a = $urandom; b = $urandom; tag = 8'(n);
      qa.push_back(a); qb.push_back(b); qt.push_back(tag);
      @(negedge clk);     // one cycle later: adder result
      v = 0;
      checks++;
      if (!av || at != qt[$] || ar != qa[$] + qb[$]) begin failures++; $display("FAIL add n=%0d", n); end
      @(negedge clk);
      checks++;
      if (mv) begin failures++; $display("FAIL mul early n=%0d", n); end
      @(negedge clk);
      checks++;
      if (!mv || mt != qt[$] || mr != 32'(qa[$] * qb[$])) begin failures++; $display("FAIL mul n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
