// Self-checking test of the input register: it takes the sample when accept
// is high and becomes 0 otherwise.
module tb_xsort_in_reg;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, accept = 0;
  logic [W-1:0] din = '0, q, m;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xsort_in_reg #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .accept(accept), .in_data(din), .q(q));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      accept = $urandom_range(0, 3) != 0;
      din = W'($urandom) | W'(1);
      m = accept ? din : '0;
      @(posedge clk);
      #1;
      checks++;
      if (q !== m) begin failures++; $display("FAIL t=%0d got %h exp %h", t, q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
