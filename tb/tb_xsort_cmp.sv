// Self-checking test of the comparator: corner values and random pairs,
// expected result from a signed 32-bit difference.
module tb_xsort_cmp;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b;
  logic gt;
  int checks = 0, failures = 0;

  xsort_cmp #(.W(W)) dut (.in_sample(a), .reg_value(b), .gt(gt));

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    int diff;
    a = x; b = y;
    #1;
    diff = int'(x) - int'(y);
    checks++;
    if (gt !== (diff > 0)) begin
      failures++;
      $display("FAIL: %0d > %0d gave %0b", x, y, gt);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(1, 0); check(0, 1); check('1, '1);
    check('1, 0); check(0, '1); check(16'h8000, 16'h7fff); check(16'h7fff, 16'h8000);
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] x, y;
      x = W'($urandom);
      y = (i % 4 == 0) ? x : W'($urandom);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
