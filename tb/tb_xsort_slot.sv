// Self-checking test of one array position (multiplexer plus register), both
// forms, against a cycle model: reset value, retain, shift, load and clear.
module tb_xsort_slot;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, clear = 0, xr = 0, cmp = 0;
  logic [W-1:0] prev = '0, ins = '0, q0, q1;
  logic [W-1:0] m0, m1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xsort_slot #(.W(W), .FIRST(1'b0)) dut_gen (
    .clk(clk), .rst_n(rst_n), .clear(clear), .xr(xr), .cmp(cmp),
    .prev(prev), .in_sample(ins), .q(q0));
  xsort_slot #(.W(W), .FIRST(1'b1)) dut_first (
    .clk(clk), .rst_n(rst_n), .clear(clear), .xr(xr), .cmp(cmp),
    .prev(prev), .in_sample(ins), .q(q1));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m0 = '0; m1 = '0;
    repeat (2) @(negedge clk);
    checks += 2;
    if (q0 !== '0 || q1 !== '0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      clear = ($urandom_range(0, 19) == 0);
      xr = $urandom_range(0, 1); cmp = $urandom_range(0, 1);
      prev = W'($urandom); ins = W'($urandom);
      @(posedge clk);
      if (clear) begin m0 = '0; m1 = '0; end
      else begin
        if (cmp) m0 = xr ? ins : prev;
        if (cmp) m1 = ins;
      end
      #1;
      checks += 2;
      if (q0 !== m0) begin failures++; $display("FAIL gen t=%0d got %h exp %h", t, q0, m0); end
      if (q1 !== m1) begin failures++; $display("FAIL first t=%0d got %h exp %h", t, q1, m1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
