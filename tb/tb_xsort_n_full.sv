// Full-size test of the sorter with its default parameters (N = 1024,
// W = 16): one round of N random samples, one per cycle, then a second round
// made of many repeated values and zeros. ready must rise N+1 cycles after
// the first sample, and the outputs must then hold the round's samples in
// descending order.
module tb_xsort_n_full;
  localparam int unsigned W = xsort_pkg::W_DEFAULT;
  localparam int unsigned N = xsort_pkg::N_DEFAULT;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [W-1:0] in_data = '0;
  logic in_ready, ready;
  logic [N-1:0][W-1:0] r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xsort_n dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .in_data(in_data), .in_ready(in_ready), .ready(ready), .r(r));

  initial begin
    repeat (20 * N) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_round(input int kind);
    int s[$];
    int cyc;
    for (int i = 0; i < int'(N); i++) begin
      logic [W-1:0] d;
      d = (kind == 0) ? W'($urandom) : W'($urandom_range(0, 6));
      s.push_back(int'(d));
      @(negedge clk);
      in_valid = 1; in_data = d; clear = (i == 0) && (kind != 0);
      #1;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL sample %0d refused", i); end
    end
    cyc = int'(N);
    @(negedge clk);
    in_valid = 0; clear = 0;
    while (!ready && cyc < 3 * int'(N)) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != int'(N) + 1) begin
      failures++; $display("FAIL ready after %0d cycles, expected %0d", cyc, N + 1);
    end
    s.rsort();
    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (int'(r[i]) != s[i]) begin
        failures++;
        if (failures < 20) $display("FAIL r[%0d]=%0d expected %0d", i, r[i], s[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_round(0);
    run_round(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
