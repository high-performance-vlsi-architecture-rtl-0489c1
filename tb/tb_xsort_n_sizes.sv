// Runs the sorting orders of the synthesis comparison, N = 32, 128 and 512
// at W = 16, side by side: each instance gets two rounds of N random samples,
// one per cycle (the second begins with clear), and must raise ready N+1
// cycles after the first sample with the samples in descending order.
module tb_xsort_n_sizes;
  localparam int unsigned W = 16;
  localparam int NS [3] = '{32, 128, 512};

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit done [3];

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < 3; g++) begin : g_size
    localparam int unsigned N = NS[g];
    logic clear = 0, in_valid = 0, in_ready, ready;
    logic [W-1:0] in_data = '0;
    logic [N-1:0][W-1:0] r;

    xsort_n #(.W(W), .N(N)) dut (
      .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
      .in_data(in_data), .in_ready(in_ready), .ready(ready), .r(r));

    initial begin
      done[g] = 0;
      @(posedge rst_n);
      for (int round = 0; round < 2; round++) begin
        int s[$];
        int cyc;
        s.delete();
        for (int i = 0; i < int'(N); i++) begin
          logic [W-1:0] d;
          d = (round == 0) ? W'($urandom) : W'($urandom_range(0, 40));
          s.push_back(int'(d));
          @(negedge clk);
          in_valid = 1; in_data = d; clear = (i == 0) && (round != 0);
        end
        cyc = int'(N);
        @(negedge clk);
        in_valid = 0; clear = 0;
        while (!ready && cyc < 3 * int'(N)) begin @(negedge clk); cyc++; end
        checks++;
        if (cyc != int'(N) + 1) begin
          failures++; $display("FAIL N=%0d ready after %0d cycles", N, cyc);
        end
        s.rsort();
        for (int i = 0; i < int'(N); i++) begin
          checks++;
          if (int'(r[i]) != s[i]) begin
            failures++;
            if (failures < 20) $display("FAIL N=%0d r[%0d]=%0d expected %0d", N, i, r[i], s[i]);
          end
        end
      end
      done[g] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
