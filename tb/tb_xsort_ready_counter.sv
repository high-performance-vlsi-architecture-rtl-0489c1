// Self-checking test of the round counter: with N = 8, ready must rise
// exactly N+1 cycles after the first of N back-to-back samples, extra
// samples are refused until clear, idle cycles delay ready, and a sample
// offered with clear starts the next round.
module tb_xsort_ready_counter;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic accept, full, ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  xsort_ready_counter #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .accept(accept), .full(full), .ready(ready));

  task automatic expect_eq(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0b exp %0b at %0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int taken, first_cycle, cycle, ready_cycle;
    bit m_full, m_ready;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Round 1: N back-to-back samples, then keep offering.
    cycle = 0; first_cycle = 0; ready_cycle = -1;
    in_valid = 1;
    for (int t = 0; t < 3 * int'(N); t++) begin
      #1;
      expect_eq("accept", accept, t < int'(N));
      @(posedge clk); #1;
      cycle++;
      if (ready && ready_cycle < 0) ready_cycle = cycle;
      @(negedge clk);
    end
    checks++;
    if (ready_cycle != int'(N) + 1) begin
      failures++; $display("FAIL ready after %0d cycles, expected %0d", ready_cycle, N + 1);
    end
    expect_eq("full", full, 1'b1);
    // Clear with a sample: it counts as the first of round 2.
    clear = 1;
    #1 expect_eq("accept with clear", accept, 1'b1);
    @(negedge clk);
    clear = 0;
    expect_eq("ready after clear", ready, 1'b0);
    expect_eq("full after clear", full, 1'b0);
    // Random idle cycles: model the count.
    taken = 1; m_full = 0; m_ready = 0;
    for (int t = 0; t < 400; t++) begin
      in_valid = $urandom_range(0, 2) != 0;
      clear = ($urandom_range(0, 29) == 0);
      #1;
      expect_eq("accept", accept, in_valid && (!m_full || clear));
      @(posedge clk); #1;
      if (clear) begin
        taken = in_valid ? 1 : 0; m_full = 0; m_ready = 0;
      end else begin
        m_ready = m_full;
        if (in_valid && !m_full) begin
          taken++;
          if (taken == int'(N)) m_full = 1;
        end
      end
      expect_eq("full", full, m_full);
      expect_eq("ready", ready, m_ready);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
