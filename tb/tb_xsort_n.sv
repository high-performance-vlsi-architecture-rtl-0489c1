// End-to-end test of the sorter at N = 8, W = 4, so that ties, zero samples
// and every insert position occur often. Rounds of random length with random
// idle cycles, refused extra samples and clears are run; after every cycle
// the array must equal the samples inserted so far in the round, sorted in
// descending order and padded with zeros. With back-to-back samples ready
// must rise N+1 cycles after the first. Each mechanism is counted and must
// occur at least once.
module tb_xsort_n;
  localparam int unsigned W = 4;
  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [W-1:0] in_data = '0;
  logic in_ready, ready;
  logic [N-1:0][W-1:0] r;
  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_load_first = 0, n_load_mid = 0, n_load_last = 0, n_zero = 0;
  int n_tie = 0, n_refused = 0, n_clear = 0, n_ready = 0;
  int n_idle = 0, n_latency = 0;

  always #5 clk = ~clk;

  xsort_n #(.W(W), .N(N)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .in_data(in_data), .in_ready(in_ready), .ready(ready), .r(r));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int inserted[$];   // samples of the current round already in the array
  int pending;       // sample taken last cycle, inserted at the next edge
  bit has_pending;

  task automatic check_array();
    int s[$];
    s = inserted;
    s.rsort();
    for (int i = 0; i < int'(N); i++) begin
      int e;
      e = (i < s.size()) ? s[i] : 0;
      checks++;
      if (int'(r[i]) != e) begin
        failures++;
        if (failures < 20) $display("FAIL r[%0d]=%0d expected %0d at %0t", i, r[i], e, $time);
      end
    end
  endtask

  // One cycle: drive at negedge, update the model at posedge, check after.
  task automatic cycle(input bit v, input logic [W-1:0] d, input bit clr);
    bit taken;
    @(negedge clk);
    in_valid = v; in_data = d; clear = clr;
    #1;
    taken = v && in_ready;
    if (v && !in_ready) n_refused++;
    if (!v) n_idle++;
    @(posedge clk);
    if (clr) begin
      inserted.delete();
      n_clear++;
    end else if (has_pending && pending != 0) begin
      // Insert position: after every stored value that is >= the sample.
      int pos;
      pos = 0;
      foreach (inserted[i]) if (inserted[i] >= pending) pos++;
      if (pos == 0) n_load_first++;
      else if (pos == int'(N) - 1) n_load_last++;
      else n_load_mid++;
      foreach (inserted[i]) if (inserted[i] == pending) begin n_tie++; break; end
      inserted.push_back(pending);
    end else if (has_pending) begin
      inserted.push_back(pending);
    end
    has_pending = taken;
    pending = taken ? int'(d) : 0;
    if (taken && d == 0) n_zero++;
    #1;
    check_array();
    checks++;
    if (ready !== (inserted.size() == int'(N) && !has_pending)) begin
      failures++;
      $display("FAIL ready=%0b with %0d inserted at %0t", ready, inserted.size(), $time);
    end
    if (ready) n_ready++;
  endtask

  initial begin
    has_pending = 0; pending = 0;
    repeat (3) @(negedge clk);
    check_array();
    rst_n = 1;

    // Round with back-to-back samples: latency check.
    begin
      int cyc;
      cyc = 0;
      for (int i = 0; i < int'(N); i++) begin
        cycle(1, W'($urandom_range(1, 15)), 0);
        cyc++;
      end
      while (!ready && cyc < 50) begin cycle(0, '0, 0); cyc++; end
      checks++;
      if (cyc != int'(N) + 1) begin
        failures++; $display("FAIL ready after %0d cycles, expected %0d", cyc, N + 1);
      end else n_latency++;
    end
    // Extra samples are refused, then clear.
    cycle(1, 4'd9, 0);
    cycle(1, 4'd3, 1);

    // Random rounds.
    for (int round = 0; round < 300; round++) begin
      int guard;
      guard = 0;
      while (!ready && guard < 60) begin
        bit v;
        v = $urandom_range(0, 3) != 0;
        cycle(v, W'($urandom_range(0, 15)), 0);
        guard++;
      end
      // Hold the result a few cycles, offering refused samples sometimes.
      repeat ($urandom_range(0, 2)) cycle(1'($urandom_range(0, 1)), W'($urandom), 0);
      cycle(1'($urandom_range(0, 1)), W'($urandom_range(0, 15)), 1);
    end
    // A round aborted by clear before ready.
    cycle(1, 4'd5, 0);
    cycle(1, 4'd7, 0);
    cycle(0, '0, 1);
    cycle(0, '0, 0);

    $display("mechanisms: load_first=%0d load_mid=%0d load_last=%0d zero=%0d tie=%0d",
             n_load_first, n_load_mid, n_load_last, n_zero, n_tie);
    $display("            refused=%0d idle=%0d clear=%0d ready=%0d latency=%0d",
             n_refused, n_idle, n_clear, n_ready, n_latency);
    if (n_load_first == 0) begin failures++; $display("FAIL never loaded REG_0"); end
    if (n_load_mid == 0)   begin failures++; $display("FAIL never loaded a middle register"); end
    if (n_load_last == 0)  begin failures++; $display("FAIL never loaded REG_N-1"); end
    if (n_zero == 0)       begin failures++; $display("FAIL never took a zero sample"); end
    if (n_tie == 0)        begin failures++; $display("FAIL never inserted a tie"); end
    if (n_refused == 0)    begin failures++; $display("FAIL never refused a sample"); end
    if (n_idle == 0)       begin failures++; $display("FAIL never idle"); end
    if (n_clear == 0)      begin failures++; $display("FAIL never cleared"); end
    if (n_ready == 0)      begin failures++; $display("FAIL never ready"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
