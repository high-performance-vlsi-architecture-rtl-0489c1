// Self-checking test of the load register decode at the default N:
// every thermometer code (insert position p = 0..N) gives a single 1 at p
// (bit 0 is always 1), and random codes give the XOR of neighbours.
module tb_xsort_load_decode;
  localparam int unsigned N = 1024;
  logic [N-1:0] cmp, xr;
  int checks = 0, failures = 0;

  xsort_load_decode #(.N(N)) dut (.cmp(cmp), .xr(xr));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Thermometer codes: zeros in 0..p-1, ones in p..N-1.
    for (int p = 0; p <= int'(N); p++) begin
      for (int i = 0; i < int'(N); i++) cmp[i] = (i >= p);
      #1;
      for (int i = 0; i < int'(N); i++) begin
        logic exp;
        exp = (i == 0) || (i == p);
        checks++;
        if (xr[i] !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL: p=%0d bit %0d got %0b", p, i, xr[i]);
        end
      end
    end
    // Arbitrary codes.
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < int'(N); i++) cmp[i] = $urandom_range(0, 1);
      #1;
      for (int i = 1; i < int'(N); i++) begin
        checks++;
        if (xr[i] !== (cmp[i] != cmp[i-1])) begin
          failures++;
          if (failures < 10) $display("FAIL: random code bit %0d", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
