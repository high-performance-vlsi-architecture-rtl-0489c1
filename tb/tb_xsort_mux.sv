// Self-checking test of the register multiplexer, both the general form and
// the first-position form, over every select combination with random data.
module tb_xsort_mux;
  import xsort_pkg::*;
  localparam int unsigned W = 16;
  logic xr, cmp;
  logic [W-1:0] cur, prev, ins, d0, d1;
  sel_e sel0, sel1;
  int checks = 0, failures = 0;

  xsort_mux #(.W(W), .FIRST(1'b0)) dut_gen (
    .xr(xr), .cmp(cmp), .cur(cur), .prev(prev), .in_sample(ins), .sel(sel0), .d(d0));
  xsort_mux #(.W(W), .FIRST(1'b1)) dut_first (
    .xr(xr), .cmp(cmp), .cur(cur), .prev(prev), .in_sample(ins), .sel(sel1), .d(d1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int c = 0; c < 4; c++) begin
        logic [W-1:0] e0, e1;
        {xr, cmp} = 2'(c);
        cur = W'($urandom); prev = W'($urandom); ins = W'($urandom);
        #1;
        // Table: cmp=0 retain; cmp=1,xor=0 shift; cmp=1,xor=1 load.
        e0 = !cmp ? cur : (xr ? ins : prev);
        // First position: cmp=0 retain, cmp=1 load.
        e1 = cmp ? ins : cur;
        checks += 2;
        if (d0 !== e0) begin failures++; $display("FAIL gen xr=%0b cmp=%0b", xr, cmp); end
        if (d1 !== e1) begin failures++; $display("FAIL first xr=%0b cmp=%0b", xr, cmp); end
        checks += 2;
        if (sel0 !== (!cmp ? SEL_RETAIN : (xr ? SEL_LOAD : SEL_SHIFT))) failures++;
        if (sel1 !== (cmp ? SEL_LOAD : SEL_RETAIN)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
