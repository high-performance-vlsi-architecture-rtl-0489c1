// XSORT-N: running sort of N streaming samples in N clock cycles.
//
// One W-bit sample enters per cycle. It is registered in REG_IN and, in the
// next cycle, compared with all N registers of the array at once (CMP_x:
// REG_IN > REG_x). The array is kept in descending order, so the comparator
// code is a run of 0s followed by 1s; one XOR per neighbouring pair marks the
// 0-to-1 step, which is where the sample is loaded. Registers left of that
// step keep their values (cmp = 0), registers right of it shift right by one
// (cmp = 1, xor = 0) and the last value falls off the end. If the sample is
// larger than everything, cmp[0] = 1 and it is loaded into REG_0 while the
// whole array shifts. A zero sample leaves the array unchanged, which is why
// the registers reset to 0. The select path is CMP -> XOR -> MUX and its depth
// does not depend on N.
//
// Interface and timing (handshake and round control are this design's own):
//   in_valid/in_data  a sample is taken in a cycle where in_valid and
//                     in_ready are both high; it is sorted into r one cycle
//                     later. Idle cycles are allowed.
//   ready             high once the N samples of the round are in r, r[0]
//                     the largest and r[N-1] the smallest. With a sample in
//                     every cycle, ready rises N+1 cycles after the first one
//                     is offered. After N samples in_ready stays low until
//                     clear.
//   clear             returns the array, REG_IN aside, to zero and starts a
//                     new round; a sample offered with clear is the first of
//                     the new round. Assert it once ready is high (earlier it
//                     aborts the round).
//   rst_n             asynchronous active-low reset of everything to zero.
// Samples are unsigned; equal samples keep their arrival order. N must be a
// power of two >= 2 (the round counter is log2 N bits wide).
module xsort_n
  import xsort_pkg::*;
#(
  parameter int unsigned W = xsort_pkg::W_DEFAULT,
  parameter int unsigned N = xsort_pkg::N_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                in_valid,
  input  logic [W-1:0]        in_data,
  output logic                in_ready,
  output logic                ready,
  output logic [N-1:0][W-1:0] r
);

  logic [W-1:0] reg_in;  // REG_IN
  logic [N-1:0] cmp;     // comparator code
  logic [N-1:0] xr;      // load register decode, bit 0 constant 1
  logic         accept;
  logic         full;

  xsort_ready_counter #(.N(N)) u_ctr (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .accept(accept), .full(full), .ready(ready)
  );

  always_comb in_ready = !full || clear;

  xsort_in_reg #(.W(W)) u_in (
    .clk(clk), .rst_n(rst_n), .accept(accept), .in_data(in_data), .q(reg_in)
  );

  for (genvar x = 0; x < N; x++) begin : g_cmp
    xsort_cmp #(.W(W)) u_cmp (.in_sample(reg_in), .reg_value(r[x]), .gt(cmp[x]));
  end

  xsort_load_decode #(.N(N)) u_dec (.cmp(cmp), .xr(xr));

  for (genvar x = 0; x < N; x++) begin : g_reg
    xsort_slot #(.W(W), .FIRST(x == 0)) u_slot (
      .clk(clk), .rst_n(rst_n), .clear(clear),
      .xr(xr[x]), .cmp(cmp[x]),
      .prev(r[(x == 0) ? 0 : x - 1]),
      .in_sample(reg_in), .q(r[x])
    );
  end

  // The array is always sorted, so the comparator code never steps from 1
  // back to 0 and at most one XOR output is high.
  logic cmp_thermo;
  always_comb cmp_thermo = &(~cmp[N-2:0] | cmp[N-1:1]);

  a_cmp_thermo: assert property (@(posedge clk) disable iff (!rst_n) cmp_thermo);
  a_xor_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(xr[N-1:1]));

endmodule
