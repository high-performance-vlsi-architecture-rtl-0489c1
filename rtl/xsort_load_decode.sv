// Load register decode: turns the comparator code into the load position.
//
// Because the array is always sorted in descending order, the comparator code
// cmp[0..N-1] is a run of 0s followed by a run of 1s. The register where the
// new sample goes is the first one whose comparator is 1, found with one XOR
// per neighbouring pair: xr[x] = cmp[x-1] ^ cmp[x] for x = 1..N-1. The delay is
// one XOR gate whatever N is, which is the point of the architecture (a
// leading-one detector tree would grow with log2 N).
//
// Register 0 has no XOR gate. Bit 0 of xr is tied to 1 so that the common
// multiplexer rule (cmp = 1 and xr = 1 means load) also gives the behaviour of
// the first multiplexer: load whenever cmp[0] is 1. Purely combinational.
module xsort_load_decode #(
  parameter int unsigned N = xsort_pkg::N_DEFAULT
) (
  input  logic [N-1:0] cmp,  // comparator code, bit x from CMP_x
  output logic [N-1:0] xr    // xor[x]; bit 0 constant 1
);

  always_comb begin
    xr[0] = 1'b1;
    for (int unsigned x = 1; x < N; x++) xr[x] = cmp[x-1] ^ cmp[x];
  end

endmodule
