// ecc_pargen32: parity generator for one 32-bit segment of the nested SECDED
// codes (39,32), (72,64) and (137,128).
//
// Data bit i of the segment has the Hamming column ham_col32(i), the i-th 6-bit
// value with at least two ones. The generator outputs the six partial Hamming
// parities h (XOR of the data bits whose column has that row set) and the plain
// parity p of the segment. The (39,32) check bits come from one generator; the
// longer codes combine several generators, the segment parities forming the
// extra Hamming rows that tell the segments apart.
//
// Purely combinational.
module ecc_pargen32
  import emq_pkg::*;
(
  input  logic [31:0] d,
  output logic [5:0]  h,
  output logic        p
);
  always_comb begin
    h = '0;
    for (int unsigned i = 0; i < 32; i++) begin
      if (d[i]) h = h ^ ham_col32(i);
    end
    p = ^d;
  end
endmodule
