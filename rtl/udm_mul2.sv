// udm_mul2: 2x2-bit under-designed multiplier, the building block of udm_mul.
//
// The product of two 2-bit numbers is given in three bits instead of four.
// Fifteen of the sixteen input pairs give the exact product; the one
// exception is 3 x 3, which gives 7 (binary 111) instead of 9. That is the
// modified Karnaugh map of the under-designed multiplier: output bit 0 is
// a0&b0, bit 1 is (a1&b0)|(a0&b1), bit 2 is a1&b1, which matches the map
// entry by entry. Purely combinational.
module udm_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [2:0] p
);

  assign p[0] = a[0] & b[0];
  assign p[1] = (a[1] & b[0]) | (a[0] & b[1]);
  assign p[2] = a[1] & b[1];

endmodule
