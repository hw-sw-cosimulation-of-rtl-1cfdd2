// lod4: 4-bit leading-one detector, the basic block of the pipelined LOD.
// d is one-hot at the position of the most significant 1 of a (all zero
// when a is zero); nz tells whether a has any 1. Purely combinational.
module lod4 (
  input  logic [3:0] a,
  output logic [3:0] d,
  output logic       nz
);
  assign d[3] = a[3];
  assign d[2] = a[2] & ~a[3];
  assign d[1] = a[1] & ~(|a[3:2]);
  assign d[0] = a[0] & ~(|a[3:1]);
  assign nz   = |a;
endmodule
