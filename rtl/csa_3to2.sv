// csa_3to2: W-bit carry-save adder (3:2 compressor).
// Reduces three operands to a sum vector s and a carry vector cy with no carry
// propagation: s = a^b^c bitwise, cy = (majority(a,b,c) << 1) | cin, so that
// s + cy = a + b + c + cin modulo 2^W. The free carry LSB takes cin, which the
// sub-filters use for the +1 of a two's-complement subtraction. Combinational.
module csa_3to2 #(
  parameter int unsigned W = symfir_pkg::ACC_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W-2:0] maj;  // the carry out of the top bit is dropped (modulo 2^W)
  assign s   = a ^ b ^ c;
  assign maj = (a[W-2:0] & b[W-2:0]) | (a[W-2:0] & c[W-2:0]) | (b[W-2:0] & c[W-2:0]);
  assign cy  = {maj, cin};
endmodule
