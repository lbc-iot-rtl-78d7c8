// lbc_sbox -- the 4-bit LBC-IoT S-box as a bit-sliced gate network.
//
// The cipher uses one 4x4 S-box everywhere (four copies per round in the
// round function, one in the key schedule). Its table is
//   x    : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S(x) : 0 8 6 D 5 F 7 C 4 E 2 3 9 1 B A
// and it is built here from the published eight-gate sequence (3 AND, 1 OR,
// 4 XOR) with inputs A=x[0], B=x[1], C=x[2], D=x[3]:
//   Z=A&B  X=C^Z  Y=B|C  H=D^Y  N=D&X  O=N^A  S=H&A  L=S^B
//   y[0]=X  y[1]=L  y[2]=H  y[3]=O
// That input/output bit order is this design's reading; it is the only one
// under which the gate sequence reproduces the table above.
// Purely combinational, no clock.
module lbc_sbox (
  input  logic [3:0] x,
  output logic [3:0] y
);
  logic a, b, c, d;
  logic z, xx, yy, h, n, o, s, l;

  assign {d, c, b, a} = x;

  always_comb begin
    z  = a & b;
    xx = c ^ z;
    yy = b | c;
    h  = d ^ yy;
    n  = d & xx;
    o  = n ^ a;
    s  = h & a;
    l  = s ^ b;
  end

  assign y = {o, h, l, xx};
endmodule
