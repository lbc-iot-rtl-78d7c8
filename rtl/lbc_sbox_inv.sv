// lbc_sbox_inv -- inverse of the 4-bit LBC-IoT S-box.
//
// Needed only by the key schedule when it walks backwards through the
// subkeys for decryption. The inverse table is derived from the forward
// S-box (S(x) = 0 8 6 D 5 F 7 C 4 E 2 3 9 1 B A):
//   y        : 0 1 2 3 4 5 6 7 8 9 A B C D E F
//   S^-1(y)  : 0 D A B 8 4 2 6 1 C F E 7 3 9 5
// Written as a lookup; a synthesis tool reduces it to gates. Combinational.
// Using an inverse S-box at all is this design's choice: the cipher
// description only says the subkeys are applied in reverse order.
module lbc_sbox_inv (
  input  logic [3:0] y,
  output logic [3:0] x
);
  always_comb begin
    unique case (y)
      4'h0: x = 4'h0;  4'h1: x = 4'hD;  4'h2: x = 4'hA;  4'h3: x = 4'hB;
      4'h4: x = 4'h8;  4'h5: x = 4'h4;  4'h6: x = 4'h2;  4'h7: x = 4'h6;
      4'h8: x = 4'h1;  4'h9: x = 4'hC;  4'hA: x = 4'hF;  4'hB: x = 4'hE;
      4'hC: x = 4'h7;  4'hD: x = 4'h3;  4'hE: x = 4'h9;  4'hF: x = 4'h5;
      default: x = 4'h0;
    endcase
  end
endmodule
