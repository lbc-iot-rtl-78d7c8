// lbc_datapath -- LBC-IoT round function on a 4-bit serial datapath.
//
// Holds the 32-bit state in a 16-bit left register L and a 16-bit right
// register R and computes one round in four clock cycles, one nibble per
// cycle, with a single S-box. The round is
//   L' = P2(R)
//   R' = P1(L xor K xor S(R <<< 7))
// where S is applied to each nibble of the rotated right half.
//
// Nibble cycle c (c = 0..3, least significant nibble first):
//   y_c = L[3:0] xor k_nib xor S(nibble c of (R <<< 7))
// A 4-to-1 multiplexer picks nibble c of the rotated (static) R; L shifts
// right by four and takes y_c in at the top, so after four cycles L holds
// y = L xor K xor S(R <<< 7). On cycle 3 the permutation step is folded into
// the same clock edge: L <= P2(R), R <= P1(y). The permutations are wiring
// on the full 16-bit words, since a bit permutation cannot be split into
// nibbles.
//
// Decryption runs the same nibble step with the inverse permutations at the
// round boundary. The ciphertext is loaded as L = P1^-1(C_R),
// R = P2^-1(C_L) (the inverse permutation on the load path, as in the
// serial architecture's input); every round then ends with
// L <= P1^-1(R), R <= P2^-1(y), except the last one, which leaves
// L <= y, R <= R unpermuted so that {L, R} is the plaintext.
//
// Interface: load (with op) takes blk_in; nib_en with nib = 0..3 runs a
// nibble cycle using k_nib; final_rnd marks the last decryption round.
// blk_out = {L, R} is the state, valid when the controller reports done.
// The serial order, the folding of the permutation into cycle 3 and the
// 32-bit parallel input/output are this design's choices.
module lbc_datapath
  import lbc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  op_e                  op,
  input  logic [BLOCK_W-1:0]   blk_in,
  input  logic                 nib_en,
  input  logic [1:0]           nib,
  input  logic                 final_rnd,
  input  nibble_t              k_nib,
  output logic [BLOCK_W-1:0]   blk_out
);
  half_t   l_q, r_q;
  half_t   r_rot, y_full;
  nibble_t s_in, s_out, y_nib;

  assign r_rot = rotl7(r_q);

  // 4-to-1 nibble select feeding the single S-box
  always_comb begin
    unique case (nib)
      2'd0: s_in = r_rot[3:0];
      2'd1: s_in = r_rot[7:4];
      2'd2: s_in = r_rot[11:8];
      default: s_in = r_rot[15:12];
    endcase
  end

  lbc_sbox u_sbox (.x(s_in), .y(s_out));

  assign y_nib  = l_q[3:0] ^ k_nib ^ s_out;
  assign y_full = {y_nib, l_q[15:4]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_q <= '0;
      r_q <= '0;
    end else if (load) begin
      if (op == OP_ENC) begin
        l_q <= blk_in[31:16];
        r_q <= blk_in[15:0];
      end else begin
        l_q <= p1_inv(blk_in[15:0]);
        r_q <= p2_inv(blk_in[31:16]);
      end
    end else if (nib_en) begin
      if (nib != 2'd3) begin
        l_q <= y_full;
      end else if (op == OP_ENC) begin
        l_q <= p2(r_q);
        r_q <= p1(y_full);
      end else if (!final_rnd) begin
        l_q <= p1_inv(r_q);
        r_q <= p2_inv(y_full);
      end else begin
        l_q <= y_full;
      end
    end
  end

  assign blk_out = {l_q, r_q};
endmodule
