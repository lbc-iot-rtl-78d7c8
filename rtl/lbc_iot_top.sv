// lbc_iot_top -- LBC-IoT block cipher core: 32-bit block, 80-bit key,
// 32 Feistel rounds, encryption and decryption, 4-bit serial datapath.
//
// Structure: a controller (lbc_ctrl) sequences a serial round datapath
// (lbc_datapath, one round in 4 cycles) and a serial key schedule
// (lbc_keysched, one subkey nibble per cycle). Together they follow the
// cipher's hardware view of round function + key schedule + control logic
// around the key and state storage.
//
// Interface: pulse start for one cycle while busy = 0 with decrypt, key and
// blk_in valid. decrypt = 0 encrypts blk_in, decrypt = 1 decrypts it. The
// result appears on blk_out in the cycle done = 1 (a one-cycle pulse) and
// stays there until the next start. Latency start->done: 129 cycles to
// encrypt, 237 to decrypt (108 of which wind the key schedule to K32).
// Block layout: blk_in = {L0, R0}, left half in the upper 16 bits; the key's
// least significant 16 bits are the first subkey K1.
// Reset is asynchronous, active low.
module lbc_iot_top
  import lbc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               decrypt,
  input  logic [KEY_W-1:0]   key,
  input  logic [BLOCK_W-1:0] blk_in,
  output logic [BLOCK_W-1:0] blk_out,
  output logic               busy,
  output logic               done
);
  op_e        op;
  logic       load, nib_en, final_rnd, ks_step, ks_back, in_prep;
  logic [1:0] nib;
  logic [4:0] kidx;
  nibble_t    k_nib;

  lbc_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .op_in     (decrypt ? OP_DEC : OP_ENC),
    .op, .load, .nib_en, .nib, .final_rnd,
    .ks_step, .ks_back, .kidx, .busy, .done, .in_prep
  );

  lbc_datapath u_dp (
    .clk, .rst_n, .load, .op, .blk_in, .nib_en, .nib, .final_rnd, .k_nib,
    .blk_out
  );

  lbc_keysched u_ks (
    .clk, .rst_n, .load, .key,
    .step (ks_step), .back (ks_back), .nib, .kidx, .k_nib
  );
endmodule
