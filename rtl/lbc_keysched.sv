// lbc_keysched -- LBC-IoT key register and serial subkey generator.
//
// The 80-bit key is held as two 40-bit registers, KM = key[79:40] and
// KL = key[39:0]. Subkeys are 16 bits and are delivered one nibble per
// clock (nibble c = bits 4c+3..4c) to the serial datapath.
//
// K1..K5 are the key itself, least significant 16 bits first:
//   K1 = KL[15:0], K2 = KL[31:16], K3 = {KM[7:0], KL[39:32]},
//   K4 = KM[23:8], K5 = KM[39:24].
// Each of K6..K32 comes from one forward step of the generator:
//   a  = KL <<< 3                       (40-bit rotation)
//   t  = S(a[15:0] xor KM[15:0])         (four S-box applications)
//   K  = t xor P1(KM[15:0])
//   KL <= {a[39:16], t}                  (S output feeds the next step)
//   KM <= {K, KM[39:16]}                 (new subkey enters at the top)
// After the step that makes K_j, K_j sits in KM[39:24].
// The step is run serially with one S-box: nibble c of a xor KM is chosen
// by a 4-to-1 multiplexer, the S output nibble t_c goes out as
// k_nib = t_c xor P1(KM[15:0])[c] and is kept in a 12-bit holding register;
// on the fourth nibble both key registers are updated at once.
//
// For decryption the subkeys are needed in reverse order. The step is
// invertible: with t = KL[15:0] and K = KM[39:24],
//   m  = P1^-1(K xor t)                  (the old KM[15:0])
//   a_lo = S^-1(t) xor m                 (one inverse S-box, serial)
//   KL <= (KL[39:16], a_lo) >>> 3,  KM <= {KM[23:0], m}
// and the subkey of a backward round is simply KM[39:24]. Before a
// decryption the controller runs the 27 forward steps (the "prepare" phase)
// so that KM[39:24] holds K32.
//
// The 40-bit halves, the 3-bit rotation, the S-box and P1 follow the cipher
// description; how the 40-bit quantities are narrowed to a 16-bit subkey,
// the register update and the backward step are this design's reading.
//
// Controls: load takes key; step runs a generator nibble cycle (forward, or
// backward when back = 1) and updates the registers when nib = 3; kidx
// (0..31 for K1..K32) selects a direct key slice when kidx < 5.
module lbc_keysched
  import lbc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [KEY_W-1:0]   key,
  input  logic               step,
  input  logic               back,
  input  logic [1:0]         nib,
  input  logic [4:0]         kidx,
  output nibble_t            k_nib
);
  khalf_t  km_q, kl_q;
  logic [11:0] hold_q;

  khalf_t  a_fwd;
  half_t   u_fwd, pm_fwd, t_full, k_full;
  half_t   t_bwd, m_bwd, a_lo;
  half_t   direct;
  nibble_t s_in, s_out, si_in, si_out, v_nib, kgen_nib;

  // ---------------- forward step ----------------
  assign a_fwd  = rotl3(kl_q);
  assign u_fwd  = a_fwd[15:0] ^ km_q[15:0];
  assign pm_fwd = p1(km_q[15:0]);

  always_comb begin
    unique case (nib)
      2'd0: s_in = u_fwd[3:0];
      2'd1: s_in = u_fwd[7:4];
      2'd2: s_in = u_fwd[11:8];
      default: s_in = u_fwd[15:12];
    endcase
  end

  lbc_sbox u_sbox (.x(s_in), .y(s_out));

  always_comb begin
    unique case (nib)
      2'd0: kgen_nib = s_out ^ pm_fwd[3:0];
      2'd1: kgen_nib = s_out ^ pm_fwd[7:4];
      2'd2: kgen_nib = s_out ^ pm_fwd[11:8];
      default: kgen_nib = s_out ^ pm_fwd[15:12];
    endcase
  end

  assign t_full = {s_out, hold_q};     // complete on nib = 3
  assign k_full = t_full ^ pm_fwd;

  // ---------------- backward step ----------------
  assign t_bwd = kl_q[15:0];
  assign m_bwd = p1_inv(km_q[39:24] ^ t_bwd);

  always_comb begin
    unique case (nib)
      2'd0: si_in = t_bwd[3:0];
      2'd1: si_in = t_bwd[7:4];
      2'd2: si_in = t_bwd[11:8];
      default: si_in = t_bwd[15:12];
    endcase
  end

  lbc_sbox_inv u_sbox_inv (.y(si_in), .x(si_out));

  always_comb begin
    unique case (nib)
      2'd0: v_nib = si_out ^ m_bwd[3:0];
      2'd1: v_nib = si_out ^ m_bwd[7:4];
      2'd2: v_nib = si_out ^ m_bwd[11:8];
      default: v_nib = si_out ^ m_bwd[15:12];
    endcase
  end

  assign a_lo = {v_nib, hold_q};

  // ---------------- registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      km_q   <= '0;
      kl_q   <= '0;
      hold_q <= '0;
    end else if (load) begin
      km_q   <= key[79:40];
      kl_q   <= key[39:0];
      hold_q <= '0;
    end else if (step) begin
      if (nib != 2'd3) begin
        hold_q <= {(back ? v_nib : s_out), hold_q[11:4]};
      end else if (!back) begin
        kl_q <= {a_fwd[39:16], t_full};
        km_q <= {k_full, km_q[39:16]};
      end else begin
        kl_q <= rotr3({kl_q[39:16], a_lo});
        km_q <= {km_q[23:0], m_bwd};
      end
    end
  end

  // ---------------- subkey nibble out ----------------
  always_comb begin
    unique case (kidx)
      5'd0: direct = kl_q[15:0];
      5'd1: direct = kl_q[31:16];
      5'd2: direct = {km_q[7:0], kl_q[39:32]};
      5'd3: direct = km_q[23:8];
      default: direct = km_q[39:24];
    endcase
  end

  always_comb begin
    if (kidx >= 5'(DIRECT_KEYS) && !back) begin
      k_nib = kgen_nib;
    end else begin
      unique case (nib)
        2'd0: k_nib = direct[3:0];
        2'd1: k_nib = direct[7:4];
        2'd2: k_nib = direct[11:8];
        default: k_nib = direct[15:12];
      endcase
    end
  end
endmodule
