// lbc_ctrl -- sequencing for the serial LBC-IoT core.
//
// A small state machine with a 5-bit round counter and a 2-bit nibble
// counter. On start (accepted only when idle) it loads the block and key
// and then:
//   encrypt: RUN for 32 rounds x 4 nibble cycles = 128 cycles;
//   decrypt: PREP for 27 key-schedule steps x 4 cycles = 108 cycles, which
//            winds the key schedule forward to K32, then RUN for 128 cycles
//            with the subkeys taken in reverse order.
// After the last cycle it spends one cycle in DONE with done = 1 and the
// result on the datapath outputs, then returns to IDLE.
// Latency from the start cycle to done: 129 cycles (encrypt) and 237 cycles
// (decrypt).
//
// Outputs to the datapath: load, nib_en, nib, final_rnd. To the key
// schedule: load, step, back, nib, kidx (subkey index 0..31 for K1..K32).
// The controller's structure is this design's own; the cipher description
// names control logic but does not describe it.
module lbc_ctrl
  import lbc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  op_e        op_in,
  output op_e        op,
  output logic       load,
  output logic       nib_en,
  output logic [1:0] nib,
  output logic       final_rnd,
  output logic       ks_step,
  output logic       ks_back,
  output logic [4:0] kidx,
  output logic       busy,
  output logic       done,
  output logic       in_prep
);
  typedef enum logic [1:0] {S_IDLE, S_PREP, S_RUN, S_DONE} state_e;

  state_e     state_q;
  op_e        op_q;
  logic [4:0] rnd_q;
  logic [1:0] nib_q;

  // while idle the operation being requested drives the load path
  assign op        = (state_q == S_IDLE) ? op_in : op_q;
  assign load      = (state_q == S_IDLE) && start;
  assign nib       = nib_q;
  assign nib_en    = (state_q == S_RUN);
  assign in_prep   = (state_q == S_PREP);
  assign busy      = (state_q == S_PREP) || (state_q == S_RUN);
  assign done      = (state_q == S_DONE);
  assign kidx      = (op_q == OP_ENC) ? rnd_q : 5'(ROUNDS - 1) - rnd_q;
  assign final_rnd = (rnd_q == 5'(ROUNDS - 1));
  assign ks_back   = (state_q == S_RUN) && (op_q == OP_DEC);
  assign ks_step   = (state_q == S_PREP) ||
                     ((state_q == S_RUN) && (kidx >= 5'(DIRECT_KEYS)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      op_q    <= OP_ENC;
      rnd_q   <= '0;
      nib_q   <= '0;
    end else begin
      // a key step runs only while busy; a load never happens mid-operation
      assert (!ks_step || busy) else $error("key step while idle");
      assert (!(load && busy))  else $error("load while busy");
      unique case (state_q)
        S_IDLE: begin
          rnd_q <= '0;
          nib_q <= '0;
          if (start) begin
            op_q    <= op_in;
            state_q <= (op_in == OP_DEC) ? S_PREP : S_RUN;
          end
        end
        S_PREP: begin
          nib_q <= nib_q + 2'd1;
          if (nib_q == 2'd3) begin
            if (rnd_q == 5'(GEN_KEYS - 1)) begin
              rnd_q   <= '0;
              state_q <= S_RUN;
            end else begin
              rnd_q <= rnd_q + 5'd1;
            end
          end
        end
        S_RUN: begin
          nib_q <= nib_q + 2'd1;
          if (nib_q == 2'd3) begin
            rnd_q <= rnd_q + 5'd1;
            if (rnd_q == 5'(ROUNDS - 1)) state_q <= S_DONE;
          end
        end
        default: state_q <= S_IDLE;   // S_DONE
      endcase
    end
  end

endmodule
