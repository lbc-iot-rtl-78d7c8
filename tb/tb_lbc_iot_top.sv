// tb_lbc_iot_top -- end-to-end test of the LBC-IoT core at its only size.
// Encrypts and decrypts random blocks under random keys (plus an all-zero
// and an all-ones vector) and compares with the word-level reference model;
// each ciphertext is also decrypted back. Latencies are checked (129 cycles
// encrypt, 237 decrypt). It counts how often each mechanism of the core
// happens and fails if one never does: encryption, decryption, the
// key-schedule prepare phase, rounds with a key-slice subkey, rounds with a
// generated subkey, backward key steps, and a start ignored while busy.
module tb_lbc_iot_top;
  import lbc_ref_pkg::*;

  logic        clk = 0, rst_n = 0, start = 0, decrypt = 0;
  logic [79:0] key = '0;
  logic [31:0] blk_in = '0, blk_out;
  logic        busy, done;
  int checks = 0, failures = 0;
  int n_enc = 0, n_dec = 0, n_prep = 0, n_direct = 0, n_gen = 0, n_back = 0, n_ignored = 0;

  lbc_iot_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, one count per round or phase (sampled on nibble 3)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.in_prep && dut.u_ctrl.nib == 2'd3 && dut.u_ctrl.rnd_q == 5'd0) n_prep++;
    if (dut.u_ctrl.nib_en && dut.u_ctrl.nib == 2'd3) begin
      if (dut.u_ctrl.kidx < 5) n_direct++;
      else if (dut.u_ctrl.ks_back) n_back++;
      else n_gen++;
    end
  end

  task automatic op(input bit dec, input logic [79:0] k, input logic [31:0] b,
                    input logic [31:0] exp, input bit poke);
    int cyc = 0;
    @(negedge clk);
    decrypt = dec; key = k; blk_in = b; start = 1;
    @(negedge clk);
    start = 0;
    while (!done && cyc < 1000) begin
      cyc++;
      if (poke && cyc == 20) begin
        start = 1; blk_in = ~b; decrypt = ~dec;   // must be ignored
        n_ignored++;
      end else begin
        start = 0;
      end
      @(negedge clk);
    end
    checks++;
    if (blk_out !== exp) begin
      failures++;
      $display("%s key=%h in=%h: out %h, expected %h", dec ? "dec" : "enc", k, b, blk_out, exp);
    end
    checks++;
    if (cyc + 1 != (dec ? 237 : 129)) begin
      failures++;
      $display("%s latency %0d", dec ? "dec" : "enc", cyc + 1);
    end
    if (dec) n_dec++; else n_enc++;
  endtask

  task automatic mech(input string name, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", name);
    end else begin
      $display("%-28s %0d", name, n);
    end
  endtask

  initial begin
    logic [79:0] k;
    logic [31:0] p, c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      k = {$urandom, $urandom, $urandom};
      p = $urandom;
      if (n == 0) begin k = '0; p = '0; end
      if (n == 1) begin k = '1; p = '1; end
      c = ref_encrypt(p, k);
      op(1'b0, k, p, c, n == 2);
      op(1'b1, k, c, p, n == 3);
      // decrypting an arbitrary block and encrypting the result returns it
      p = $urandom;
      op(1'b1, k, p, ref_decrypt(p, k), 1'b0);
      op(1'b0, k, ref_decrypt(p, k), p, 1'b0);
    end
    mech("encryptions", n_enc);
    mech("decryptions", n_dec);
    mech("prepare phases", n_prep);
    mech("key-slice subkey rounds", n_direct);
    mech("generated subkey rounds", n_gen);
    mech("backward key steps", n_back);
    mech("ignored start while busy", n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
