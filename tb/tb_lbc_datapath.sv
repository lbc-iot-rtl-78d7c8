// tb_lbc_datapath -- checks the serial round datapath on its own.
// Subkey nibbles come from the reference key schedule; the testbench plays
// the controller (load, then 4 nibble cycles per round). For encryption the
// state is compared with the reference after every round; for decryption
// the final block must equal the reference plaintext.
module tb_lbc_datapath;
  import lbc_pkg::*;
  import lbc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        load = 0, nib_en = 0, final_rnd = 0;
  op_e         op = OP_ENC;
  logic [31:0] blk_in = '0, blk_out;
  logic [1:0]  nib = '0;
  logic [3:0]  k_nib = '0;
  int checks = 0, failures = 0;

  lbc_datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input op_e o, input logic [31:0] b, input sk_t k, input bit per_round);
    logic [31:0] s = b;
    @(negedge clk);
    op = o; blk_in = b; load = 1;
    @(negedge clk);
    load = 0;
    for (int r = 0; r < 32; r++) begin
      for (int c = 0; c < 4; c++) begin
        nib_en = 1; nib = 2'(c);
        final_rnd = (r == 31);
        k_nib = (o == OP_ENC) ? k[r][4*c +: 4] : k[31-r][4*c +: 4];
        @(negedge clk);
      end
      nib_en = 0;
      if (per_round) begin
        s = ref_round(s, k[r]);
        checks++;
        if (blk_out !== s) begin
          failures++;
          $display("round %0d: state %h, expected %h", r+1, blk_out, s);
        end
      end
    end
  endtask

  initial begin
    logic [79:0] key;
    logic [31:0] p, c;
    sk_t k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      key = {$urandom, $urandom, $urandom};
      p   = $urandom;
      if (n == 0) begin key = '0; p = '0; end
      k = ref_subkeys(key);
      c = ref_encrypt(p, key);
      run(OP_ENC, p, k, 1'b1);
      checks++;
      if (blk_out !== c) begin
        failures++;
        $display("enc: %h, expected %h", blk_out, c);
      end
      run(OP_DEC, c, k, 1'b0);
      checks++;
      if (blk_out !== p) begin
        failures++;
        $display("dec: %h, expected %h", blk_out, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
