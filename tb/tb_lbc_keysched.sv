// tb_lbc_keysched -- checks the serial key schedule against the reference.
// Forward: after load, the subkey nibbles of K1..K32 are read in order, with
// a generator step in every round from K6 on. Backward: after load and 27
// forward steps (the prepare phase), K32..K1 must come out in reverse order
// while the schedule steps backwards, ending at the loaded key.
module tb_lbc_keysched;
  import lbc_pkg::*;
  import lbc_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        load = 0, step = 0, back = 0;
  logic [79:0] key = '0;
  logic [1:0]  nib = '0;
  logic [4:0]  kidx = '0;
  logic [3:0]  k_nib;
  int checks = 0, failures = 0;

  lbc_keysched dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic do_load(input logic [79:0] k);
    @(negedge clk);
    key = k; load = 1;
    @(negedge clk);
    load = 0;
  endtask

  task automatic check_round(input int j, input logic [15:0] exp, input bit st, input bit bk);
    logic [15:0] got;
    for (int c = 0; c < 4; c++) begin
      kidx = 5'(j); nib = 2'(c); step = st; back = bk;
      #1;
      got[4*c +: 4] = k_nib;
      @(negedge clk);
    end
    step = 0; back = 0;
    checks++;
    if (got !== exp) begin
      failures++;
      $display("K%0d (%s): %h, expected %h", j+1, bk ? "bwd" : "fwd", got, exp);
    end
  endtask

  initial begin
    logic [79:0] kk;
    sk_t k;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20; n++) begin
      kk = {$urandom, $urandom, $urandom};
      if (n == 0) kk = 80'h0123456789abcdef0123;
      k = ref_subkeys(kk);
      // forward
      do_load(kk);
      for (int j = 0; j < 32; j++) check_round(j, k[j], j >= 5, 1'b0);
      // prepare + backward
      do_load(kk);
      for (int s = 0; s < 27; s++) begin
        for (int c = 0; c < 4; c++) begin
          kidx = 5'd31; nib = 2'(c); step = 1; back = 0;
          @(negedge clk);
        end
      end
      step = 0;
      for (int j = 31; j >= 0; j--) check_round(j, k[j], j >= 5, 1'b1);
      checks++;
      if ({dut.km_q, dut.kl_q} !== kk) begin
        failures++;
        $display("key registers not restored: %h vs %h", {dut.km_q, dut.kl_q}, kk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
