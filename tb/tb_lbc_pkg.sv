// tb_lbc_pkg -- checks the permutation and rotation functions of lbc_pkg.
// Each single-bit input is pushed through P1 and P2 and must land where the
// table says (FIPS numbering: output bit x comes from input bit P(x), bit 1
// is the MSB); the tables here are typed independently of the package.
// Random words must survive P then P^-1, and the 7-bit and 3-bit rotations
// are compared with shift arithmetic.
module tb_lbc_pkg;
  import lbc_pkg::*;
  int checks = 0, failures = 0;
  int t1 [16] = '{13, 10, 7, 12, 9, 14, 3, 2, 5, 16, 15, 4, 1, 6, 11, 8};
  int t2 [16] = '{5, 8, 16, 12, 3, 11, 2, 13, 4, 1, 14, 6, 9, 15, 7, 10};

  task automatic chk(input string what, input logic [39:0] got, input logic [39:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w;
    logic [39:0] k;
    for (int x = 1; x <= 16; x++) begin
      // a one in input bit P(x) must appear in output bit x only
      chk($sformatf("P1 bit %0d", x), 40'(p1(16'(1) << (16 - t1[x-1]))), 40'(16'(1) << (16 - x)));
      chk($sformatf("P2 bit %0d", x), 40'(p2(16'(1) << (16 - t2[x-1]))), 40'(16'(1) << (16 - x)));
    end
    for (int n = 0; n < 200; n++) begin
      w = 16'($urandom);
      k = {8'($urandom), 32'($urandom)};
      chk("P1^-1(P1)", 40'(p1_inv(p1(w))), 40'(w));
      chk("P2^-1(P2)", 40'(p2_inv(p2(w))), 40'(w));
      chk("P1(P1^-1)", 40'(p1(p1_inv(w))), 40'(w));
      chk("rotl7", 40'(rotl7(w)), 40'(16'((32'(w) << 7) | (32'(w) >> 9))));
      chk("rotl3", rotl3(k), (k << 3) | (k >> 37));
      chk("rotr3", rotr3(rotl3(k)), k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
