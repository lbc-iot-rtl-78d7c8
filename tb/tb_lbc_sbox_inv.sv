// tb_lbc_sbox_inv -- exhaustive check of the inverse S-box: for every x,
// S^-1(S(x)) must equal x, with S taken from the reference table.
module tb_lbc_sbox_inv;
  import lbc_ref_pkg::*;
  logic [3:0] y, x;
  int checks = 0, failures = 0;

  lbc_sbox_inv dut (.y, .x);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      y = ref_s(4'(i));
      #1;
      checks++;
      if (x !== 4'(i)) begin
        failures++;
        $display("S^-1(%h) = %h, expected %h", y, x, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
