// tb_lbc_sbox -- exhaustive check of the bit-sliced S-box against its table.
// All 16 inputs are applied and compared with the published table, typed
// here independently; the outputs are also checked to form a permutation.
// From the outputs observed, the testbench also computes the difference
// distribution and linear approximation tables and checks the S-box's
// published strength figures: largest DDT entry (dx != 0) = 4 and largest
// |LAT| entry (b != 0) = 4.
module tb_lbc_sbox;
  logic [3:0] x, y;
  int checks = 0, failures = 0;
  logic [3:0] tab [16] = '{4'h0, 4'h8, 4'h6, 4'hD, 4'h5, 4'hF, 4'h7, 4'hC,
                           4'h4, 4'hE, 4'h2, 4'h3, 4'h9, 4'h1, 4'hB, 4'hA};
  logic [15:0] seen;
  logic [3:0]  obs [16];
  int          dmax, lmax;

  lbc_sbox dut (.x, .y);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1;
      checks++;
      if (y !== tab[i]) begin
        failures++;
        $display("S(%h) = %h, expected %h", x, y, tab[i]);
      end
      seen[y] = 1'b1;
      obs[i] = y;
    end
    checks++;
    if (seen != 16'hFFFF) begin
      failures++;
      $display("S-box is not a bijection: %b", seen);
    end
    dmax = 0;
    for (int dx = 1; dx < 16; dx++)
      for (int dy = 0; dy < 16; dy++) begin
        int n;
        n = 0;
        for (int v = 0; v < 16; v++) if ((obs[v ^ dx] ^ obs[v]) == 4'(dy)) n++;
        if (n > dmax) dmax = n;
      end
    lmax = 0;
    for (int a = 0; a < 16; a++)
      for (int b = 1; b < 16; b++) begin
        int n;
        n = 0;
        for (int v = 0; v < 16; v++) if (^(4'(a) & 4'(v)) == ^(4'(b) & obs[v])) n++;
        if (n - 8 > lmax) lmax = n - 8;
        if (8 - n > lmax) lmax = 8 - n;
      end
    checks++;
    if (dmax != 4) begin failures++; $display("DDT max %0d, expected 4", dmax); end
    checks++;
    if (lmax != 4) begin failures++; $display("LAT max %0d, expected 4", lmax); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
