// tb_lbc_ctrl -- checks the controller's sequence cycle by cycle.
// For an encryption and a decryption it records every cycle between start
// and done and checks: latency (129 / 237 cycles), the nibble counter
// 0,1,2,3 per round, the subkey index (K1..K32 forward, K32..K1 backward),
// the number of key-schedule step cycles (108 prepare + 108 generate), the
// backward flag, the final-round flag, a single load, a one-cycle done, and
// that a start pulse while busy is ignored.
module tb_lbc_ctrl;
  import lbc_pkg::*;

  logic       clk = 0, rst_n = 0, start = 0;
  op_e        op_in = OP_ENC, op;
  logic       load, nib_en, final_rnd, ks_step, ks_back, busy, done, in_prep;
  logic [1:0] nib;
  logic [4:0] kidx;
  int checks = 0, failures = 0;

  lbc_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input op_e o, input int exp_lat);
    int cyc = 0, nruns = 0, nsteps = 0, nprep = 0, nback = 0, nfinal = 0, nloads = 0;
    int bad_seq = 0;
    @(negedge clk);
    op_in = o; start = 1;
    #1;
    nloads += load;
    expect_eq("op at load", int'(op), int'(o));
    @(negedge clk);
    start = 0;
    while (!done && cyc < 1000) begin
      cyc++;
      if (cyc == 50) begin   // stray start while busy
        start = 1; op_in = (o == OP_ENC) ? OP_DEC : OP_ENC;
      end else begin
        start = 0;
      end
      #1;
      nloads += load;
      nsteps += ks_step;
      nprep  += in_prep;
      if (nib_en) begin
        int r = nruns / 4;
        if (nib != 2'(nruns % 4)) bad_seq++;
        if (kidx != ((o == OP_ENC) ? r : 31 - r)) bad_seq++;
        if (final_rnd != (r == 31)) bad_seq++;
        if (ks_back != (o == OP_DEC)) bad_seq++;
        nruns++;
      end else if (in_prep) begin
        if (nib != 2'(nprep - 1) % 4) bad_seq++;
      end
      @(negedge clk);
    end
    expect_eq("latency", cyc + 1, exp_lat);
    expect_eq("round cycles", nruns, 128);
    expect_eq("prepare cycles", nprep, (o == OP_DEC) ? 108 : 0);
    expect_eq("step cycles", nsteps, (o == OP_DEC) ? 216 : 108);
    expect_eq("loads", nloads, 1);
    expect_eq("sequence errors", bad_seq, 0);
    expect_eq("op held", int'(op), int'(o));
    @(negedge clk);
    expect_eq("done is one cycle", int'(done), 0);
    expect_eq("idle after done", int'(busy), 0);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(OP_ENC, 129);
    run(OP_DEC, 237);
    run(OP_ENC, 129);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
