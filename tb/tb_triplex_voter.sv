// tb_triplex_voter: self-checking test of the triplex restoring stage with
// both voter types. Random 4-bit triplets are applied in which at most one
// copy of each bit is corrupted; every output copy must equal the true value.
// Changes are made one copy at a time so that the HFMV voters see legal
// sequences. A final check shows a double error is not corrected.
module tb_triplex_voter;
  import tmr_pkg::*;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0][3:0] x;
  logic [2:0][3:0] ym, yh;

  triplex_voter #(.WIDTH(4), .VOTER(VOTER_MAJ))  dutm (.rst(rst), .x(x), .y(ym));
  triplex_voter #(.WIDTH(4), .VOTER(VOTER_HFMV)) duth (.rst(rst), .x(x), .y(yh));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] val, bad;
    int victim;
    rst = 1; x = '0; #1 rst = 0; #1;
    repeat (500) begin
      val = 4'($urandom);
      victim = $urandom_range(2, 0);
      bad = 4'($urandom);
      // healthy copies move first, then the faulty copy
      for (int k = 0; k < 3; k++) if (k != victim) begin x[k] = val; #1; end
      x[victim] = val ^ bad; #1;
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (ym[k] !== val) begin failures++; $display("FAIL maj copy %0d %h vs %h", k, ym[k], val); end
        if (yh[k] !== val) begin failures++; $display("FAIL hfmv copy %0d %h vs %h", k, yh[k], val); end
      end
      // repair the faulty copy (all agree again)
      x[victim] = val; #1;
    end
    x[0] = 4'h0; x[1] = 4'hF; x[2] = 4'hF; #1;
    x[0] = 4'h0; x[1] = 4'h0; x[2] = 4'hF; #1;
    checks++;
    if (ym[0] !== 4'h0) begin failures++; $display("FAIL two zero copies must win"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
