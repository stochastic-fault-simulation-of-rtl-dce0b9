// tb_hfmv: self-checking test of the hazard-free majority voter.
// Directed cases: a single stuck-at-0 input (output rises with the second
// rising input, falls only when all inputs are low again); a transient on a
// majority input while the inputs disagree is masked; two opposing stuck
// inputs lock the output. Then random input sequences are compared with a
// reference that applies the rule step by step: when the inputs are
// unanimous the output follows them and the hold is released; otherwise, if
// not holding and the majority differs from the output, the output takes
// the majority and the hold is set.
module tb_hfmv;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] a;
  logic m;
  logic ref_v, ref_h;

  hfmv dut (.rst(rst), .a(a), .m(m));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (a=%b m=%b)", msg, a, m);
    end
  endtask

  task automatic apply(input logic [2:0] v);
    logic maj;
    a = v;
    maj = (v[0] & v[1]) | (v[1] & v[2]) | (v[2] & v[0]);
    if (v == 3'b000 || v == 3'b111) begin
      ref_v = v[0]; ref_h = 0;
    end else if (!ref_h && maj != ref_v) begin
      ref_v = maj; ref_h = 1;
    end
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; a = 3'b000; ref_v = 0; ref_h = 0;
    #1 rst = 0; #1;
    check(m == 0, "reset output 0");
    // stuck-at-0 on input 2 (bit 2)
    apply(3'b001); check(m == 0, "one rising input does not switch");
    apply(3'b011); check(m == 1, "second rising input switches output");
    apply(3'b010); check(m == 1, "output held while inputs disagree (s-a-0)");
    apply(3'b000); check(m == 0, "output falls when all inputs low");
    // transient on a majority input
    apply(3'b110); check(m == 1, "rise on two inputs");
    apply(3'b100); check(m == 1, "transient on majority input masked");
    apply(3'b110); check(m == 1, "transient over");
    apply(3'b111); check(m == 1, "unanimous 1");
    apply(3'b101); check(m == 1, "first falling input");
    apply(3'b100); check(m == 0, "second falling input");
    apply(3'b101); check(m == 0, "transient while falling masked");
    apply(3'b000); check(m == 0, "unanimous 0");
    // opposing stuck-at inputs: bit0 s-a-1, bit1 s-a-0, bit2 toggles
    apply(3'b001); apply(3'b101); check(m == 1, "opposing stuck: rise");
    apply(3'b001); check(m == 1, "opposing stuck: locked at 1");
    apply(3'b101); apply(3'b001); check(m == 1, "opposing stuck: still locked");
    // random
    rst = 1; #1 rst = 0; a = 3'b000; ref_v = 0; ref_h = 0; #1;
    repeat (3000) begin
      apply(3'($urandom));
      check(m == ref_v, $sformatf("random: expected %b", ref_v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
