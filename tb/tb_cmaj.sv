// tb_cmaj: self-checking test of the CMAJ element (DELAY = 10).
// Rising and falling cycles of three kinds are timed:
//   all three inputs switch within the delay -> output follows the third
//     input at once (C-element behaviour);
//   only two switch -> output follows DELAY after the second (majority
//     behaviour after the time limit);
//   only one switches -> output never moves.
module tb_cmaj;
  localparam int unsigned D = 10;
  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] a;
  logic c;
  int n_fast = 0, n_slow = 0;

  cmaj #(.DELAY(D)) dut (.rst(rst), .a(a), .c(c));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s (a=%b c=%b)", $time, msg, a, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lvl;
    int i0, i1, i2;
    rst = 1; a = 3'b000;
    #2 rst = 0;
    #20;
    lvl = 1;
    repeat (100) begin
      int kind;
      int perm;
      kind = $urandom_range(2, 0);
      perm = $urandom_range(2, 0);
      i0 = perm; i1 = (perm + 1) % 3; i2 = (perm + 2) % 3;
      a[i0] = lvl; #2;
      check(c == !lvl, "one input must not switch output");
      if (kind == 2) begin
        #(3 * D);
        check(c == !lvl, "single input never switches output");
        a[i0] = !lvl; #(3 * D);                    // withdraw
        continue;
      end
      a[i1] = lvl; #2;
      check(c == !lvl, "two inputs must not switch output before the delay");
      if (kind == 0) begin
        a[i2] = lvl; #0.5;
        check(c == lvl, "third input switches output at once");
        n_fast++;
      end else begin
        #(D - 3);
        check(c == !lvl, "still waiting just before the time limit");
        #2;
        check(c == lvl, "two inputs switch output after the time limit");
        a[i2] = lvl;                                // late third input
        n_slow++;
      end
      #(2 * D);
      check(c == lvl, "output stable after cycle");
      lvl = !lvl;
    end
    check(n_fast > 0 && n_slow > 0, "both CMAJ paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
