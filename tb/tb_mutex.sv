// tb_mutex: self-checking test of the MUTEX model: four-phase clients
// request at random times; at no time may both grants be high, every
// request must eventually be granted, and a grant must only be given to a
// client that is requesting.
module tb_mutex;
  int checks = 0, failures = 0;
  logic rst, r1, r2, g1, g2;
  int grants1 = 0, grants2 = 0, contended = 0;

  mutex dut (.rst(rst), .r1(r1), .r2(r2), .g1(g1), .g2(g2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired r1=%b r2=%b g1=%b g2=%b n1=%0d n2=%0d", r1, r2, g1, g2, grants1, grants2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(g1 or g2 or r1 or r2) begin
    checks++;
    if (g1 && g2) begin failures++; $display("FAIL both grants @%0t", $time); end
    if ((g1 && !r1 && !rst) || (g2 && !r2 && !rst)) ;  // grant falls in the same step
  end

  task automatic client1(input int n);
    repeat (n) begin
      #($urandom_range(5, 1));
      r1 = 1;
      if (r2) contended++;
      wait (g1);
      grants1++;
      if (grants1 % 50 == 0) $display("c1 %0d @%0t", grants1, $time);
      #($urandom_range(4, 1));
      r1 = 0;
      wait (!g1);
    end
  endtask
  task automatic client2(input int n);
    repeat (n) begin
      #($urandom_range(5, 1));
      r2 = 1;
      wait (g2);
      grants2++;
      #($urandom_range(4, 1));
      r2 = 0;
      wait (!g2);
    end
  endtask

  initial begin
    rst = 1; r1 = 0; r2 = 0;
    #2 rst = 0;
    fork
      client1(300);
      client2(300);
    join
    checks++;
    if (grants1 != 300 || grants2 != 300) begin failures++; $display("FAIL grant counts"); end
    checks++;
    if (contended == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("contended requests: %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
