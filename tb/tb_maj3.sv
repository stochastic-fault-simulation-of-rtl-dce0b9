// tb_maj3: self-checking test of the bitwise 2-of-3 majority gate. Random
// words are compared with a per-bit count of ones (at least two of three).
module tb_maj3;
  int checks = 0, failures = 0;
  logic [7:0] a, b, c, y;

  maj3 #(.WIDTH(8)) dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) begin
      logic [7:0] expect_y;
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      for (int i = 0; i < 8; i++) expect_y[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      #1;
      checks++;
      if (y !== expect_y) begin
        failures++;
        $display("FAIL: a=%h b=%h c=%h y=%h expected %h", a, b, c, y, expect_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
