// tb_delay_element: checks that every input transition appears on the output
// exactly DELAY time units later (JITTER = 0), and within DELAY..DELAY+JITTER
// for a jittered instance.
module tb_delay_element;
  int checks = 0, failures = 0;
  logic in;
  logic out0, out1;
  time  t_in;

  delay_element #(.DELAY(5), .JITTER(0)) dut0 (.in(in), .out(out0));
  delay_element #(.DELAY(5), .JITTER(3)) dut1 (.in(in), .out(out1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = 0;
    #20;
    repeat (100) begin
      in = ~in; t_in = $time;
      #4.5;
      checks++; if (out0 === in) begin failures++; $display("FAIL early output at +4.5"); end
      #1;
      checks++; if (out0 !== in) begin failures++; $display("FAIL no output at +5.5"); end
      #3;
      checks++; if (out1 !== in) begin failures++; $display("FAIL jittered output late"); end
      #($urandom_range(10, 2));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
