// tb_capture_pass_latch: self-checking test of the capture-pass latch. The
// latch must follow d while cap == pas and keep the captured word while they
// differ, for both polarities of the two controls (2-phase operation).
module tb_capture_pass_latch;
  int checks = 0, failures = 0;
  logic cap, pas;
  logic [7:0] d, q, held;

  capture_pass_latch #(.WIDTH(8)) dut (.cap(cap), .pas(pas), .d(d), .q(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cap = 0; pas = 0; d = 8'h00; held = 8'h00;
    repeat (500) begin
      // transparent phase
      d = 8'($urandom); #1;
      checks++; if (q !== d) begin failures++; $display("FAIL transparent q=%h d=%h", q, d); end
      held = d;
      cap = ~cap; #1;                      // capture event
      repeat (3) begin
        d = 8'($urandom); #1;
        checks++; if (q !== held) begin failures++; $display("FAIL hold q=%h held=%h", q, held); end
      end
      pas = ~pas; #1;                      // pass event
      checks++; if (q !== d) begin failures++; $display("FAIL reopen q=%h d=%h", q, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
