// tb_c_element: self-checking test of the Muller C-element, 2- and 3-input.
// Random input sequences are applied; a reference state (set when all inputs
// are 1, cleared when all are 0, held otherwise) is kept independently and
// compared after every step. Reset behaviour is checked too.
module tb_c_element;
  int checks = 0, failures = 0;
  logic rst;
  logic [1:0] a2;
  logic [2:0] a3;
  logic c2, c3;
  logic ref2, ref3;

  c_element #(.N(2)) dut2 (.rst(rst), .a(a2), .c(c2));
  c_element #(.N(3)) dut3 (.rst(rst), .a(a3), .c(c3));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
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
    rst = 1; a2 = 2'b11; a3 = 3'b111;
    #1 check(c2 == 0 && c3 == 0, "reset clears output");
    rst = 0; a2 = 2'b01; a3 = 3'b011;
    #1 check(c2 == 0 && c3 == 0, "hold 0 with mixed inputs after reset");
    ref2 = 0; ref3 = 0;
    repeat (2000) begin
      a2 = 2'($urandom);
      a3 = 3'($urandom);
      if (a2 == 2'b11) ref2 = 1; else if (a2 == 2'b00) ref2 = 0;
      if (a3 == 3'b111) ref3 = 1; else if (a3 == 3'b000) ref3 = 0;
      #1;
      check(c2 == ref2, $sformatf("2-input a=%b c=%b ref=%b", a2, c2, ref2));
      check(c3 == ref3, $sformatf("3-input a=%b c=%b ref=%b", a3, c3, ref3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
