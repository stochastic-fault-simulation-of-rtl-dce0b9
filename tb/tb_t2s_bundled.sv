// tb_t2s_bundled: self-checking test of the triplex-to-simplex interface
// for a 2-phase bundled-data channel (8-bit data, CMAJ delay 10 units).
//
// A triplex sender toggles its request copies (all three, or only two with
// the third stuck) with one corrupted data copy. Checks: the simplex
// request follows via the CMAJ (at once after the third copy, after the
// CMAJ delay with two); the simplex data is the bitwise majority of the
// three copies, captured when the request toggles and held while the
// sender changes the data until the simplex acknowledge toggles; the
// acknowledge appears on all three copies. A watchdog ends the test.
module tb_t2s_bundled;
  localparam int D = 10;
  int checks = 0, failures = 0;
  logic rst, req, ack;
  logic [7:0] data;
  logic [2:0] req_t, ack_t;
  logic [2:0][7:0] data_t;

  t2s_bundled #(.WIDTH(8), .CMAJ_DELAY(D)) dut (.rst, .req_t, .ack_t, .data_t, .req, .ack, .data);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic lvl;
    logic [7:0] w;
    int bad;
    rst = 1; req_t = '0; data_t = '0; ack = 0;
    #5 rst = 0; #5;
    lvl = 0;
    for (int n = 0; n < 60; n++) begin
      w = 8'($urandom);
      bad = $urandom_range(2, 0);
      for (int k = 0; k < 3; k++) data_t[k] = (k == bad) ? ~w : w;   // one corrupt copy
      #1;
      if (n % 2 == 0) begin
        for (int k = 0; k < 3; k++) begin
          req_t[k] = !lvl;
          #0.5;
          check(req === ((k == 2) ? !lvl : lvl), $sformatf("req after copy %0d", k));
          #0.5;
        end
      end else begin
        for (int k = 0; k < 3; k++) if (k != bad) req_t[k] = !lvl;
        #(D - 0.5);
        check(req === lvl, "two request copies: wait for the CMAJ delay");
        #1;
        check(req === !lvl, "two request copies: request after the CMAJ delay");
        req_t[bad] = !lvl;
      end
      #1;
      check(data === w, $sformatf("data %h, expected voted %h", data, w));
      // sender changes the data before the acknowledge: output must hold
      data_t = {3{~w}};
      #1;
      check(data === w, "data must be held until the acknowledge");
      ack = !ack;
      #1;
      check(ack_t === {3{ack}}, "acknowledge fan-out");
      check(data === ~w, "latch passes again after the acknowledge");
      lvl = !lvl;
      #(D + 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
