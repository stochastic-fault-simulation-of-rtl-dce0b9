// tb_s2t_bundled: self-checking test of the simplex-to-triplex interface
// for a 2-phase bundled-data channel (8-bit data, CMAJ delay 10 units).
//
// Checks that the simplex request and data appear on all three copies, and
// that the acknowledge triplet is merged by the CMAJ: when all three copies
// toggle the simplex acknowledge follows the last one at once; when only two
// copies toggle (the third stuck or very late) it follows after the CMAJ
// delay; a single toggling copy never moves it. Successive events are
// spaced by more than the CMAJ delay, as the CMAJ requires. Checks are made 0.5 units
// around the expected switching times. A watchdog ends the test if it hangs.
module tb_s2t_bundled;
  localparam int D = 10;
  int checks = 0, failures = 0;
  logic rst, req, ack;
  logic [7:0] data;
  logic [2:0] req_t, ack_t;
  logic [2:0][7:0] data_t;

  s2t_bundled #(.WIDTH(8), .CMAJ_DELAY(D)) dut (.rst, .req, .ack, .data, .req_t, .ack_t, .data_t);

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
    rst = 1; req = 0; data = '0; ack_t = '0;
    #5 rst = 0; #5;
    lvl = 0;
    for (int n = 0; n < 60; n++) begin
      int mode;
      int late;
      mode = n % 3;             // 0: all copies, 1: one stuck, 2: only one moves
      late = n % 3 + (n / 3) % 3;   // which copy misbehaves
      late = late % 3;
      data = 8'($urandom); req = !req;
      #1;
      check(req_t === {3{req}} && data_t === {3{data}}, "request/data fan-out");
      if (mode == 0) begin
        // copies toggle 1 unit apart; ack follows the third copy immediately
        for (int k = 0; k < 3; k++) begin
          ack_t[(late + k) % 3] = !lvl;
          #0.5;
          check(ack === ((k == 2) ? !lvl : lvl), $sformatf("all copies, after copy %0d ack=%b", k, ack));
          #0.5;
        end
        lvl = !lvl;
      end else if (mode == 1) begin
        ack_t[(late + 1) % 3] = !lvl; ack_t[(late + 2) % 3] = !lvl;
        #(D - 0.5);
        check(ack === lvl, "two copies: ack must wait for the CMAJ delay");
        #1;
        check(ack === !lvl, "two copies: ack after the CMAJ delay");
        ack_t[late] = !lvl;   // the late copy catches up
        #1;
        lvl = !lvl;
      end else begin
        ack_t[late] = !lvl;
        #(2 * D);
        check(ack === lvl, "a single copy must not move the acknowledge");
        ack_t[late] = lvl;
        #(2 * D);
        check(ack === lvl, "acknowledge steady after the single copy returns");
      end
      #(D + 2);   // let the CMAJ delayed majority settle
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
