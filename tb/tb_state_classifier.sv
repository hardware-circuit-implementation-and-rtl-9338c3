// tb_state_classifier: exhaustive self-checking test of the classifier.
// Every pair of per-station packet counts 0..31 is applied and the code is
// compared with I for no packet, U for exactly one and B for two or more.
module tb_state_classifier;
  timeunit 1ns; timeprecision 1ps;
  import csma_pkg::*;

  logic [1:0][ATT_W-1:0] attempts;
  chan_state_e           code;
  logic                  collision;
  int checks = 0, failures = 0;

  state_classifier #(.N_ST(2)) dut (.attempts(attempts), .code(code), .collision(collision));

  initial begin
    #100_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_code;
    for (int a = 0; a < 32; a++) begin
      for (int b = 0; b < 32; b++) begin
        attempts[0] = 5'(a);
        attempts[1] = 5'(b);
        #1;
        exp_code = (a + b == 0) ? 8'b0000_0001 : (a + b == 1) ? 8'b0000_0110 : 8'b0000_0111;
        checks++;
        if (code != exp_code || collision != (a + b >= 2)) begin
          failures++;
          $display("FAIL: %0d+%0d -> %02h (exp %02h) coll %0b", a, b, code, exp_code, collision);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
