`timescale 1ps/1ps
// tb_grant_hold: checks that the output rises with the input at once and
// falls HOLD_PS after the input falls, and that a short gap in the input
// (shorter than HOLD_PS) does not reach the output.
module tb_grant_hold;
  localparam int HOLD = 200;
  logic req_in, req_out;
  int checks = 0, failures = 0;

  grant_hold #(.HOLD_PS(HOLD)) dut (.req_in(req_in), .req_out(req_out));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    req_in = 0;
    #1000 chk(!req_out, "idle low");
    req_in = 1; #1 chk(req_out, "rises at once");
    #300 req_in = 0;
    #(HOLD - 5) chk(req_out, "held after input falls");
    #10 chk(!req_out, "falls after HOLD_PS");
    #500 req_in = 1; #100 req_in = 0; #50 req_in = 1;
    #(HOLD) chk(req_out, "gap shorter than hold is covered");
    req_in = 0;
    #(HOLD + 5) chk(!req_out, "final release");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
