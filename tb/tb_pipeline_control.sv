`timescale 1ps/1ps
// tb_pipeline_control: one control stage between a random previous stage
// (req_in) and a random next stage (ack_in). The stage must behave as
// c = C(req_in, ~ack_in): req_out and ack_out equal c, latch_en = ~c, and
// clear forces c low.
module tb_pipeline_control;
  logic clear, req_in, ack_out, req_out, ack_in, latch_en;
  logic c_ref;
  int checks = 0, failures = 0;

  pipeline_control dut (.clear(clear), .req_in(req_in), .ack_out(ack_out),
                        .req_out(req_out), .ack_in(ack_in), .latch_en(latch_en));

  initial begin
    clear = 1; req_in = 0; ack_in = 0; c_ref = 0;
    #10;
    clear = 0;
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 20);
      clear = (r == 0);
      if (r > 0 && r <= 10) req_in = ~req_in;
      else if (r > 10) ack_in = ~ack_in;
      #10;
      if (clear) c_ref = 0;
      else if (req_in && !ack_in) c_ref = 1;
      else if (!req_in && ack_in) c_ref = 0;
      checks++;
      if (req_out !== c_ref || ack_out !== c_ref || latch_en !== ~c_ref) begin
        failures++;
        $display("FAIL req_in=%b ack_in=%b c=%b exp %b", req_in, ack_in, req_out, c_ref);
      end
    end
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
