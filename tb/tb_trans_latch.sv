`timescale 1ps/1ps
// tb_trans_latch: random data and enable patterns on the 32-bit latch;
// while en is high the output must equal the input, and after en falls it
// must keep the last value seen while open, whatever the input does.
module tb_trans_latch;
  localparam int W = 32;
  logic en;
  logic [W-1:0] d, q, held;
  int checks = 0, failures = 0;

  trans_latch #(.W(W)) dut (.en(en), .d(d), .q(q));

  initial begin
    en = 1; d = '0; held = '0;
    #5;
    for (int i = 0; i < 300; i++) begin
      if ($urandom_range(0, 3) == 0) en = ~en;
      d = $urandom;
      #5;
      if (en) held = d;
      checks++;
      if (q !== held) begin
        failures++;
        $display("FAIL en=%b d=%h q=%h exp %h", en, d, q, held);
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
