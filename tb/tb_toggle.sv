`timescale 1ps/1ps
// tb_toggle: after a clear, applies a series of input transitions and
// checks that transition n (counting from 1) changes out_dot when n is odd
// and out_blank when n is even, the other output staying put; a clear in
// the middle restarts the sequence.
module tb_toggle;
  logic in, cdn, out_dot, out_blank;
  int n;
  logic dot_ref, blank_ref;
  int checks = 0, failures = 0;

  toggle dut (.in(in), .cdn(cdn), .out_dot(out_dot), .out_blank(out_blank));

  task automatic chk();
    checks++;
    if (out_dot !== dot_ref || out_blank !== blank_ref) begin
      failures++;
      $display("FAIL n=%0d dot=%b blank=%b exp %b %b", n, out_dot, out_blank, dot_ref, blank_ref);
    end
  endtask

  initial begin
    in = 0; cdn = 0; n = 0; dot_ref = 0; blank_ref = 0;
    #10 chk();
    cdn = 1;
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 37; i++) begin
        in = ~in; n++;
        #10;
        if (n % 2 == 1) dot_ref = ~dot_ref; else blank_ref = ~blank_ref;
        chk();
      end
      // clear with the input low, then start again
      in = 0; #10;
      if (n % 2 == 1) blank_ref = ~blank_ref;
      cdn = 0; #10; dot_ref = 0; blank_ref = 0; chk();
      cdn = 1; n = 0; #10;
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
