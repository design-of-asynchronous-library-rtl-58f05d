`timescale 1ps/1ps
// tb_muller_c: drives random input sequences into the C-element and
// compares its output after every change with a reference: the output is
// 0 while cdn is low, takes the common value when a and b agree, and
// otherwise keeps its previous value.
module tb_muller_c;
  logic a, b, cdn, q;
  logic q_ref;
  int checks = 0, failures = 0;

  muller_c dut (.a(a), .b(b), .cdn(cdn), .q(q));

  initial begin
    a = 0; b = 0; cdn = 0; q_ref = 0;
    #10;
    checks++; if (q !== 1'b0) failures++;
    cdn = 1;
    for (int i = 0; i < 400; i++) begin
      int r;
      r = $urandom_range(0, 19);
      if (r == 0) cdn = 0;
      else begin
        cdn = 1;
        if (r < 10) a = ~a; else b = ~b;
      end
      #10;
      if (!cdn) q_ref = 0;
      else if (a && b) q_ref = 1;
      else if (!a && !b) q_ref = 0;
      checks++;
      if (q !== q_ref) begin
        failures++;
        $display("FAIL a=%b b=%b cdn=%b q=%b exp %b", a, b, cdn, q, q_ref);
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
