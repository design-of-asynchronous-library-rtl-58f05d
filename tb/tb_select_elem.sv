`timescale 1ps/1ps
// tb_select_elem: sets sel at random, then makes one input transition, and
// checks that exactly the selected output changed. Changing sel alone must
// change no output. A clear returns both outputs to 0.
module tb_select_elem;
  logic in, sel, cdn, out_t, out_f;
  logic t_ref, f_ref;
  int checks = 0, failures = 0;

  select_elem dut (.in(in), .sel(sel), .cdn(cdn), .out_t(out_t), .out_f(out_f));

  task automatic chk(input string what);
    checks++;
    if (out_t !== t_ref || out_f !== f_ref) begin
      failures++;
      $display("FAIL %s: t=%b f=%b exp %b %b", what, out_t, out_f, t_ref, f_ref);
    end
  endtask

  initial begin
    in = 0; sel = 0; cdn = 0; t_ref = 0; f_ref = 0;
    #10 chk("clear");
    cdn = 1; #10;
    for (int i = 0; i < 300; i++) begin
      sel = 1'($urandom_range(0, 1));
      #10 chk("sel change");
      in = ~in;
      #10;
      if (sel) t_ref = ~t_ref; else f_ref = ~f_ref;
      chk("transition");
    end
    in = 0; cdn = 0; #10; t_ref = 0; f_ref = 0; chk("clear again");
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
