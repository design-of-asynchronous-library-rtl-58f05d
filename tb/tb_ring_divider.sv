`timescale 1ps/1ps
// tb_ring_divider: feeds a 100 ps clock into the 8-stage toggle counter
// and checks that the output period is 256 input periods with a 50 % duty
// cycle, and that reset holds the output low. Each toggle's first output
// transition is a rising one, so after reset the output rises on the very
// first rising input edge and then every 256 edges.
module tb_ring_divider;
  localparam int BITS = 8, PER = 100;
  logic in = 0, reset, out;
  int checks = 0, failures = 0;
  int n_in = 0, first_rise_at = -1, n_out = 0;
  longint t_r [$];
  longint t_f [$];

  ring_divider #(.BITS(BITS)) dut (.in(in), .reset(reset), .out(out));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always #(PER / 2) in = ~in;
  always @(posedge in) if (!reset) n_in++;
  always @(posedge out) if (!reset) begin
    if (first_rise_at < 0) first_rise_at = n_in;
    t_r.push_back($time);
  end
  always @(negedge out) if (!reset) t_f.push_back($time);

  initial begin
    reset = 1;
    #(3 * PER + 10);
    chk(out == 0, "held low in reset");
    #(2 * PER);
    chk(out == 0, "still low in reset");
    @(negedge in) reset = 0;
    #(4 * 256 * PER + 10);
    chk(first_rise_at == 1, "first rise on the first input edge");
    chk(t_r.size() >= 3, "output toggles");
    for (int i = 1; i < t_r.size(); i++) chk(t_r[i] - t_r[i-1] == 256 * PER, "output period");
    for (int i = 0; i < t_f.size(); i++) chk(t_f[i] - t_r[i] == 128 * PER, "duty cycle");
    reset = 1;
    #(PER);
    chk(out == 0, "reset clears");
    $display("first rise after %0d edges, %0d periods", first_rise_at, t_r.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
