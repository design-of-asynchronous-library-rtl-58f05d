`timescale 1ps/1ps
// tb_ring_oscillator: closes the 21-stage ring on itself and checks that
// it runs with a period of 2*21*STAGE_PS (462 ps at 11 ps per stage) and a
// 50 % duty cycle, that the isolation buffer output is the ring output one
// stage later, and that the ring stops (output held high) when enable or
// select is low and starts again when both are high. A second ring of 15
// stages checks that removing stages raises the frequency as expected
// (period 2*15*STAGE_PS).
module tb_ring_oscillator;
  localparam int STAGES = 21, SPS = 11, PER = 2 * STAGES * SPS;
  logic select, enable, ring, buf_out;
  int checks = 0, failures = 0;
  longint t_rise [$];
  longint t_fall;
  int edges_while_off = 0;
  bit off = 1;

  ring_oscillator #(.STAGES(STAGES), .STAGE_PS(SPS)) dut (
    .select(select), .enable(enable), .ring_in(ring), .ring_out(ring), .buf_out(buf_out));

  // shorter ring: fewer stages, higher frequency
  localparam int STAGES2 = 15, PER2 = 2 * STAGES2 * SPS;
  logic ring2, buf2;
  longint r2_last = -1;
  int r2_ok = 0, r2_bad = 0;
  ring_oscillator #(.STAGES(STAGES2), .STAGE_PS(SPS)) dut2 (
    .select(1'b1), .enable(enable), .ring_in(ring2), .ring_out(ring2), .buf_out(buf2));
  always @(posedge ring2) begin
    if (enable && r2_last >= 0 && $time - r2_last == PER2) r2_ok++;
    else if (enable && r2_last >= 0 && $time > 2000) r2_bad++;
    r2_last = enable ? $time : -1;  // restart the measurement after a stop
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  always @(posedge ring) if (!off) t_rise.push_back($time);
  always @(negedge ring) t_fall = $time;
  always @(ring) if (off && $time > 1000) edges_while_off++;
  always @(buf_out) if ($time > 1000) chk(ring == buf_out, "buf_out follows ring one stage later");

  initial begin
    select = 1; enable = 0;
    #1000;
    chk(ring == 1'b1, "stopped ring output high");
    for (int k = 0; k < 2; k++) begin
      off = 0;
      if (k == 0) enable = 1; else select = 1;
      #(20 * PER);
      off = 1;
      if (k == 0) enable = 0; else select = 0;
      chk(t_rise.size() >= 15, "ring oscillates");
      for (int i = 1; i < t_rise.size(); i++) chk(t_rise[i] - t_rise[i-1] == PER, "period");
      chk(t_rise[t_rise.size()-1] - t_fall == PER / 2 || t_fall - t_rise[t_rise.size()-1] == PER / 2, "duty");
      t_rise.delete();
      #(2 * PER);
      edges_while_off = 0;
      if (k == 0) select = 0;
      enable = (k == 0) ? 1'b1 : 1'b1;
      #(5 * PER);
      chk(edges_while_off == 0, "stopped while enable or select low");
      chk(ring == 1'b1, "held high when stopped");
      if (k == 0) enable = 1;
    end
    chk(r2_ok > 10 && r2_bad == 0, "15-stage ring period");
    $display("15-stage ring: %0d nominal periods", r2_ok);
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
