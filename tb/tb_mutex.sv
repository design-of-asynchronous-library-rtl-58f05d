`timescale 1ps/1ps
// tb_mutex: directed and random request patterns on the mutex. The
// reference keeps an owner (none, 1 or 2): the owner keeps its grant until
// its request falls; with no owner a pending request is granted, r1 first
// on an exact tie. Checks after every change: the grants match the owner,
// and never both are high.
module tb_mutex;
  logic r1, r2, g1, g2;
  int owner;
  int checks = 0, failures = 0;
  int handovers = 0;

  mutex dut (.r1(r1), .r2(r2), .g1(g1), .g2(g2));

  task automatic step();
    #10;
    if (owner == 1 && !r1) owner = 0;
    if (owner == 2 && !r2) owner = 0;
    if (owner == 0) begin
      if (r1) owner = 1;
      else if (r2) owner = 2;
    end
    checks++;
    if (g1 !== (owner == 1) || g2 !== (owner == 2) || (g1 && g2)) begin
      failures++;
      $display("FAIL r1=%b r2=%b g1=%b g2=%b owner=%0d", r1, r2, g1, g2, owner);
    end
  endtask

  initial begin
    r1 = 0; r2 = 0; owner = 0;
    step();
    // r1 holds, r2 waits, then gets the grant when r1 drops
    r1 = 1; step();
    r2 = 1; step();
    r1 = 0; step();
    if (g2) handovers++;
    r2 = 0; step();
    // exact tie
    r1 = 1; r2 = 1; step();
    r1 = 0; step();
    r2 = 0; step();
    for (int i = 0; i < 500; i++) begin
      if ($urandom_range(0, 1) == 0) r1 = ~r1; else r2 = ~r2;
      if ($urandom_range(0, 9) == 0) begin r1 = ~r1; r2 = ~r2; end
      step();
    end
    checks++;
    if (handovers != 1) failures++;
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
