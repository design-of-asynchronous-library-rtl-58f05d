`timescale 1ps/1ps
// tb_arbiter: two random four-phase channels request through the arbiter;
// the testbench plays the clock mutex, answering creq on cgnt after a
// short delay. Checks: a grant goes only to a channel that requests, never
// to both, only while cgnt is high; creq is high whenever a channel holds
// the channel mutex; every request is granted. Simultaneous requests must
// occur and be served one after the other.
module tb_arbiter;
  logic req_rx, req_tx, gnt_rx, gnt_tx, creq, cgnt;
  int checks = 0, failures = 0;
  int done_rx = 0, done_tx = 0, both = 0;
  localparam int N = 200;

  arbiter dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // clock mutex stand-in
  always @(creq) begin
    #3 cgnt = creq;
  end

  always @(gnt_rx or gnt_tx or req_rx or req_tx or cgnt) begin
    #0;
    chk(!(gnt_rx && gnt_tx), "exclusive grants");
    chk(!gnt_rx || (req_rx && cgnt), "rx grant only when asked and clock paused");
    chk(!gnt_tx || (req_tx && cgnt), "tx grant only when asked and clock paused");
  end
  always @(posedge req_rx or posedge req_tx) begin
    #0 if (req_rx && req_tx) both++;
  end

  initial begin
    req_rx = 0; req_tx = 0; cgnt = 0;
    #20;
    fork
      for (int i = 0; i < N; i++) begin
        #($urandom_range(0, 40));
        req_rx = 1;
        wait (gnt_rx);
        #($urandom_range(1, 20));
        req_rx = 0;
        wait (!gnt_rx);
        done_rx++;
      end
      for (int i = 0; i < N; i++) begin
        #($urandom_range(0, 40));
        req_tx = 1;
        wait (gnt_tx);
        #($urandom_range(1, 20));
        req_tx = 0;
        wait (!gnt_tx);
        done_tx++;
      end
    join
    #20;
    chk(done_rx == N && done_tx == N, "all requests served");
    chk(both > 0, "simultaneous requests happened");
    chk(!creq && !cgnt, "idle at the end");
    $display("both requesting %0d times", both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
