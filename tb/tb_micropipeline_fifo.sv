`timescale 1ps/1ps
// tb_micropipeline_fifo: a four-phase producer and consumer with random
// delays around the 32-bit, 4-stage FIFO. The producer sets the word
// before raising req_in and holds it until ack_out rises (bundled data);
// the consumer samples data_out while req_out is high. Checks: every word
// arrives once and in order; data_out is stable while req_out is high;
// with the consumer stalled the FIFO accepts exactly STAGES/2 words and
// then holds ack_out low (full); a clear empties it.
module tb_micropipeline_fifo;
  localparam int W = 32, STAGES = 4, N = 300;
  logic clear, req_in, ack_out, req_out, ack_in;
  logic [W-1:0] data_in, data_out;
  int checks = 0, failures = 0;
  int sent = 0, got = 0;
  bit stall_out = 0;

  micropipeline_fifo #(.W(W), .STAGES(STAGES)) dut (.*);

  function automatic logic [W-1:0] word(int n);
    return 32'h1234_5678 ^ (n * 32'h0101_0F0F) ^ (n << 20);
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // producer
  task automatic put(input logic [W-1:0] w);
    data_in = w;
    #($urandom_range(1, 5));
    req_in = 1;
    wait (ack_out);
    #($urandom_range(1, 30));
    data_in = $urandom;  // data may change once acknowledged
    req_in = 0;
    wait (!ack_out);
  endtask

  // consumer
  initial begin
    ack_in = 0;
    #60;  // after the clear
    forever begin
      wait (req_out && !stall_out);
      #($urandom_range(1, 30));
      chk(data_out == word(got), "order/data");
      got++;
      ack_in = 1;
      wait (!req_out);
      #($urandom_range(1, 20));
      ack_in = 0;
    end
  end

  logic [W-1:0] seen;
  always @(posedge req_out) if ($time > 60) begin
    seen = data_out;
    @(negedge req_out or data_out);
    if (req_out) chk(0, "data_out changed while req_out high");
  end

  initial begin
    int accepted;
    clear = 1; req_in = 0; data_in = '0;
    #50 clear = 0;
    #10;
    for (int i = 0; i < N; i++) begin put(word(i)); sent++; end
    wait (got == N);
    #100;
    chk(got == N && !req_out, "all words delivered");
    // full: consumer stalled
    stall_out = 1;
    accepted = 0;
    for (int i = 0; i < STAGES; i++) begin
      data_in = word(N + i);
      #5 req_in = 1;
      #200;
      if (!ack_out) break;
      accepted++;
      req_in = 0;
      wait (!ack_out);
      #5;
    end
    chk(accepted == STAGES / 2, "capacity when output stalled");
    chk(req_in && !ack_out, "full: request not acknowledged");
    req_in = 0;
    #10 clear = 1;
    #10 chk(!req_out && !ack_out, "clear empties the FIFO");
    $display("accepted when stalled: %0d", accepted);
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
