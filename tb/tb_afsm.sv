`timescale 1ps/1ps
// tb_afsm: the asynchronous FSM between stand-ins for everything around
// it: an incoming-FIFO producer (four-phase, bundled data), an outgoing
// FIFO consumer, an exclusive arbiter that grants a request after a short
// delay, and a synchronous side that consumes received words (flips
// rx_rtog) and posts words to send (flips tx_wtog) only while no grant is
// out, as the paused clock guarantees. Checks: received words arrive in
// order in rx_data; rx_ack and tx_req change only under their grant; a
// new word is not acknowledged while the holding register is full; every
// posted word causes exactly one transmit handshake and is then marked
// sent.
module tb_afsm;
  localparam int W = 32, N = 150;
  logic rst_n, rx_req, rx_ack, tx_req, tx_ack;
  logic req_rx, gnt_rx, req_tx, gnt_tx;
  logic [W-1:0] rx_fifo_data, rx_data;
  logic rx_wtog, rx_rtog, tx_wtog, tx_rtog;
  int checks = 0, failures = 0;
  bit run = 0;  // set once reset has been released
  int got = 0, posted = 0, tx_hs = 0, full_waits = 0;

  afsm #(.W(W)) dut (.*);

  function automatic logic [W-1:0] word(int n);
    return 32'hCAFE_0000 + n * 32'h0001_0003;
  endfunction
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // exclusive arbiter stand-in
  always @(req_rx or req_tx or gnt_rx or gnt_tx) begin
    #2;
    if (!req_rx) gnt_rx = 0;
    if (!req_tx) gnt_tx = 0;
    if (req_rx && !gnt_tx && !gnt_rx) gnt_rx = 1;
    else if (req_tx && !gnt_rx && !gnt_tx) gnt_tx = 1;
  end

  // handshake outputs move only under their grant
  always @(rx_ack) if (run) chk(gnt_rx, "rx_ack changes under gnt_rx");
  always @(tx_req) if (run) chk(gnt_tx, "tx_req changes under gnt_tx");
  always @(posedge tx_req) tx_hs++;

  initial begin
    rst_n = 1; rx_req = 0; tx_ack = 0; gnt_rx = 0; gnt_tx = 0;
    rx_rtog = 0; tx_wtog = 0; rx_fifo_data = '0;
    #1 rst_n = 0;
    #20 rst_n = 1;
    run = 1;
    fork
      // incoming FIFO producer
      for (int i = 0; i < N; i++) begin
        rx_fifo_data = word(i);
        #($urandom_range(1, 10)) rx_req = 1;
        #50;
        if (!rx_ack && rx_wtog != rx_rtog) full_waits++;
        wait (rx_ack);
        #($urandom_range(1, 10)) rx_req = 0; rx_fifo_data = $urandom;
        wait (!rx_ack);
      end
      // synchronous side, receive: consume when full and no grant out
      while (got < N) begin
        #($urandom_range(20, 120));
        if (rx_wtog != rx_rtog && !gnt_rx && !gnt_tx) begin
          chk(rx_data == word(got), "received word");
          got++;
          rx_rtog = ~rx_rtog;
        end
      end
      // synchronous side, transmit: post when empty and no grant out
      while (posted < N) begin
        #($urandom_range(5, 60));
        if (tx_wtog == tx_rtog && !gnt_rx && !gnt_tx) begin
          chk(tx_hs == posted, "one handshake per posted word");
          tx_wtog = ~tx_wtog;
          posted++;
        end
      end
      // outgoing FIFO consumer
      forever begin
        wait (tx_req);
        #($urandom_range(1, 30)) tx_ack = 1;
        wait (!tx_req);
        #($urandom_range(1, 10)) tx_ack = 0;
      end
    join_any
    wait (got == N && posted == N && tx_wtog == tx_rtog);
    #200;
    chk(tx_hs == N, "all words handed to the outgoing FIFO");
    chk(full_waits > 0, "incoming word held while register full");
    chk(!req_rx && !req_tx && !rx_ack && !tx_req, "idle at the end");
    $display("full waits %0d, tx handshakes %0d", full_waits, tx_hs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("got %0d posted %0d", got, posted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
