`timescale 1ps/1ps
// tb_sync_port: clocks the synchronous-side registers with a 1 ns clock
// and plays the asynchronous FSM between clock edges (while the clock is
// low). Checks: rx_valid rises when a word is posted and falls one edge
// after a cycle with rx_ready; a cycle with
// tx_valid and tx_ready loads tx_data and flips tx_wtog, after which
// tx_ready is low until the FSM marks the word sent; tx_valid while busy
// is ignored.
module tb_sync_port;
  localparam int W = 32, N = 100;
  logic sysclk = 0, rst_n;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [W-1:0] tx_din, tx_data;
  logic rx_wtog, rx_rtog, tx_wtog, tx_rtog;
  int checks = 0, failures = 0, rcv = 0, snt = 0, busy_ignored = 0;

  sync_port #(.W(W)) dut (.*);

  always #500 sysclk = ~sysclk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  initial begin
    rst_n = 1; rx_ready = 0; tx_valid = 0; tx_din = '0;
    rx_wtog = 0; tx_rtog = 0;
    #1 rst_n = 0;
    #2000 rst_n = 1;
    @(negedge sysclk);
    chk(!rx_valid && tx_ready, "reset state");
    for (int i = 0; i < N; i++) begin
      // FSM posts a received word while the clock is low
      rx_wtog = ~rx_wtog;
      #1 chk(rx_valid, "rx_valid with word");
      rx_ready = 1'($urandom_range(0, 1));
      @(posedge sysclk); #1;
      if (rx_ready) begin
        chk(!rx_valid, "consumed after one ready edge");
        rcv++;
      end else begin
        chk(rx_valid, "kept while not ready");
        rx_ready = 1;
        @(posedge sysclk); #1;
        chk(!rx_valid, "consumed after ready");
        rcv++;
      end
      rx_ready = 0;
      // synchronous logic sends a word
      @(negedge sysclk);
      tx_din = $urandom; tx_valid = 1;
      @(posedge sysclk); #1;
      chk(tx_data == tx_din && tx_wtog != tx_rtog && !tx_ready, "tx word loaded");
      begin
        logic [W-1:0] keep;
        keep = tx_data;
        tx_din = ~tx_din;
        @(posedge sysclk); #1;
        chk(tx_data == keep, "tx_valid ignored while busy");
        busy_ignored++;
      end
      tx_valid = 0;
      @(negedge sysclk);
      tx_rtog = tx_wtog;  // FSM marks the word sent
      #1 chk(tx_ready, "tx_ready after the FSM took the word");
      snt++;
    end
    $display("received %0d sent %0d", rcv, snt);
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
