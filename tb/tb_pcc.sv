`timescale 1ps/1ps
// tb_pcc: one pausible-clock port at its default sizes (32 bits, 21-stage
// ring of 11 ps stages, 200 ps handshake time). The testbench supplies an
// incoming FIFO output (four-phase producer with random gaps), an outgoing
// FIFO input (four-phase consumer that captures tx_fifo_data), and a
// synchronous module on the port's own sysclk that sends and receives
// numbered words with random valid and ready.
// Checks: words in both directions arrive once and in order; no sysclk
// period is shorter than 2*21*11 ps and no high phase shorter than half of
// it; unpaused periods are exactly nominal; the clock is stretched for
// handshakes (pauses counted, and each pause is at most one handshake time
// plus one period); and the acknowledge of every rising and falling
// request edge changes while sysclk is low, as in the clock-pausing trace.
module tb_pcc;
  localparam int W = 32, N = 300, PER = 2 * 21 * 11, HOLD = 200;
  logic rst_n, enable, sysclk;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [W-1:0] rx_dout, tx_din, rx_fifo_data, tx_fifo_data;
  logic rx_req, rx_ack, tx_req, tx_ack;
  int checks = 0, failures = 0;
  bit run = 0;
  int rcv = 0, snt = 0, fifo_got = 0;
  int pauses = 0, nominal = 0, short_per = 0, long_per = 0, short_high = 0;
  int ack_edges_low = 0, ack_edges_high = 0;
  longint last_rise = -1;

  pcc dut (.*);

  function automatic logic [W-1:0] in_word(int n);
    return 32'h0BAD_F00D ^ (n * 32'h0011_0101);
  endfunction
  function automatic logic [W-1:0] out_word(int n);
    return 32'h7000_0000 + n * 7;
  endfunction
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", msg, $time); end
  endtask

  // incoming FIFO output stand-in
  initial begin
    rx_req = 0; rx_fifo_data = '0;
    wait (run);
    for (int i = 0; i < N; i++) begin
      rx_fifo_data = in_word(i);
      #($urandom_range(1, 300)) rx_req = 1;
      wait (rx_ack);
      #($urandom_range(1, 100)) rx_req = 0; rx_fifo_data = $urandom;
      wait (!rx_ack);
    end
  end
  // outgoing FIFO input stand-in
  initial begin
    tx_ack = 0;
    wait (run);
    forever begin
      wait (tx_req);
      #($urandom_range(1, 200));
      chk(tx_fifo_data == out_word(fifo_got), "word out of the port");
      fifo_got++;
      tx_ack = 1;
      wait (!tx_req);
      #($urandom_range(1, 200)) tx_ack = 0;
    end
  end

  // synchronous module
  always @(posedge sysclk) if (run) begin
    if (rx_valid && rx_ready) begin
      chk(rx_dout == in_word(rcv), "word into the module");
      rcv++;
    end
    if (tx_valid && tx_ready) snt <= snt + 1;
  end
  always @(posedge sysclk) begin
    #1;
    tx_valid <= (snt + (tx_valid && tx_ready ? 1 : 0) < N) && ($urandom_range(0, 2) != 0);
    rx_ready <= ($urandom_range(0, 3) != 0);
  end
  assign tx_din = out_word(snt);

  // clock shape
  always @(posedge sysclk) if (run) begin
    if (last_rise >= 0) begin
      if ($time - last_rise < PER) short_per++;
      else if ($time - last_rise == PER) nominal++;
      else begin
        pauses++;
        if ($time - last_rise > PER + HOLD + PER) long_per++;
      end
    end
    last_rise = $time;
  end
  always @(negedge sysclk) if (run && last_rise >= 0 && $time - last_rise < PER / 2) short_high++;
  always @(rx_ack) if (run) begin
    if (sysclk) ack_edges_high++; else ack_edges_low++;
  end

  initial begin
    rst_n = 1; enable = 0; tx_valid = 0; rx_ready = 0;
    #1 rst_n = 0;
    #2000 rst_n = 1; run = 1;
    #100 enable = 1;
    wait (rcv == N && fifo_got == N);
    #2000;
    chk(snt == N && !rx_valid, "counts at the end");
    chk(short_per == 0, "no period shorter than nominal");
    chk(short_high == 0, "no high phase cut short");
    chk(long_per == 0, "pauses bounded by one handshake time");
    chk(nominal > 0, "nominal periods");
    chk(pauses > 0, "clock pauses happened");
    chk(ack_edges_high == 0 && ack_edges_low == 2 * N, "acknowledge edges only while sysclk low");
    $display("pauses %0d nominal %0d ack edges %0d", pauses, nominal, ack_edges_low);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000;
    failures++;
    $display("rcv %0d snt %0d fifo_got %0d", rcv, snt, fifo_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
