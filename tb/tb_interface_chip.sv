`timescale 1ps/1ps
// tb_interface_chip: end-to-end test of the interface chip at its default
// sizes (32-bit words, 4-stage FIFOs, 21-stage rings).
// Two behavioural synchronous modules, one per side, run on the chip's
// own clocks a_sysclk and b_sysclk. Each sends a numbered, scrambled word
// stream to the other with random valid and random ready, and checks that
// every word arrives once and in order. The test also checks that:
//   - no local clock period is shorter than 2*21*stage delay and no high
//     phase is cut short (pausing only ever stretches the clock);
//   - the two clocks run at their nominal rates when not paused;
//   - the divide-by-256 output of the ring test structure has 256 ring
//     periods, and the Select cell routes transitions by sel.
// Mechanisms counted (each must occur): clock pauses on each side,
// transmit stalls (register busy), receive back-pressure (word waiting in
// a full FIFO), both channels of one port requesting at once, and the
// clock mutex refusing a request because the clock was high.
module tb_interface_chip;
  localparam int W = 32;
  localparam int NWORDS = 600;
  localparam int PER_A = 2 * 21 * 11;
  localparam int PER_B = 2 * 21 * 14;

  logic rst_n, a_enable, b_enable;
  logic a_sysclk, b_sysclk;
  logic a_rx_valid, a_rx_ready, a_tx_valid, a_tx_ready;
  logic b_rx_valid, b_rx_ready, b_tx_valid, b_tx_ready;
  logic [W-1:0] a_rx_data, a_tx_data, b_rx_data, b_tx_data;
  logic ro_select, ro_enable, ro_reset, ro_out;
  logic sel_in, sel_sel, sel_cdn, sel_out_t, sel_out_f;

  int checks = 0, failures = 0;
  bit run = 0;  // set once reset has been released

  interface_chip dut (.*);

  function automatic logic [W-1:0] word_of(int side, int n);
    return (32'h9E37_79B9 * (n + 1)) ^ (side == 0 ? 32'hA5A5_0000 : 32'h0000_5A5A) ^ n;
  endfunction

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", msg, $time);
    end
  endtask

  // ---------------- side A synchronous module ----------------
  int a_sent = 0, a_recv = 0, b_sent = 0, b_recv = 0;
  int a_tx_stall = 0, b_tx_stall = 0, a_rx_hold = 0, b_rx_hold = 0;

  always @(posedge a_sysclk) if (run) begin
    if (a_tx_valid && a_tx_ready) a_sent <= a_sent + 1;
    if (a_tx_valid && !a_tx_ready) a_tx_stall++;
    if (a_rx_valid && a_rx_ready) begin
      check(a_rx_data == word_of(1, a_recv), "A receive order/data");
      a_recv++;
    end
    if (a_rx_valid && !a_rx_ready) a_rx_hold++;
  end
  // drive after the edge, as logic clocked by a_sysclk would
  always @(posedge a_sysclk) begin
    #1;
    a_tx_valid <= (a_sent + (a_tx_valid && a_tx_ready ? 1 : 0) < NWORDS) && ($urandom_range(0, 3) != 0);
    // A is slow to take words for a while, so the B->A FIFO fills up
    a_rx_ready <= (a_recv >= 300 && a_recv < 340) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 5) != 0);
  end
  assign a_tx_data = word_of(0, a_sent);

  always @(posedge b_sysclk) if (run) begin
    if (b_tx_valid && b_tx_ready) b_sent <= b_sent + 1;
    if (b_tx_valid && !b_tx_ready) b_tx_stall++;
    if (b_rx_valid && b_rx_ready) begin
      check(b_rx_data == word_of(0, b_recv), "B receive order/data");
      b_recv++;
    end
    if (b_rx_valid && !b_rx_ready) b_rx_hold++;
  end
  always @(posedge b_sysclk) begin
    #1;
    b_tx_valid <= (b_sent + (b_tx_valid && b_tx_ready ? 1 : 0) < NWORDS) && ($urandom_range(0, 2) != 0);
    // B is slower to take words at first, so the A->B FIFO fills up
    b_rx_ready <= (b_recv < 40) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 3) != 0);
  end
  assign b_tx_data = word_of(1, b_sent);

  // ---------------- clock checks ----------------
  longint a_last_rise = -1, a_last_fall = -1, b_last_rise = -1;
  int a_pauses = 0, b_pauses = 0, a_nominal = 0, b_nominal = 0;
  int a_short = 0, b_short = 0, a_high_short = 0;
  always @(posedge a_sysclk) if (run) begin
    if (a_last_rise >= 0) begin
      if ($time - a_last_rise < PER_A) a_short++;
      else if ($time - a_last_rise == PER_A) a_nominal++;
      else a_pauses++;
    end
    a_last_rise = $time;
  end
  always @(negedge a_sysclk) if (run && a_last_rise >= 0) begin
    if ($time - a_last_rise < PER_A / 2) a_high_short++;
  end
  always @(posedge b_sysclk) if (run) begin
    if (b_last_rise >= 0) begin
      if ($time - b_last_rise < PER_B) b_short++;
      else if ($time - b_last_rise == PER_B) b_nominal++;
      else b_pauses++;
    end
    b_last_rise = $time;
  end

  // ---------------- mechanism counters ----------------
  int both_req_a = 0, both_req_b = 0, mutex_wait_a = 0, mutex_wait_b = 0;
  always @(posedge dut.u_pcc_a.creq) if (run && dut.u_pcc_a.rclk) mutex_wait_a++;
  always @(posedge dut.u_pcc_b.creq) if (run && dut.u_pcc_b.rclk) mutex_wait_b++;
  always @(posedge dut.u_pcc_a.req_rx or posedge dut.u_pcc_a.req_tx)
    if (run && dut.u_pcc_a.req_rx && dut.u_pcc_a.req_tx) both_req_a++;
  always @(posedge dut.u_pcc_b.req_rx or posedge dut.u_pcc_b.req_tx)
    if (run && dut.u_pcc_b.req_rx && dut.u_pcc_b.req_tx) both_req_b++;
  int fifo_full_ab = 0;  // a word offered to fifo_ab waits because it is full
  always @(posedge dut.ab_req_in) begin
    #(PER_A);
    if (dut.ab_req_in && !dut.ab_ack_out) fifo_full_ab++;
  end

  // ---------------- ring test structure ----------------
  longint ro_t0 = -1, ro_t1 = -1, ro_out_t0 = -1, ro_out_per = -1;
  int ro_edges = 0, ro_out_n = 0;
  always @(posedge dut.ro_buf) if (!ro_reset) begin
    ro_edges++;
    if (ro_edges == 10) ro_t0 = $time;
    if (ro_edges == 11) ro_t1 = $time;
  end
  always @(posedge ro_out) begin
    ro_out_n++;
    if (ro_out_n == 2) ro_out_t0 = $time;
    if (ro_out_n == 3) ro_out_per = $time - ro_out_t0;
  end

  // ---------------- stimulus ----------------
  initial begin
    rst_n = 1;
    #1 rst_n = 0;
    a_enable = 0; b_enable = 0;
    a_tx_valid = 0; a_rx_ready = 0; b_tx_valid = 0; b_rx_ready = 0;
    ro_select = 0; ro_enable = 0; ro_reset = 1;
    sel_in = 0; sel_sel = 0; sel_cdn = 0;
    #2000;
    rst_n = 1;
    run = 1;
    #100;
    a_enable = 1; b_enable = 1;
    ro_select = 1; ro_enable = 1;
    #1000 ro_reset = 0;

    // Select cell: route 8 transitions by a pseudo-random sel
    sel_cdn = 1;
    #10;
    for (int i = 0; i < 8; i++) begin
      bit s;
      logic t0, f0;
      s = 1'(i % 3 == 0);
      t0 = sel_out_t; f0 = sel_out_f;
      sel_sel = s; #10;
      sel_in = ~sel_in; #10;
      check(s ? (sel_out_t != t0 && sel_out_f == f0) : (sel_out_f != f0 && sel_out_t == t0), "select routing");
    end

    wait (a_recv == NWORDS && b_recv == NWORDS);
    wait (ro_out_per >= 0);
    #1000;
    check(a_sent == NWORDS && b_sent == NWORDS, "all words sent");
    check(!a_rx_valid && !b_rx_valid, "no extra words");
    check(a_short == 0 && b_short == 0, "no shortened clock period");
    check(a_high_short == 0, "no shortened high phase");
    check(a_nominal > 0 && b_nominal > 0, "nominal clock periods present");
    check(ro_t1 - ro_t0 == PER_A, "ring oscillator period");
    check(ro_out_per == 256 * PER_A, "divide-by-256 output period");
    // each named mechanism must have happened
    check(a_pauses > 0, "A clock paused");
    check(b_pauses > 0, "B clock paused");
    check(a_tx_stall > 0 && b_tx_stall > 0, "transmit stall");
    check(a_rx_hold > 0 && b_rx_hold > 0, "receive back-pressure");
    check(fifo_full_ab > 0, "FIFO full");
    check(both_req_a + both_req_b > 0, "both channels requesting");
    check(mutex_wait_a > 0 && mutex_wait_b > 0, "request waiting for clock low");
    $display("A: sent %0d recv %0d pauses %0d nominal %0d tx_stall %0d rx_hold %0d both_req %0d mutex_wait %0d",
             a_sent, a_recv, a_pauses, a_nominal, a_tx_stall, a_rx_hold, both_req_a, mutex_wait_a);
    $display("B: sent %0d recv %0d pauses %0d nominal %0d tx_stall %0d rx_hold %0d both_req %0d mutex_wait %0d",
             b_sent, b_recv, b_pauses, b_nominal, b_tx_stall, b_rx_hold, both_req_b, mutex_wait_b);
    $display("fifo_ab full %0d, ring period %0d ps, divider period %0d ps, time %0t", fifo_full_ab,
             ro_t1 - ro_t0, ro_out_per, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(64'd20_000_000);
    failures++;
    $display("watchdog: a_recv %0d b_recv %0d", a_recv, b_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
