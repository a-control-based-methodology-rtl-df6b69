// tb_resync: checks the handshake resynchronizer between unrelated clocks.
//
// Two runs: a fast sender (1 GHz) into a slow receiver (~270 MHz) and a slow
// sender into a fast receiver. The sender offers random flits with random
// gaps and random credit withdrawal; every flit accepted (tx_valid and
// tx_ready) must arrive exactly once and in order. Checked as well: the
// sender is held off (busy) after each send, credit withdrawal blocks
// sending, and each flit is seen at the receiver 2 to 3 receiver edges
// after it was sent (latency
// counted as receiver edges from the send to the edge that sees rx_valid).
module tb_resync;
  localparam int W = 64;

  logic         clk_a = 1'b0, clk_b = 1'b0, rst_n = 1'b0;
  logic         sel = 1'b0;            // 0: a -> b, 1: b -> a
  logic         clk_tx, clk_rx;
  logic         tx_valid = 1'b0, tx_credit = 1'b1, tx_busy, tx_ready;
  logic [W-1:0] tx_data = '0;
  logic         rx_valid;
  logic [W-1:0] rx_data;
  int           checks = 0, failures = 0;
  int           n_busy = 0, n_credit_block = 0, n_sent = 0, n_recv = 0;
  logic [W-1:0] sent_q [$];
  longint       send_rx_cyc [$];
  longint       rx_cyc = 0;
  longint       lat_min = 99, lat_max = 0;
  localparam int lat_lo = 2, lat_hi = 3;

  always #0.5ns  clk_a = ~clk_a;
  always #1.85ns clk_b = ~clk_b;
  assign clk_tx = sel ? clk_b : clk_a;
  assign clk_rx = sel ? clk_a : clk_b;

  resync #(.W(W)) dut (.clk_tx, .rst_tx_n(rst_n), .tx_valid, .tx_data, .tx_credit,
                       .tx_busy, .tx_ready, .clk_rx, .rst_rx_n(rst_n), .rx_valid, .rx_data);

  initial begin
    #400us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk_rx) begin
    rx_cyc <= rx_cyc + 1;
    if (rst_n && rx_valid) begin
      n_recv++;
      checks++;
      if (sent_q.size() == 0) begin
        failures++; $display("FAIL: flit received that was never sent");
      end else begin
        logic [W-1:0] e;
        longint lat;
        e = sent_q.pop_front();
        lat = rx_cyc - send_rx_cyc.pop_front();
        if (lat < lat_min) lat_min = lat;
        if (lat > lat_max) lat_max = lat;
        if (rx_data !== e) begin failures++; $display("FAIL: data %h expected %h", rx_data, e); end
        checks++;
        if (lat < lat_lo || lat > lat_hi) begin failures++; $display("FAIL: latency %0d rx cycles", lat); end
      end
    end
  end

  always @(posedge clk_tx) begin
    if (rst_n) begin
      if (tx_valid && tx_ready) begin
        sent_q.push_back(tx_data);
        send_rx_cyc.push_back(rx_cyc);
        n_sent++;
      end
      if (tx_valid && tx_busy)               n_busy++;
      if (tx_valid && !tx_busy && !tx_credit) n_credit_block++;
    end
  end

  task automatic run(int nflits);
    int accepted = 0;
    while (accepted < nflits) begin
      @(negedge clk_tx);
      if (tx_valid && tx_ready) accepted++;   // accepted at the coming edge
      tx_valid  = ($urandom_range(3, 0) != 0);
      tx_data   = {$urandom, $urandom};
      tx_credit = ($urandom_range(9, 0) != 0);
      // keep the check aligned with the edge: ready is sampled at posedge
    end
    @(negedge clk_tx);
    tx_valid = 1'b0;
    repeat (20) @(posedge clk_rx);
  endtask

  initial begin
    repeat (4) @(posedge clk_b);
    rst_n = 1'b1;
    run(300);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("FAIL: %0d flits lost (a->b)", sent_q.size()); end
    rst_n = 1'b0;
    sel = 1'b1;
    sent_q.delete(); send_rx_cyc.delete();
    repeat (4) @(posedge clk_b);
    rst_n = 1'b1;
    run(300);
    checks++;
    if (sent_q.size() != 0) begin failures++; $display("FAIL: %0d flits lost (b->a)", sent_q.size()); end
    checks++;
    if (n_busy == 0 || n_credit_block == 0) begin
      failures++; $display("FAIL: busy %0d / credit blocks %0d never seen", n_busy, n_credit_block);
    end
    checks++;
    if (n_recv != n_sent) begin failures++; $display("FAIL: sent %0d received %0d", n_sent, n_recv); end
    $display("latency %0d..%0d rx cycles", lat_min, lat_max);
    $display("sent %0d received %0d busy-stalls %0d credit-stalls %0d", n_sent, n_recv, n_busy, n_credit_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
