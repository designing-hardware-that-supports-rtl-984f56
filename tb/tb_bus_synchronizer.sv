// tb_bus_synchronizer: end-to-end test of a deterministic source-synchronous link.
//
// A bus_tx_tagger sends random messages; a channel model in this testbench
// delivers each one after a random delay, keeping the bus in order, such that the
// receiver's count at arrival lies in x_T + [THETA1, THETA2]. In each checkpoint
// interval the receiver's checkpoint lags the transmitter's by k = 0 or 1 cycles,
// which shifts the counter difference, and the delay range moves with it. The
// check: every message must reach the receiver core exactly THETA2 + k cycles
// after it was sent, whatever its delay, with its data intact and in order.
// Half the intervals send a Gray-coded tag and program the lookup table with the
// Gray decode. At the end one message is delayed past the bound and late_err must
// rise. Also counted: messages that went straight through (arrived at z_R) and
// messages that waited in the holding queue.
module tb_bus_synchronizer;
  localparam int THETA1 = 1, THETA2 = 3;
  logic clk = 0, rst_n = 0, tx_ckpt = 0, rx_ckpt = 0;
  logic tx_in_valid = 0;
  logic [15:0] tx_in_data = 0;
  logic tx_valid;
  logic [15:0] tx_data;
  logic [1:0] tx_rho;
  logic [31:0] tx_count, rx_count;
  logic cfg_we = 0;
  logic [1:0] cfg_addr = 0, cfg_data = 0;
  logic in_valid = 0;
  logic [15:0] in_data = 0;
  logic [1:0] in_rho = 0;
  logic out_valid, late_err, hq_overflow;
  logic [15:0] out_data;

  bus_tx_tagger #(.DATA_W(16), .RHO_W(2), .DC_W(32)) u_tx (
    .clk, .rst_n, .ckpt(tx_ckpt), .in_valid(tx_in_valid), .in_data(tx_in_data),
    .out_valid(tx_valid), .out_data(tx_data), .out_rho(tx_rho), .tx_count);

  bus_synchronizer #(.DATA_W(16), .RHO_W(2), .DC_W(32), .THETA1(THETA1), .THETA2(THETA2),
                     .DEPTH(8)) dut (
    .clk, .rst_n, .ckpt(rx_ckpt), .cfg_we, .cfg_addr, .cfg_data,
    .in_valid, .in_data, .in_rho, .out_valid, .out_data, .rx_count, .late_err, .hq_overflow);

  always #5 clk = ~clk;

  typedef struct { longint arrive; longint due; logic [15:0] data; logic [1:0] rho; } msg_t;
  msg_t chan[$];     // in flight on the bus
  msg_t expect_q[$]; // awaiting processing
  longint cyc = 0, last_arrive = -1;
  int checks = 0, failures = 0, n_bypass = 0, n_queued = 0, n_sent = 0;
  int k = 0, extra = 0;
  bit gray = 0, scoring = 1;

  function automatic logic [1:0] to_gray(logic [1:0] b); return b ^ (b >> 1); endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // channel model, evaluated at the falling edge
  always @(negedge clk) if (rst_n) begin
    // deliver what arrives this cycle
    in_valid = 0;
    if (chan.size() > 0 && chan[0].arrive == cyc) begin
      msg_t m;
      m = chan.pop_front();
      in_valid = 1; in_data = m.data; in_rho = m.rho;
      if (m.arrive == m.due) n_bypass++; else n_queued++;
    end
    // a message the tagger drives this cycle enters the channel
    if (tx_valid) begin
      msg_t m;
      longint lo, hi, a;
      lo = cyc + THETA1 + k; hi = cyc + THETA2 + k + extra;
      a  = lo + $urandom_range(0, 32'(hi - lo));
      if (a <= last_arrive) a = last_arrive + 1;
      last_arrive = a;
      m.arrive = a; m.due = cyc + THETA2 + k; m.data = tx_data;
      m.rho = gray ? to_gray(tx_rho) : tx_rho;
      chan.push_back(m);
      expect_q.push_back(m);
      n_sent++;
    end
  end

  // processing side, sampled just before the clock edge that ends the cycle
  always @(posedge clk) if (rst_n && scoring) begin
    if (out_valid) begin
      checks++;
      if (expect_q.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        msg_t e;
        e = expect_q.pop_front();
        if (e.due != cyc || e.data != out_data) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %h, expected %h due %0d", cyc, out_data, e.data, e.due);
        end
      end
    end else if (expect_q.size() > 0 && expect_q[0].due == cyc) begin
      checks++; failures++;
      if (failures < 10) $display("cycle %0d: message due but not processed", cyc);
    end
  end

  always @(posedge clk) cyc <= cyc + 1;

  task automatic program_lut(bit g);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      cfg_we = 1;
      cfg_addr = g ? to_gray(2'(i)) : 2'(i);
      cfg_data = 2'(i);
    end
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 12; iv++) begin
      gray = (iv % 2 == 1);
      program_lut(gray);
      k = iv % 3 == 2 ? 1 : 0;
      @(negedge clk); tx_ckpt = 1;
      if (k == 0) rx_ckpt = 1;
      @(negedge clk); tx_ckpt = 0; rx_ckpt = (k == 1);
      @(negedge clk); rx_ckpt = 0;
      for (int c = 0; c < 400; c++) begin
        tx_in_valid = ($urandom_range(0, 99) < 60);
        tx_in_data  = 16'($urandom);
        @(negedge clk);
      end
      tx_in_valid = 0;
      repeat (12) @(negedge clk);
    end
    checks++;
    if (late_err || hq_overflow) begin failures++; $display("error flag set in normal operation"); end
    checks++;
    if (n_bypass == 0 || n_queued == 0) begin failures++; $display("bypass/queue paths not both used"); end
    checks++;
    if (expect_q.size() != 0) begin failures++; $display("%0d messages never processed", expect_q.size()); end
    // one message beyond the delay bound must be flagged
    scoring = 0;
    extra = 2;
    while (late_err == 0 && extra < 100) begin
      tx_in_valid = 1; tx_in_data = 16'hdead;
      @(negedge clk);
      tx_in_valid = 0;
      repeat (12) @(negedge clk);
      extra++;
    end
    checks++;
    if (!late_err) begin failures++; $display("late message not flagged"); end
    $display("sent=%0d bypass=%0d queued=%0d", n_sent, n_bypass, n_queued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
