// tb_refresh_ctrl_pass: one full refresh pass of the refresh scheduler at its default
// size, 8192 rows every 6240 cycles, with grants delayed at random.
//
// Every row must be refreshed once, in order, and no later than its own interval
// plus the grant delay. The whole pass must end well inside a one-second checkpoint
// interval (1e9 cycles at an assumed 1 GHz), so that resetting the scheduler at each
// checkpoint still refreshes every row once per interval. After the pass, a
// checkpoint broadcast must restart the walk at row 0 with a fresh timer.
//
// Timing: inputs are driven with nonblocking assignments on the rising edge. The
// model counts cycles since the last checkpoint and expects the request for the n-th
// refresh of the walk (n from 1) to rise at cycle n * REFRESH_INTERVAL.
module tb_refresh_ctrl_pass;
  localparam int unsigned REFRESH_INTERVAL = 6240, ROWS = 8192, MAX_DELAY = 40;
  localparam longint unsigned CKPT_INTERVAL = 64'd1000000000;
  logic clk = 0, rst_n = 0, ckpt = 0, ack = 0;
  logic req;
  logic [12:0] row;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0, last_done = 0;
  int unsigned done = 0, wait_left = 0;
  bit req_seen = 0;

  refresh_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Cycle count since the checkpoint, request timing and grants. cyc is the index
  // of the cycle now ending: a request set at the end of cycle n*INTERVAL-1 is seen
  // here in cycle n*INTERVAL.
  always @(posedge clk) if (rst_n) begin
    if (ckpt) begin
      cyc <= 0;
      req_seen <= 0;
    end else begin
      cyc <= cyc + 1;
      if (req && !req_seen) begin
        req_seen <= 1;
        checks++;
        if (cyc != (longint'(done) + 1) * REFRESH_INTERVAL) begin
          failures++;
          if (failures < 10) $display("refresh %0d requested in cycle %0d", done + 1, cyc);
        end
        wait_left <= $urandom_range(0, MAX_DELAY);
      end
      if (req && req_seen && !ack) begin
        if (wait_left == 0) ack <= 1;
        else wait_left <= wait_left - 1;
      end
      if (req && ack) begin
        ack <= 0;
        req_seen <= 0;
        checks++;
        if (row != 13'(done % ROWS)) begin
          failures++;
          if (failures < 10) $display("refresh %0d went to row %0d", done + 1, row);
        end
        done <= done + 1;
        last_done <= cyc;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    ckpt <= 1;
    @(posedge clk);
    ckpt <= 0;
    wait (done == ROWS);
    @(posedge clk);
    checks++;
    if (last_done > longint'(ROWS) * REFRESH_INTERVAL + longint'(MAX_DELAY) + 2 || last_done >= CKPT_INTERVAL) begin
      failures++;
      $display("pass ended in cycle %0d", last_done);
    end
    $display("all %0d rows refreshed by cycle %0d of a %0d-cycle interval", ROWS, last_done, CKPT_INTERVAL);
    // A checkpoint restarts the walk at row 0 with a fresh timer.
    @(posedge clk);
    ckpt <= 1;
    done <= 0;
    @(posedge clk);
    ckpt <= 0;
    wait (done == 3);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
