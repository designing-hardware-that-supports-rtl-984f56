// tb_refresh_ctrl: self-checking test of the deterministic refresh scheduler.
// With a 20-cycle interval and 8 rows, the grant is given after a random wait.
// Every cycle req and row are compared with a model built from the rule "a
// request every INTERVAL cycles after the checkpoint, rows in order, all cleared by
// the checkpoint". Checkpoints fall at random times, including mid-request.
module tb_refresh_ctrl;
  localparam int IV = 20, ROWS = 8;
  logic clk = 0, rst_n = 0, ckpt = 0, ack = 0, req;
  logic [2:0] row;
  int checks = 0, failures = 0, n_ref = 0, n_ckpt = 0;
  int since = 0;          // cycles since the checkpoint
  bit m_req = 0;
  int m_row = 0;

  refresh_ctrl #(.REFRESH_INTERVAL(IV), .ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (req !== m_req || (m_req && row !== 3'(m_row))) begin
        failures++;
        if (failures < 10) $display("cycle %0d: req=%b row=%0d model req=%b row=%0d", i, req, row, m_req, m_row);
      end
      ack  = req && ($urandom_range(0, 3) == 0);
      ckpt = ($urandom_range(0, 799) == 0);
      @(posedge clk);
      if (ckpt) begin
        since = 0; m_req = 0; m_row = 0; n_ckpt++;
      end else begin
        if (m_req && ack) begin m_req = 0; m_row = (m_row + 1) % ROWS; n_ref++; end
        if (since % IV == IV - 1) m_req = 1;
        since++;
      end
      @(negedge clk);
    end
    checks++;
    if (n_ref < 50 || n_ckpt == 0) begin failures++; $display("too few refreshes or checkpoints"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
