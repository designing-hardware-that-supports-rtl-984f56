// tb_input_log: self-checking test of I/O input recording and replay.
// Recording: random messages and interrupts from the devices for 2000 cycles; the
// system side must see them live, and the I/O devices must be clocked and
// connected. Replay: the devices are cut off (their clock enable and connection
// must drop) and random junk is driven on their inputs; the system side must see
// exactly what it saw while recording, cycle for cycle. The replay is done twice.
// Last, a log of 256 entries is over-filled and must raise overflow.
module tb_input_log;
  import cadre_pkg::*;
  localparam int DEPTH = 256, RUN = 2000;
  logic clk = 0, rst_n = 0, ckpt = 0, replay = 0;
  logic [31:0] t;
  logic io_msg_valid = 0, io_irq_valid = 0;
  data_t io_msg = '0;
  logic [7:0] io_irq_vec = 0;
  logic io_clk_en, io_connect, sys_msg_valid, sys_irq_valid, overflow;
  data_t sys_msg;
  logic [7:0] sys_irq_vec;
  logic [8:0] entries;
  int checks = 0, failures = 0;
  io_event_t rec [RUN];

  input_log #(.DEPTH(DEPTH), .T_W(32)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) t <= ckpt ? '0 : t + 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic checkpoint(bit rp);
    @(negedge clk); ckpt = 1; replay = rp;
    @(negedge clk); ckpt = 0;
  endtask

  task automatic drive_random(int pct);
    io_msg_valid = ($urandom_range(0, 99) < pct);
    io_irq_valid = ($urandom_range(0, 99) < pct / 3);
    io_msg       = {$urandom, $urandom};
    io_irq_vec   = 8'($urandom);
  endtask

  function automatic io_event_t seen();
    io_event_t e;
    e.msg_valid = sys_msg_valid;
    e.msg       = sys_msg_valid ? sys_msg : '0;
    e.irq_valid = sys_irq_valid;
    e.irq_vec   = sys_irq_valid ? sys_irq_vec : '0;
    return e;
  endfunction

  task automatic replay_once();
    checkpoint(1);
    for (int c = 0; c < RUN; c++) begin
      drive_random(50);
      #1;
      checks++;
      if (seen() !== rec[c] || io_clk_en || io_connect) begin
        failures++;
        if (failures < 10) $display("replay cycle %0d differs", c);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int nev = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checkpoint(0);
    for (int c = 0; c < RUN; c++) begin
      drive_random(c < RUN / 2 ? 5 : 0);   // about 80 events, then quiet
      #1;
      rec[c] = seen();
      if (io_msg_valid || io_irq_valid) nev++;
      checks++;
      if (sys_msg_valid !== io_msg_valid || sys_irq_valid !== io_irq_valid
          || (io_msg_valid && sys_msg !== io_msg) || !io_clk_en || !io_connect) begin
        failures++; $display("record cycle %0d: live input not passed through", c);
      end
      @(negedge clk);
    end
    io_msg_valid = 0; io_irq_valid = 0;
    checks++;
    if (entries !== 9'(nev) || nev == 0) begin failures++; $display("entries=%0d, events=%0d", entries, nev); end
    replay_once();
    replay_once();
    // overflow
    checkpoint(0);
    for (int c = 0; c < DEPTH + 10; c++) begin
      drive_random(100);
      @(negedge clk);
    end
    io_msg_valid = 0; io_irq_valid = 0;
    checks++;
    if (!overflow || entries !== 9'(DEPTH)) begin failures++; $display("overflow not flagged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
