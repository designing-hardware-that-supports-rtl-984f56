// tb_input_log_rates: the input log at its full default depth, driven at the I/O
// rates a server sees, with every event checked on replay.
//
// Rates: 1 MB/s in the steady state and 100 MB/s at peak. Both are counted in 8-byte
// messages at an assumed 1 GHz core clock, so one message arrives every 8000 cycles
// or every 80 cycles.
//
// Phase 1 (peak, real time): for 2 M cycles (2 ms), a message arrives on each cycle
// with probability 1/80, sometimes with an interrupt. The log must count every event
// and must not overflow. It is then replayed while junk is driven on the device
// inputs. Every replayed event must appear in its recorded cycle with its recorded
// contents, and no other event may appear.
//
// Phases 2 and 3 (time-compressed): the log only compares its cycle stamp with t,
// so idle cycles can be skipped by stepping t by the gap between messages on every
// clock. Phase 2 covers a whole one-second interval (1e9 cycles) at 1 MB/s:
// 125000 messages. They must all fit, and replay exactly. Phase 3 fills the log at
// 100 MB/s. Overflow must rise with the message after the 2**18th, which is after
// 2**18 * 80 cycles, about 21 ms.
//
// The rates come from measurements of SPEC workloads; the message size, the clock
// and the log depth are this design's choices.
module tb_input_log_rates;
  import cadre_pkg::*;
  localparam int DEPTH = 262144;
  localparam int PEAK_GAP = 80, STEADY_GAP = 8000;
  localparam int P1_CYCLES = 2000000, P2_MSGS = 125000;
  logic clk = 0, rst_n = 0, ckpt = 0, replay = 0;
  logic [31:0] t, step = 1;
  logic io_msg_valid = 0, io_irq_valid = 0;
  data_t io_msg = '0;
  logic [7:0] io_irq_vec = 0;
  logic io_clk_en, io_connect, sys_msg_valid, sys_irq_valid, overflow;
  data_t sys_msg;
  logic [7:0] sys_irq_vec;
  logic [18:0] entries;
  int checks = 0, failures = 0;

  typedef struct packed { logic [31:0] t; io_event_t ev; } stamped_t;
  stamped_t rec [$];

  input_log dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) t <= ckpt ? '0 : t + step;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic checkpoint(bit rp);
    @(negedge clk); ckpt = 1; replay = rp;
    @(negedge clk); ckpt = 0;
  endtask

  function automatic io_event_t seen();
    io_event_t e;
    e.msg_valid = sys_msg_valid;
    e.msg       = sys_msg_valid ? sys_msg : '0;
    e.irq_valid = sys_irq_valid;
    e.irq_vec   = sys_irq_valid ? sys_irq_vec : '0;
    return e;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("%s", what);
  endtask

  // Drives one cycle of device input. While recording, a driven event is stored with
  // the t of its cycle.
  task automatic drive(bit msg, bit irq);
    io_msg_valid = msg;
    io_irq_valid = irq;
    io_msg       = {$urandom, $urandom};
    io_irq_vec   = 8'($urandom);
    #1;
    if (!replay && (msg || irq)) rec.push_back({t, seen()});
  endtask

  // Replays n clocks with junk on the device inputs. Each event the system side sees
  // must be the next recorded one, at its recorded t.
  task automatic replay_check(int n, string phase);
    int k;
    k = 0;
    checkpoint(1);
    for (int c = 0; c < n; c++) begin
      drive(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)));
      if (io_clk_en || io_connect) fail({phase, ": devices not cut off during replay"});
      if (sys_msg_valid || sys_irq_valid) begin
        checks++;
        if (k >= rec.size()) fail({phase, ": event replayed that was never recorded"});
        else if (rec[k].t !== t || rec[k].ev !== seen())
          fail($sformatf("%s: event %0d replayed at t=%0d, recorded at t=%0d", phase, k, t, rec[k].t));
        k++;
      end
      @(negedge clk);
    end
    checks++;
    if (k != rec.size()) fail($sformatf("%s: %0d of %0d events replayed", phase, k, rec.size()));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;

    // Phase 1: peak rate, real time.
    step = 1;
    checkpoint(0);
    rec.delete();
    for (int c = 0; c < P1_CYCLES; c++) begin
      bit m;
      m = ($urandom_range(0, PEAK_GAP - 1) == 0);
      drive(m, m && ($urandom_range(0, 3) == 0));
      @(negedge clk);
    end
    drive(0, 0);
    checks++;
    if (overflow || entries != 19'(rec.size()))
      fail($sformatf("peak: %0d entries for %0d events, overflow %0d", entries, rec.size(), overflow));
    $display("peak rate: %0d events in %0d cycles", rec.size(), P1_CYCLES);
    replay_check(P1_CYCLES, "peak");

    // Phase 2: one second at the steady-state rate, idle cycles skipped.
    replay = 0;
    step = STEADY_GAP;
    checkpoint(0);
    rec.delete();
    for (int c = 0; c < P2_MSGS; c++) begin
      drive(1, 0);
      @(negedge clk);
    end
    drive(0, 0);
    checks++;
    if (overflow || entries != 19'(P2_MSGS))
      fail($sformatf("steady: %0d entries for %0d messages, overflow %0d", entries, P2_MSGS, overflow));
    checks++;
    if (rec[P2_MSGS - 1].t < 32'd999000000) fail("steady: recording did not span a second");
    $display("steady rate: %0d messages over %0d cycles, %0d entries", P2_MSGS, rec[P2_MSGS - 1].t + 1, entries);
    replay_check(P2_MSGS, "steady");

    // Phase 3: fill at the peak rate, idle cycles skipped.
    replay = 0;
    step = PEAK_GAP;
    checkpoint(0);
    rec.delete();
    for (int c = 0; c < DEPTH; c++) begin
      drive(1, 0);
      @(negedge clk);
    end
    drive(0, 0);
    checks++;
    if (overflow || entries != 19'(DEPTH)) fail("fill: log not full, or overflow too early");
    drive(1, 0);
    @(negedge clk);
    drive(0, 0);
    checks++;
    if (!overflow) fail("fill: overflow not raised");
    checks++;
    if (rec[DEPTH].t != 32'(DEPTH * PEAK_GAP)) fail("fill: overflow at the wrong time");
    $display("peak rate fills the log after %0d cycles (%0d us at 1 GHz)", rec[DEPTH].t, rec[DEPTH].t / 1000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
