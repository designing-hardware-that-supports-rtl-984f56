// tb_checkpoint_ctrl: self-checking test of the checkpoint and replay sequencer.
// With a 100-cycle interval the testbench answers the processor and memory-log
// handshakes after random delays and checks: the first checkpoint after reset;
// periodic checkpoints exactly 100 running cycles apart; t counting running
// cycles from 0; a replay request rolling back, restoring and broadcasting with
// replay = 1; the replay running exactly as many cycles as were recorded and then
// halting; a second replay from the halt; and ckpt_force returning to recording.
module tb_checkpoint_ctrl;
  logic clk = 0, rst_n = 0, ckpt_force = 0, replay_req = 0;
  logic cpu_ckpt_req, cpu_ckpt_done = 0, cpu_restore_req, cpu_restore_done = 0;
  logic rb_start, rb_done = 0, ckpt, replay, run, halt;
  logic [31:0] t, recorded_len;
  int checks = 0, failures = 0;
  int n_ckpt = 0, n_replay_ckpt = 0, n_rb = 0, run_len = 0;

  checkpoint_ctrl #(.CKPT_INTERVAL(100), .T_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // responders: processor and memory log, random latency
  initial begin
    forever begin
      @(negedge clk);
      cpu_ckpt_done    = cpu_ckpt_req && ($urandom_range(0, 3) == 0);
      cpu_restore_done = cpu_restore_req && ($urandom_range(0, 3) == 0);
    end
  end
  initial begin
    forever begin
      @(posedge clk);
      if (rb_start) begin
        n_rb++;
        repeat ($urandom_range(1, 20)) @(posedge clk);
        @(negedge clk); rb_done = 1;
        @(negedge clk); rb_done = 0;
      end
    end
  end

  // monitor: t must count running cycles since the last broadcast
  int exp_t = 0;
  always @(posedge clk) if (rst_n) begin
    if (ckpt) begin
      if (replay) n_replay_ckpt++; else n_ckpt++;
      exp_t = 0;
      run_len = 0;
    end else if (run) begin
      checks++;
      if (t !== 32'(exp_t)) begin failures++; if (failures < 10) $display("t=%0d expected %0d", t, exp_t); end
      exp_t++;
      run_len++;
      if (!replay && run_len > 100) begin failures++; $display("no periodic checkpoint"); end
    end
  end

  task automatic wait_for(ref logic sig, input int limit, input string what);
    int n = 0;
    while (!sig && n < limit) begin @(negedge clk); n++; end
    checks++;
    if (!sig) begin failures++; $display("timeout waiting for %s", what); end
  endtask

  initial begin
    int rec_cycles, rep_cycles;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait_for(run, 100, "first checkpoint");
    checks++;
    if (n_ckpt != 1 || replay) begin failures++; $display("first checkpoint wrong"); end
    // three periodic checkpoints
    while (n_ckpt < 4) @(negedge clk);
    // record 37 cycles, then ask for a replay
    wait_for(run, 100, "run after checkpoint");
    repeat (36) @(negedge clk);
    rec_cycles = exp_t + 1;
    replay_req = 1; @(negedge clk); replay_req = 0;
    checks++;
    if (recorded_len !== 32'(rec_cycles)) begin failures++; $display("recorded_len=%0d expected %0d", recorded_len, rec_cycles); end
    for (int r = 0; r < 2; r++) begin
      wait_for(replay, 200, "replay mode");
      wait_for(run, 200, "replay run");
      rep_cycles = 0;
      while (run) begin @(negedge clk); rep_cycles++; end
      checks++;
      if (!halt || rep_cycles != rec_cycles) begin
        failures++; $display("replay ran %0d cycles, recorded %0d, halt=%b", rep_cycles, rec_cycles, halt);
      end
      repeat (5) @(negedge clk);
      checks++;
      if (!halt || run) begin failures++; $display("did not stay halted"); end
      if (r == 0) begin replay_req = 1; @(negedge clk); replay_req = 0; end
    end
    ckpt_force = 1; @(negedge clk); ckpt_force = 0;
    wait_for(run, 100, "recording after replay");
    checks++;
    if (replay || n_rb != 2 || n_replay_ckpt != 2) begin
      failures++; $display("replay=%b rollbacks=%0d replay checkpoints=%0d", replay, n_rb, n_replay_ckpt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
