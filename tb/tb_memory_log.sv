// tb_memory_log: self-checking test of the memory undo log.
// The testbench plays the memory controller over a 16-line memory of its own.
// After a checkpoint it makes random writes; before each it asks need_log, which
// must be 1 exactly for the first write to a line since the checkpoint, and pushes
// the old value when told to. It then starts a rollback, applies the entries the
// log hands back (with random back-pressure) to its memory, and checks that the
// memory equals the snapshot taken at the checkpoint, that each line came back
// once, and that the log ends empty. Three rounds, one ended by a checkpoint
// instead of a rollback.
module tb_memory_log;
  localparam int LINES = 16;
  logic clk = 0, rst_n = 0, ckpt = 0;
  logic [3:0] chk_addr = 0, push_addr = 0, rb_addr;
  logic need_log, push = 0, rb_start = 0, rb_valid, rb_ready = 0, rb_done;
  logic [31:0] push_data = 0, rb_data;
  logic [4:0] entries;
  int checks = 0, failures = 0;
  logic [31:0] mem [LINES], snap [LINES];
  bit touched [LINES];

  memory_log #(.LINES(LINES), .DATA_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic take_checkpoint();
    @(negedge clk); ckpt = 1;
    @(negedge clk); ckpt = 0;
    foreach (mem[i]) begin snap[i] = mem[i]; touched[i] = 0; end
  endtask

  task automatic do_writes(int n);
    int nlog = 0;
    for (int w = 0; w < n; w++) begin
      int a;
      logic [31:0] v;
      a = $urandom_range(0, LINES - 1);
      v = $urandom;
      @(negedge clk);
      chk_addr = 4'(a);
      #1;
      checks++;
      if (need_log !== !touched[a]) begin
        failures++; $display("need_log=%b for line %0d, touched=%0b", need_log, a, touched[a]);
      end
      if (need_log) begin
        push = 1; push_addr = 4'(a); push_data = mem[a];
        @(negedge clk); push = 0;
        nlog++;
      end
      touched[a] = 1;
      mem[a] = v;
    end
    @(negedge clk);
    checks++;
    if (entries !== 5'(nlog)) begin failures++; $display("entries=%0d expected %0d", entries, nlog); end
  endtask

  task automatic rollback();
    int last = LINES, seen[LINES];
    bit done = 0;
    int guard = 0;
    foreach (seen[i]) seen[i] = 0;
    @(negedge clk); rb_start = 1;
    @(negedge clk); rb_start = 0;
    while (!done && guard < 1000) begin
      rb_ready = $urandom_range(0, 1);
      #1;
      if (rb_valid && rb_ready) begin
        mem[rb_addr] = rb_data;
        seen[rb_addr]++;
      end
      @(posedge clk);
      #1;
      done = rb_done;
      @(negedge clk);
      guard++;
    end
    rb_ready = 0;
    checks++;
    if (!done) begin failures++; $display("rollback never finished"); end
    foreach (mem[i]) begin
      checks++;
      if (mem[i] !== snap[i] || seen[i] != (touched[i] ? 1 : 0)) begin
        failures++; $display("line %0d: %h after rollback, checkpoint had %h (restored %0d times)", i, mem[i], snap[i], seen[i]);
      end
      touched[i] = 0;
    end
    checks++;
    if (entries !== 0) begin failures++; $display("log not empty after rollback"); end
  endtask

  initial begin
    foreach (mem[i]) mem[i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n = 1;
    take_checkpoint();
    do_writes(40);
    rollback();
    do_writes(10);   // the rollback starts a fresh interval
    take_checkpoint();
    do_writes(25);
    rollback();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
