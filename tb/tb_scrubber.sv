// tb_scrubber: self-checking test of the scrub walker and its checkpointed index.
// Records which lines are scrubbed at which cycle after a checkpoint taken while
// recording, lets it run further, then takes a restoring checkpoint and checks that
// the scrubs after it repeat the recorded ones exactly (same lines, same cycles).
// Also checks every cycle that the line index advances by one per granted scrub.
module tb_scrubber;
  localparam int LINES = 16, IV = 10;
  logic clk = 0, rst_n = 0, ckpt = 0, restore = 0, ack = 0, req;
  logic [3:0] addr, saved_idx;
  int checks = 0, failures = 0;
  int rec_cyc[$], rec_line[$];
  int since = 0, exp_idx = 0;

  scrubber #(.LINES(LINES), .SCRUB_INTERVAL(IV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // grant after a fixed wait, so grants are a function of the requests only
  always_comb ack = req && (since % 3 == 0);

  task automatic run(int cycles, bit recording, bit replaying);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      since++;
      #1;
      if (req && ack) begin
        checks++;
        if (addr !== 4'(exp_idx)) begin
          failures++; $display("scrubbed line %0d, expected %0d", addr, exp_idx);
        end
        exp_idx = (exp_idx + 1) % LINES;
        if (recording) begin rec_cyc.push_back(since); rec_line.push_back(int'(addr)); end
        if (replaying) begin
          checks++;
          if (rec_cyc.size() == 0 || rec_cyc[0] != since || rec_line[0] != int'(addr)) begin
            failures++; $display("replayed scrub differs at cycle %0d line %0d", since, addr);
          end
          if (rec_cyc.size() > 0) begin void'(rec_cyc.pop_front()); void'(rec_line.pop_front()); end
        end
      end
    end
  endtask

  task automatic checkpoint(bit rst);
    @(negedge clk); ckpt = 1; restore = rst;
    @(negedge clk); ckpt = 0; restore = 0; since = 0;
  endtask

  initial begin
    int idx_at_ckpt;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(137, 0, 0);                 // wander off from line 0
    idx_at_ckpt = exp_idx;
    checkpoint(0);
    checks++;
    if (saved_idx !== 4'(idx_at_ckpt)) begin failures++; $display("saved index %0d, expected %0d", saved_idx, idx_at_ckpt); end
    run(300, 1, 0);                 // original execution
    checkpoint(1);                  // roll back
    exp_idx = idx_at_ckpt;
    run(300, 0, 1);                 // replay
    checks++;
    if (rec_cyc.size() != 0) begin failures++; $display("%0d recorded scrubs not repeated", rec_cyc.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
