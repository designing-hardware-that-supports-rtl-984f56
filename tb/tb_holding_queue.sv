// tb_holding_queue: self-checking test of the holding queue.
// Random pushes and pops against a SystemVerilog queue model: head, empty, full,
// count and the overflow flag are compared every cycle; the test makes the queue
// fill, overflow and drain.
module tb_holding_queue;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0;
  logic [7:0] in_entry = 0, head;
  logic empty, full, overflow;
  logic [2:0] count;
  int checks = 0, failures = 0, n_full = 0, n_ovf = 0;
  logic [7:0] model[$];
  logic model_ovf = 0;

  holding_queue #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty !== (model.size() == 0) || full !== (model.size() == DEPTH)
          || count !== 3'(model.size()) || overflow !== model_ovf
          || (model.size() > 0 && head !== model[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: size=%0d count=%0d head=%h", i, model.size(), count, head);
      end
      if (full) n_full++;
      // phases: mostly push, then mostly pop
      push     = ($urandom_range(0, 99) < (((i / 200) % 2 == 0) ? 70 : 30));
      pop      = ($urandom_range(0, 99) < (((i / 200) % 2 == 0) ? 30 : 70));
      in_entry = 8'($urandom);
      clear    = ($urandom_range(0, 999) == 0);
      @(posedge clk);
      if (clear) begin
        model.delete();
        model_ovf = 0;
      end else begin
        logic popped;
        popped = pop && model.size() > 0;
        if (push && (model.size() < DEPTH || popped)) begin
          if (popped) void'(model.pop_front());
          model.push_back(in_entry);
        end else begin
          if (push) begin model_ovf = 1; n_ovf++; end
          if (popped) void'(model.pop_front());
        end
      end
    end
    checks++;
    if (n_full == 0 || n_ovf == 0) begin failures++; $display("full/overflow not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
