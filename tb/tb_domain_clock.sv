// tb_domain_clock: self-checking test of the domain-clock counter.
// Runs the counter for 3000 cycles with checkpoint broadcasts at random times and
// compares count, mod_cnt, dom_cnt and overflow every cycle with a plain integer
// model (cycles since the last checkpoint).
module tb_domain_clock;
  localparam int unsigned W = 4;
  logic clk = 0, rst_n = 0, ckpt = 0;
  logic [1:0]  mod_cnt;
  logic [29:0] dom_cnt;
  logic        overflow;
  logic [31:0] count;
  int checks = 0, failures = 0;
  longint model = 0;
  int n_ckpt = 0;

  domain_clock #(.W(W), .DC_W(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      checks++;
      if (count !== 32'(model) || mod_cnt !== 2'(model % W) || dom_cnt !== 30'(model / W)
          || overflow !== (model % W == W - 1)) begin
        failures++;
        if (failures < 10) $display("mismatch cycle %0d: count=%0d model=%0d", i, count, model);
      end
      ckpt = ($urandom_range(0, 499) == 0);
      if (ckpt) n_ckpt++;
      @(posedge clk);
      model = ckpt ? 0 : model + 1;
      @(negedge clk);
    end
    checks++;
    if (n_ckpt == 0) begin failures++; $display("no checkpoint exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
