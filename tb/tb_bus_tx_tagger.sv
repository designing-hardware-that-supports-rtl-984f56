// tb_bus_tx_tagger: self-checking test of the transmitter tag generator.
// Sends random messages and checks that each appears on the bus one cycle later
// with its data and with rho equal to the transmitter's count modulo W, where the
// count is modelled independently as cycles since the last checkpoint.
module tb_bus_tx_tagger;
  logic clk = 0, rst_n = 0, ckpt = 0;
  logic in_valid = 0;
  logic [15:0] in_data = 0;
  logic out_valid;
  logic [15:0] out_data;
  logic [1:0]  out_rho;
  logic [31:0] tx_count;
  int checks = 0, failures = 0;
  longint model = 0;
  logic        exp_valid = 0;
  logic [15:0] exp_data = 0;

  bus_tx_tagger #(.DATA_W(16), .RHO_W(2), .DC_W(32)) dut (.*);

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
    for (int i = 0; i < 2000; i++) begin
      checks++;
      if (out_valid !== exp_valid || tx_count !== 32'(model)
          || (exp_valid && (out_data !== exp_data || out_rho !== 2'(model % 4)))) begin
        failures++;
        if (failures < 10) $display("cycle %0d: v=%b d=%h rho=%0d cnt=%0d exp v=%b d=%h model=%0d",
                                    i, out_valid, out_data, out_rho, tx_count, exp_valid, exp_data, model);
      end
      in_valid = $urandom_range(0, 1);
      in_data  = 16'($urandom);
      ckpt     = ($urandom_range(0, 299) == 0);
      @(posedge clk);
      exp_valid = in_valid;
      exp_data  = in_data;
      model     = ckpt ? 0 : model + 1;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
