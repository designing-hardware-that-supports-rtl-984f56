// tb_cpu_log: self-checking test of CPU event recording and replay.
// Recording: random duty-cycle, DVFS, thermal and ECC events for 3000 cycles; the
// decoded outputs must follow the live events and src_mask must be low. Replay:
// src_mask must be high, random junk is driven on the event input, and the decoded
// outputs must repeat the recorded ones cycle for cycle. Every event kind must
// occur at least once.
module tb_cpu_log;
  import cadre_pkg::*;
  localparam int RUN = 3000;
  logic clk = 0, rst_n = 0, ckpt = 0, replay = 0;
  logic [31:0] t;
  logic ev_valid = 0;
  cpu_event_t ev = '0;
  logic src_mask, duty_valid, dvfs_valid, therm_irq, ecc_irq, overflow;
  logic [7:0] duty_value, dvfs_value, irq_info;
  logic [10:0] entries;
  int checks = 0, failures = 0;
  int kinds [4] = '{0, 0, 0, 0};
  logic [11:0] rec [RUN];

  cpu_log #(.DEPTH(1024), .T_W(32)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) t <= ckpt ? '0 : t + 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [11:0] seen();
    logic [7:0] v;
    v = duty_valid ? duty_value : dvfs_valid ? dvfs_value : (therm_irq || ecc_irq) ? irq_info : 8'h0;
    return {duty_valid, dvfs_valid, therm_irq, ecc_irq, v};
  endfunction

  task automatic checkpoint(bit rp);
    @(negedge clk); ckpt = 1; replay = rp;
    @(negedge clk); ckpt = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    checkpoint(0);
    for (int c = 0; c < RUN; c++) begin
      ev_valid = ($urandom_range(0, 99) < 3);
      ev.kind  = cpu_ev_e'($urandom_range(0, 3));
      ev.value = 8'($urandom);
      #1;
      rec[c] = seen();
      checks++;
      if (src_mask || seen() !== (ev_valid ? {ev.kind == CPU_EV_DUTY, ev.kind == CPU_EV_DVFS,
                                              ev.kind == CPU_EV_THERM, ev.kind == CPU_EV_ECC, ev.value}
                                           : 12'h0)) begin
        failures++; $display("record cycle %0d: outputs do not follow the live event", c);
      end
      if (ev_valid) kinds[ev.kind]++;
      @(negedge clk);
    end
    ev_valid = 0;
    checkpoint(1);
    for (int c = 0; c < RUN; c++) begin
      ev_valid = $urandom_range(0, 1);
      ev       = cpu_event_t'($urandom);
      #1;
      checks++;
      if (!src_mask || seen() !== rec[c]) begin
        failures++;
        if (failures < 10) $display("replay cycle %0d differs", c);
      end
      @(negedge clk);
    end
    foreach (kinds[k]) begin
      checks++;
      if (kinds[k] == 0) begin failures++; $display("event kind %0d never occurred", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
