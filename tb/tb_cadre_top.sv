// tb_cadre_top: end-to-end record and replay of the whole design at reduced
// sizes (checkpoint every 3000 cycles, refresh every 50, scrub every 40, small
// logs). See cadre_top_tb_body.svh for what is modelled and checked.
module tb_cadre_top;
  localparam int P_CKPT_INTERVAL = 3000;
  localparam int P_RECORD        = 1500;
  localparam int P_IO_PCT        = 4;
  localparam bit P_NEED_PERIODIC = 1;

  `include "cadre_top_tb_body.svh"

  cadre_top #(
    .ROWS(8192), .REFRESH_INTERVAL(50), .SCRUB_INTERVAL(40),
    .INPUT_LOG_DEPTH(1024), .CPU_LOG_DEPTH(256), .CKPT_INTERVAL(P_CKPT_INTERVAL)
  ) dut (.*);
endmodule
