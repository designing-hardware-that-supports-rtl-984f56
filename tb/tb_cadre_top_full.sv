// tb_cadre_top_full: one complete record-and-replay operation of cadre_top with
// every parameter at its default: a 3.3 MiB input log, one-second checkpoint
// interval, refresh every 6240 cycles and scrub every 65536. The recording, which
// starts at a forced checkpoint, lasts 70000 cycles so that refresh and scrubbing
// both happen; the periodic checkpoint (10**9 cycles) is not waited for.
// See cadre_top_tb_body.svh for what is modelled and checked.
module tb_cadre_top_full;
  localparam int P_CKPT_INTERVAL = 0;
  localparam int P_RECORD        = 70000;
  localparam int P_IO_PCT        = 2;
  localparam bit P_NEED_PERIODIC = 0;

  `include "cadre_top_tb_body.svh"

  cadre_top dut (.*);
endmodule
