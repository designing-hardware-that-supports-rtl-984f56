// input_log: record and replay of everything the I/O devices deliver.
//
// I/O devices cannot be made deterministic, so their input is logged instead.
// This buffer sits in the memory controller between the I/O side and the rest of
// the system. While recording, the system sees the live I/O messages and
// interrupts, and every cycle that carries one is stored with its cycle count
// since the checkpoint. While replaying, the devices are suspended: io_clk_en
// drops to gate their clock and io_connect drops to disconnect them from the data
// bus, and the log reproduces the messages and interrupts at their original cycles.
//
// Interface: io_* come from the devices; sys_* go to the system and are
// combinational (live input, or the log entry due this cycle). ckpt/replay/t as
// for replay_log. The default depth of 2**18 entries of 106 bits (about 3.3 MiB of
// SRAM) is this design's reading of "a few MB"; one entry per cycle with I/O
// activity, holding at most one message and one interrupt, is also its choice.
module input_log
  import cadre_pkg::*;
#(
  parameter int unsigned DEPTH = 262144,
  parameter int unsigned T_W   = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ckpt,
  input  logic           replay,
  input  logic [T_W-1:0] t,
  // from the I/O devices
  input  logic           io_msg_valid,
  input  data_t          io_msg,
  input  logic           io_irq_valid,
  input  logic [7:0]     io_irq_vec,
  output logic           io_clk_en,
  output logic           io_connect,
  // to the system
  output logic           sys_msg_valid,
  output data_t          sys_msg,
  output logic           sys_irq_valid,
  output logic [7:0]     sys_irq_vec,
  output logic           overflow,
  output logic [$clog2(DEPTH+1)-1:0] entries
);
  io_event_t live, played;
  logic      play_valid;

  always_comb begin
    live.msg_valid = io_msg_valid;
    live.msg       = io_msg;
    live.irq_valid = io_irq_valid;
    live.irq_vec   = io_irq_vec;
  end

  replay_log #(.PAYLOAD_W($bits(io_event_t)), .DEPTH(DEPTH), .T_W(T_W)) u_log (
    .clk, .rst_n, .ckpt, .replay, .t,
    .rec_valid   (io_msg_valid || io_irq_valid),
    .rec_payload (live),
    .play_valid,
    .play_payload(played),
    .overflow, .entries
  );

  assign io_clk_en  = !replay;
  assign io_connect = !replay;

  always_comb begin
    if (replay) begin
      sys_msg_valid = play_valid && played.msg_valid;
      sys_msg       = played.msg;
      sys_irq_valid = play_valid && played.irq_valid;
      sys_irq_vec   = played.irq_vec;
    end else begin
      sys_msg_valid = io_msg_valid;
      sys_msg       = io_msg;
      sys_irq_valid = io_irq_valid;
      sys_irq_vec   = io_irq_vec;
    end
  end
endmodule
