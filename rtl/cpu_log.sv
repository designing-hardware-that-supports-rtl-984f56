// cpu_log: record and replay of a processor's internal nondeterministic events.
//
// Some events inside a processor depend on the environment rather than on its
// inputs: clock duty-cycle modulation and voltage-frequency changes driven by
// power and temperature management, thermal emergencies, and ECC failures caused
// by soft errors. The CPU log records each such event with its cycle count since
// the checkpoint. During a replay the processor's own sources of these events are
// masked (src_mask) and the log delivers the recorded events at their original
// cycles instead.
//
// Interface: ev_valid/ev come from the processor's management and error logic;
// the decoded outputs (duty_*, dvfs_*, therm_irq, ecc_irq) are what the processor
// acts on, combinational from the live event or the log. One event per cycle.
// The four event kinds are those the document lists; the 8-bit event value, the
// encoding and the depth are this design's choices.
module cpu_log
  import cadre_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned T_W   = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ckpt,
  input  logic           replay,
  input  logic [T_W-1:0] t,
  input  logic           ev_valid,
  input  cpu_event_t     ev,
  output logic           src_mask,
  output logic           duty_valid,
  output logic [7:0]     duty_value,
  output logic           dvfs_valid,
  output logic [7:0]     dvfs_value,
  output logic           therm_irq,
  output logic           ecc_irq,
  output logic [7:0]     irq_info,
  output logic           overflow,
  output logic [$clog2(DEPTH+1)-1:0] entries
);
  cpu_event_t played, cur;
  logic       play_valid, cur_valid;

  replay_log #(.PAYLOAD_W($bits(cpu_event_t)), .DEPTH(DEPTH), .T_W(T_W)) u_log (
    .clk, .rst_n, .ckpt, .replay, .t,
    .rec_valid   (ev_valid),
    .rec_payload (ev),
    .play_valid,
    .play_payload(played),
    .overflow, .entries
  );

  assign src_mask  = replay;
  assign cur_valid = replay ? play_valid : ev_valid;
  assign cur       = replay ? played : ev;

  always_comb begin
    duty_valid = cur_valid && (cur.kind == CPU_EV_DUTY);
    dvfs_valid = cur_valid && (cur.kind == CPU_EV_DVFS);
    therm_irq  = cur_valid && (cur.kind == CPU_EV_THERM);
    ecc_irq    = cur_valid && (cur.kind == CPU_EV_ECC);
    duty_value = cur.value;
    dvfs_value = cur.value;
    irq_info   = cur.value;
  end
endmodule
