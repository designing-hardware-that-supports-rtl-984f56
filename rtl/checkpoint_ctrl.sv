// checkpoint_ctrl: checkpoint timer and record/replay sequencer.
//
// Recording: every CKPT_INTERVAL cycles (or at once on ckpt_force) a checkpoint is
// taken. The processors are asked (cpu_ckpt_req) to write back and invalidate
// their caches and TLBs, save their registers and execute their deterministic
// reset; when they report cpu_ckpt_done, the one-cycle broadcast ckpt goes to
// every block: domain-clock counters, refresh and scrub logic, memory log, input
// and CPU logs. The count t of cycles since the checkpoint is the time base of
// the logs.
//
// Replaying (replay_req, taken while recording or while halted after a replay):
// the memory log rolls memory back (rb_start .. rb_done), the processors restore
// the checkpointed registers and reset again (cpu_restore_req .. done), and a
// broadcast with replay = 1 restarts every block from the checkpoint, the logs
// playing back instead of recording. When t reaches the length of the recorded
// interval the machine halts (halt) in exactly the state the original run had when
// the replay was requested, for inspection; it can be replayed again or resume
// recording with ckpt_force.
//
// run is high while the machine executes (recording or replaying); outside it
// the processors must hold off. The one-second interval follows the document; the
// 1 GHz clock behind the default count, the handshakes and the halt at the end of
// a replay are this design's choices.
module checkpoint_ctrl #(
  parameter int unsigned CKPT_INTERVAL = 1000000000,
  parameter int unsigned T_W           = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ckpt_force,
  input  logic           replay_req,
  output logic           cpu_ckpt_req,
  input  logic           cpu_ckpt_done,
  output logic           cpu_restore_req,
  input  logic           cpu_restore_done,
  output logic           rb_start,
  input  logic           rb_done,
  output logic           ckpt,
  output logic           replay,
  output logic           run,
  output logic           halt,
  output logic [T_W-1:0] t,
  output logic [T_W-1:0] recorded_len
);
  typedef enum logic [2:0] {
    S_RECORD, S_CPU_CKPT, S_BCAST, S_ROLLBACK, S_CPU_RESTORE, S_BCAST_REPLAY,
    S_REPLAY, S_HALT
  } state_e;

  state_e state;
  logic   rb_pending;

  assign cpu_ckpt_req    = (state == S_CPU_CKPT);
  assign cpu_restore_req = (state == S_CPU_RESTORE);
  assign ckpt            = (state == S_BCAST) || (state == S_BCAST_REPLAY);
  assign run             = (state == S_RECORD) || (state == S_REPLAY);
  assign halt            = (state == S_HALT);
  assign rb_start        = (state == S_ROLLBACK) && rb_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // Power-on behaves as a checkpoint request: nothing runs before the first one.
      state        <= S_CPU_CKPT;
      replay       <= 1'b0;
      t            <= '0;
      recorded_len <= '0;
      rb_pending   <= 1'b0;
    end else begin
      unique case (state)
        S_RECORD: begin
          t <= t + 1'b1;
          if (replay_req) begin
            recorded_len <= t + 1'b1;
            rb_pending   <= 1'b1;
            state        <= S_ROLLBACK;
          end else if (ckpt_force || t == T_W'(CKPT_INTERVAL - 1)) begin
            state <= S_CPU_CKPT;
          end
        end
        S_CPU_CKPT: begin
          replay <= 1'b0;
          if (cpu_ckpt_done) state <= S_BCAST;
        end
        S_BCAST: begin
          t     <= '0;
          state <= S_RECORD;
        end
        S_ROLLBACK: begin
          rb_pending <= 1'b0;
          if (rb_done) state <= S_CPU_RESTORE;
        end
        S_CPU_RESTORE: if (cpu_restore_done) begin
          replay <= 1'b1;
          state  <= S_BCAST_REPLAY;
        end
        S_BCAST_REPLAY: begin
          t     <= '0;
          state <= (recorded_len == '0) ? S_HALT : S_REPLAY;
        end
        S_REPLAY: begin
          t <= t + 1'b1;
          if (t + 1'b1 == recorded_len) state <= S_HALT;
        end
        S_HALT: begin
          if (replay_req) begin
            rb_pending <= 1'b1;
            state      <= S_ROLLBACK;
          end else if (ckpt_force) begin
            state <= S_CPU_CKPT;
          end
        end
        default: state <= S_RECORD;
      endcase
    end
  end
endmodule
