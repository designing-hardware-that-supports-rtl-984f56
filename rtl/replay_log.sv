// replay_log: time-stamped event log shared by the input log and the CPU log.
//
// While recording, every cycle with rec_valid appends {t, rec_payload} to an
// array of DEPTH entries, where t is the cycle count since the last checkpoint.
// While replaying, the entries are read back in order, and each is presented on
// play_valid/play_payload in the cycle whose t equals its time stamp, so the
// consumer sees exactly the events of the original run at exactly their cycles.
//
// A checkpoint broadcast taken while recording (ckpt && !replay) empties the log;
// one taken while replaying rewinds the read pointer to the first entry and keeps
// the recorded entries. An append to a full log is dropped and sets the sticky
// overflow flag, after which a replay is no longer exact.
// Interface timing: appends happen at the clock edge; play_* is combinational
// from the read pointer and t. The array has an asynchronous read port.
module replay_log #(
  parameter int unsigned PAYLOAD_W = 8,
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned T_W       = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ckpt,
  input  logic                 replay,
  input  logic [T_W-1:0]       t,
  input  logic                 rec_valid,
  input  logic [PAYLOAD_W-1:0] rec_payload,
  output logic                 play_valid,
  output logic [PAYLOAD_W-1:0] play_payload,
  output logic                 overflow,
  output logic [$clog2(DEPTH+1)-1:0] entries
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic [T_W-1:0]       stamp;
    logic [PAYLOAD_W-1:0] payload;
  } entry_t;

  entry_t        mem [DEPTH];
  logic [CW-1:0] rd_ptr;
  entry_t        rd_entry;
  logic          do_append;

  assign rd_entry     = mem[PW'(rd_ptr)];
  assign play_valid   = replay && !ckpt && (rd_ptr < entries) && (rd_entry.stamp == t);
  assign play_payload = rd_entry.payload;
  assign do_append    = !replay && !ckpt && rec_valid && (entries < CW'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entries  <= '0;
      rd_ptr   <= '0;
      overflow <= 1'b0;
    end else if (ckpt) begin
      rd_ptr <= '0;
      if (!replay) begin
        entries  <= '0;
        overflow <= 1'b0;
      end
    end else begin
      if (do_append) entries <= entries + 1'b1;
      if (!replay && rec_valid && !do_append) overflow <= 1'b1;
      if (play_valid) rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_append) mem[PW'(entries)] <= entry_t'{stamp: t, payload: rec_payload};
  end
endmodule
