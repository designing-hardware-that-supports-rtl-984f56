// memory_log: undo log of main memory for rollback to the last checkpoint.
//
// After a checkpoint, the first time a memory line is about to be overwritten its
// old value is saved in the log, together with its address. Rolling back then
// means writing the saved values back, newest first, which returns memory to its
// state at the checkpoint. A bit per line records whether the line has already
// been logged in this interval; the checkpoint broadcast clears all the bits and
// empties the log.
//
// Because a line is logged at most once per interval, LINES entries are always
// enough, so the log cannot overflow. The document places the log in DRAM; here it
// is an array of its own, sized to the memory.
//
// Interface (to the memory controller):
//   chk_addr -> need_log : combinational, 1 if a write to chk_addr must be logged first.
//   push, push_addr, push_data : append an entry and mark the line logged.
//   rb_start : begin rollback (one cycle). The log then presents entries on
//   rb_valid/rb_addr/rb_data, newest first, each consumed by rb_ready; rb_done
//   pulses after the last one, and the log is then empty and all bits clear.
// Timing: push and rb_start are taken at the clock edge; rollback emits at most
// one entry per cycle.
module memory_log #(
  parameter int unsigned LINES  = 4096,
  parameter int unsigned DATA_W = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ckpt,
  input  logic [$clog2(LINES)-1:0] chk_addr,
  output logic need_log,
  input  logic push,
  input  logic [$clog2(LINES)-1:0] push_addr,
  input  logic [DATA_W-1:0] push_data,
  input  logic rb_start,
  output logic rb_valid,
  output logic [$clog2(LINES)-1:0] rb_addr,
  output logic [DATA_W-1:0] rb_data,
  input  logic rb_ready,
  output logic rb_done,
  output logic [$clog2(LINES+1)-1:0] entries
);
  localparam int unsigned AW = $clog2(LINES);
  localparam int unsigned CW = $clog2(LINES + 1);

  typedef struct packed {
    logic [AW-1:0]     addr;
    logic [DATA_W-1:0] data;
  } log_entry_t;

  logic [LINES-1:0] logged;
  log_entry_t       log_mem [LINES];
  logic             rolling;
  log_entry_t       rb_entry;

  assign need_log = !logged[chk_addr];
  assign rb_valid = rolling && (entries != '0);
  assign rb_entry = log_mem[AW'(entries - 1'b1)];
  assign rb_addr  = rb_entry.addr;
  assign rb_data  = rb_entry.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      logged  <= '0;
      entries <= '0;
      rolling <= 1'b0;
      rb_done <= 1'b0;
    end else begin
      rb_done <= 1'b0;
      if (ckpt) begin
        logged  <= '0;
        entries <= '0;
        rolling <= 1'b0;
      end else if (rolling) begin
        if (entries == '0) begin
          rolling <= 1'b0;
          rb_done <= 1'b1;
          logged  <= '0;
        end else if (rb_ready) begin
          entries <= entries - 1'b1;
        end
      end else if (rb_start) begin
        rolling <= 1'b1;
      end else if (push && !logged[push_addr]) begin
        logged[push_addr] <= 1'b1;
        entries           <= entries + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rolling && !rb_start && !ckpt && push && !logged[push_addr])
      log_mem[AW'(entries)] <= log_entry_t'{addr: push_addr, data: push_data};
  end

  assert property (@(posedge clk) disable iff (!rst_n) push |-> !rolling);
  assert property (@(posedge clk) disable iff (!rst_n) entries <= CW'(LINES));
endmodule
