// mem_ctrl: deterministic memory controller.
//
// Schedules host reads and writes, DRAM refresh, memory scrubbing and memory
// logging onto one DRAM command port, one command at a time. Its three
// replay-related parts are instantiated here:
//   * refresh_ctrl, cleared by the checkpoint broadcast, so refreshes repeat;
//   * scrubber, whose line index is saved at a checkpoint and restored at the
//     checkpoint that starts a replay;
//   * memory_log: before the first write to a line after a checkpoint the
//     controller reads the old value and logs it; on rb_start the log is written
//     back newest first to roll memory back to the checkpoint.
// Given the same inputs at the same cycles, every command goes out at the same
// cycle in a replay as in the original run.
//
// Priority when idle: rollback write-back, refresh, host request, scrub.
// Host port: req_valid/req held until req_ready, which pulses when a write has
// been issued to the DRAM or when a read's data returns (resp_valid with
// resp_data in that same cycle; resp_data is dram_rdata passed straight through,
// with no register). DRAM port: a command is taken when
// dram_cmd_valid && dram_ready; read data returns later on dram_rvalid/dram_rdata
// (any latency). A host write to an unlogged line costs one extra DRAM read.
// From rb_start until the next checkpoint broadcast (rb_busy) host requests and
// scrubs are held back: requests still queued from the abandoned execution must
// not reach memory after it has been rolled back.
// The single-outstanding-command schedule and the priorities are this design's
// choices; the document describes what the controller does, not how.
module mem_ctrl
  import cadre_pkg::*;
#(
  parameter int unsigned LINES            = 4096,
  parameter int unsigned ROWS             = 8192,
  parameter int unsigned REFRESH_INTERVAL = 6240,
  parameter int unsigned SCRUB_INTERVAL   = 65536
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ckpt,
  input  logic restore,
  input  logic rb_start,
  output logic rb_done,
  output logic rb_busy,
  // host side
  input  logic     req_valid,
  input  mem_req_t req,
  output logic     req_ready,
  output logic     resp_valid,
  output data_t    resp_data,
  // DRAM side
  output logic      dram_cmd_valid,
  output dram_cmd_e dram_cmd,
  output addr_t     dram_addr,
  output logic [$clog2(ROWS)-1:0] dram_row,
  output data_t     dram_wdata,
  input  logic      dram_ready,
  input  logic      dram_rvalid,
  input  data_t     dram_rdata,
  // observation
  output logic [$clog2(LINES)-1:0] scrub_saved_idx,
  output logic [$clog2(LINES+1)-1:0] log_entries
);
  localparam int unsigned RW = $clog2(ROWS);

  typedef enum logic [1:0] {S_IDLE, S_WAIT_OLD, S_DO_WR, S_WAIT_RD} state_e;
  state_e state;

  logic ref_req, ref_ack;
  logic [RW-1:0] ref_row;
  logic scr_req, scr_ack;
  addr_t scr_addr;

  refresh_ctrl #(.REFRESH_INTERVAL(REFRESH_INTERVAL), .ROWS(ROWS)) u_ref (
    .clk, .rst_n, .ckpt, .ack(ref_ack), .req(ref_req), .row(ref_row)
  );

  scrubber #(.LINES(LINES), .SCRUB_INTERVAL(SCRUB_INTERVAL)) u_scr (
    .clk, .rst_n, .ckpt, .restore, .ack(scr_ack), .req(scr_req), .addr(scr_addr),
    .saved_idx(scrub_saved_idx)
  );

  logic  need_log, log_push;
  logic  rb_valid, rb_ready;
  addr_t rb_addr;
  data_t rb_data;

  memory_log #(.LINES(LINES), .DATA_W(DATA_W)) u_log (
    .clk, .rst_n, .ckpt,
    .chk_addr (req.addr), .need_log,
    .push (log_push), .push_addr (req.addr), .push_data (dram_rdata),
    .rb_start, .rb_valid, .rb_addr, .rb_data, .rb_ready, .rb_done,
    .entries (log_entries)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        rb_busy <= 1'b0;
    else if (ckpt)     rb_busy <= 1'b0;
    else if (rb_start) rb_busy <= 1'b1;
  end

  // ---------------- command selection ----------------
  always_comb begin
    dram_cmd_valid = 1'b0;
    dram_cmd       = DRAM_RD;
    // Idle command fields are zero, so that stale queue contents never reach pins.
    dram_addr      = '0;
    dram_row       = ref_row;
    dram_wdata     = '0;
    ref_ack        = 1'b0;
    scr_ack        = 1'b0;
    rb_ready       = 1'b0;
    req_ready      = 1'b0;
    log_push       = 1'b0;
    resp_valid     = 1'b0;
    resp_data      = dram_rdata;
    unique case (state)
      S_IDLE: begin
        if (rb_valid) begin
          dram_cmd_valid = 1'b1;
          dram_cmd       = DRAM_WR;
          dram_addr      = rb_addr;
          dram_wdata     = rb_data;
          rb_ready       = dram_ready;
        end else if (ref_req) begin
          dram_cmd_valid = 1'b1;
          dram_cmd       = DRAM_REF;
          ref_ack        = dram_ready;
        end else if (req_valid && !rb_busy) begin
          dram_cmd_valid = 1'b1;
          dram_addr      = req.addr;
          if (req.we && !need_log) begin
            dram_cmd   = DRAM_WR;
            dram_wdata = req.wdata;
            req_ready = dram_ready;
          end else begin
            dram_cmd  = DRAM_RD;
          end
        end else if (scr_req && !rb_busy) begin
          dram_cmd_valid = 1'b1;
          dram_cmd       = DRAM_SCRUB;
          dram_addr      = scr_addr;
          scr_ack        = dram_ready;
        end
      end
      S_WAIT_OLD: log_push = dram_rvalid;
      S_DO_WR: begin
        dram_cmd_valid = 1'b1;
        dram_cmd       = DRAM_WR;
        dram_addr      = req.addr;
        dram_wdata     = req.wdata;
        req_ready      = dram_ready;
      end
      S_WAIT_RD: begin
        resp_valid = dram_rvalid;
        req_ready  = dram_rvalid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_IDLE;
    else begin
      unique case (state)
        S_IDLE:
          if (!rb_valid && !ref_req && req_valid && !rb_busy && dram_ready
              && !(req.we && !need_log))
            state <= req.we ? S_WAIT_OLD : S_WAIT_RD;
        S_WAIT_OLD: if (dram_rvalid) state <= S_DO_WR;
        S_DO_WR:    if (dram_ready)  state <= S_IDLE;
        S_WAIT_RD:  if (dram_rvalid) state <= S_IDLE;
        default:    state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready && !ckpt |=> req_valid && $stable(req));
endmodule
