// cadre_top: deterministic-replay support logic of a processor-memory system.
//
// One processor chip and one memory-controller chip are joined by a
// source-synchronous link in each direction. Each link's transmitter tags its
// messages with its domain-clock count (bus_tx_tagger) and each receiver holds
// them until the last cycle they could have arrived (bus_synchronizer), so the
// processor-to-memory path is cycle-deterministic. The memory controller
// (mem_ctrl) makes refresh and scrubbing repeatable and keeps the memory undo
// log; the input log records I/O input and plays it back with the devices
// suspended; the CPU log does the same for the processor's own environmental
// events; checkpoint_ctrl times checkpoints and sequences rollback and replay.
//
// What the design leaves outside, and brings out as ports: the processor
// (cpu_*), the link wires in each direction (c2m_tx_* out and c2m_rx_* in,
// m2c_tx_* out and m2c_rx_* in; connect each *_tx to its *_rx through the
// physical channel), the DRAM (dram_*) and the I/O devices (io_*).
//
// Timing: a processor request given on cpu_req_valid is on the link the next
// cycle; a response reaches cpu_resp_valid at the processor's z_R for it.
// All blocks share clk here; the links' uncertainty is what the channel adds.
module cadre_top
  import cadre_pkg::*;
#(
  parameter int unsigned THETA1           = 1,
  parameter int unsigned THETA2           = 2,
  parameter int unsigned HQ_DEPTH         = 8,
  parameter int unsigned LINES            = 4096,
  parameter int unsigned ROWS             = 8192,
  parameter int unsigned REFRESH_INTERVAL = 6240,
  parameter int unsigned SCRUB_INTERVAL   = 65536,
  parameter int unsigned INPUT_LOG_DEPTH  = 262144,
  parameter int unsigned CPU_LOG_DEPTH    = 1024,
  parameter int unsigned CKPT_INTERVAL    = 1000000000
) (
  input  logic clk,
  input  logic rst_n,
  // checkpoint / replay control
  input  logic ckpt_force,
  input  logic replay_req,
  output logic ckpt,
  output logic replay,
  output logic run,
  output logic halt,
  output dcount_t t,
  // lookup-table programming of the two synchronizers
  input  logic             cfg_we_c2m,
  input  logic             cfg_we_m2c,
  input  logic [RHO_W-1:0] cfg_addr,
  input  logic [RHO_W-1:0] cfg_data,
  // processor
  output logic     cpu_ckpt_req,
  input  logic     cpu_ckpt_done,
  output logic     cpu_restore_req,
  input  logic     cpu_restore_done,
  input  logic     cpu_req_valid,
  input  mem_req_t cpu_req,
  output logic     cpu_resp_valid,
  output data_t    cpu_resp_data,
  input  logic       cpu_ev_valid,
  input  cpu_event_t cpu_ev,
  output logic       cpu_src_mask,
  output logic       cpu_duty_valid,
  output logic [7:0] cpu_duty_value,
  output logic       cpu_dvfs_valid,
  output logic [7:0] cpu_dvfs_value,
  output logic       cpu_therm_irq,
  output logic       cpu_ecc_irq,
  output logic [7:0] cpu_irq_info,
  // processor-to-memory link
  output logic             c2m_tx_valid,
  output mem_req_t         c2m_tx_data,
  output logic [RHO_W-1:0] c2m_tx_rho,
  input  logic             c2m_rx_valid,
  input  mem_req_t         c2m_rx_data,
  input  logic [RHO_W-1:0] c2m_rx_rho,
  // memory-to-processor link
  output logic             m2c_tx_valid,
  output data_t            m2c_tx_data,
  output logic [RHO_W-1:0] m2c_tx_rho,
  input  logic             m2c_rx_valid,
  input  data_t            m2c_rx_data,
  input  logic [RHO_W-1:0] m2c_rx_rho,
  // DRAM
  output logic      dram_cmd_valid,
  output dram_cmd_e dram_cmd,
  output addr_t     dram_addr,
  output logic [$clog2(ROWS)-1:0] dram_row,
  output data_t     dram_wdata,
  input  logic      dram_ready,
  input  logic      dram_rvalid,
  input  data_t     dram_rdata,
  // I/O devices and the system side of the input log
  input  logic       io_msg_valid,
  input  data_t      io_msg,
  input  logic       io_irq_valid,
  input  logic [7:0] io_irq_vec,
  output logic       io_clk_en,
  output logic       io_connect,
  output logic       sys_msg_valid,
  output data_t      sys_msg,
  output logic       sys_irq_valid,
  output logic [7:0] sys_irq_vec,
  // status
  output logic [3:0] err,          // {log overflow, queue overflow, sync late c2m, sync late m2c}
  output logic [$clog2(LINES+1)-1:0] mem_log_entries
);
  // ---------------- checkpoint and replay sequencing ----------------
  logic rb_start, rb_done, rb_busy;
  dcount_t recorded_len;

  checkpoint_ctrl #(.CKPT_INTERVAL(CKPT_INTERVAL), .T_W(DC_W)) u_ckpt (
    .clk, .rst_n, .ckpt_force, .replay_req,
    .cpu_ckpt_req, .cpu_ckpt_done, .cpu_restore_req, .cpu_restore_done,
    .rb_start, .rb_done,
    .ckpt, .replay, .run, .halt, .t, .recorded_len
  );

  // ---------------- processor side of the links ----------------
  dcount_t cpu_tx_count, cpu_rx_count, mc_tx_count, mc_rx_count;
  logic    late_c2m, late_m2c, ovf_c2m, ovf_m2c;

  bus_tx_tagger #(.DATA_W($bits(mem_req_t)), .RHO_W(RHO_W), .DC_W(DC_W)) u_cpu_tx (
    .clk, .rst_n, .ckpt,
    .in_valid (cpu_req_valid), .in_data (cpu_req),
    .out_valid(c2m_tx_valid), .out_data (c2m_tx_data), .out_rho (c2m_tx_rho),
    .tx_count (cpu_tx_count)
  );

  bus_synchronizer #(.DATA_W(DATA_W), .RHO_W(RHO_W), .DC_W(DC_W),
                     .THETA1(THETA1), .THETA2(THETA2), .DEPTH(HQ_DEPTH)) u_cpu_rx (
    .clk, .rst_n, .ckpt,
    .cfg_we (cfg_we_m2c), .cfg_addr, .cfg_data,
    .in_valid (m2c_rx_valid), .in_data (m2c_rx_data), .in_rho (m2c_rx_rho),
    .out_valid(cpu_resp_valid), .out_data (cpu_resp_data),
    .rx_count (cpu_rx_count), .late_err (late_m2c), .hq_overflow (ovf_m2c)
  );

  // ---------------- memory-controller side of the links ----------------
  logic     mreq_valid, mreq_pop, rq_empty, rq_full, rq_ovf;
  mem_req_t mreq_sync, mreq_head;
  logic [$clog2(HQ_DEPTH+1)-1:0] rq_count;
  logic     resp_valid;
  data_t    resp_data;

  bus_synchronizer #(.DATA_W($bits(mem_req_t)), .RHO_W(RHO_W), .DC_W(DC_W),
                     .THETA1(THETA1), .THETA2(THETA2), .DEPTH(HQ_DEPTH)) u_mc_rx (
    .clk, .rst_n, .ckpt,
    .cfg_we (cfg_we_c2m), .cfg_addr, .cfg_data,
    .in_valid (c2m_rx_valid), .in_data (c2m_rx_data), .in_rho (c2m_rx_rho),
    .out_valid(mreq_valid), .out_data (mreq_sync),
    .rx_count (mc_rx_count), .late_err (late_c2m), .hq_overflow (ovf_c2m)
  );

  // Requests wait here for the memory controller after their processing cycle.
  holding_queue #(.WIDTH($bits(mem_req_t)), .DEPTH(HQ_DEPTH)) u_req_q (
    .clk, .rst_n, .clear (ckpt),
    .push (mreq_valid), .in_entry (mreq_sync),
    .pop (mreq_pop), .head (mreq_head),
    .empty (rq_empty), .full (rq_full), .overflow (rq_ovf), .count (rq_count)
  );

  mem_ctrl #(.LINES(LINES), .ROWS(ROWS), .REFRESH_INTERVAL(REFRESH_INTERVAL),
             .SCRUB_INTERVAL(SCRUB_INTERVAL)) u_mc (
    .clk, .rst_n, .ckpt, .restore (replay), .rb_start, .rb_done, .rb_busy,
    .req_valid (!rq_empty), .req (mreq_head), .req_ready (mreq_pop),
    .resp_valid, .resp_data,
    .dram_cmd_valid, .dram_cmd, .dram_addr, .dram_row, .dram_wdata,
    .dram_ready, .dram_rvalid, .dram_rdata,
    .scrub_saved_idx (), .log_entries (mem_log_entries)
  );

  bus_tx_tagger #(.DATA_W(DATA_W), .RHO_W(RHO_W), .DC_W(DC_W)) u_mc_tx (
    .clk, .rst_n, .ckpt,
    .in_valid (resp_valid), .in_data (resp_data),
    .out_valid(m2c_tx_valid), .out_data (m2c_tx_data), .out_rho (m2c_tx_rho),
    .tx_count (mc_tx_count)
  );

  // ---------------- input log (in the memory controller) ----------------
  logic in_ovf;
  logic [$clog2(INPUT_LOG_DEPTH+1)-1:0] in_entries;

  input_log #(.DEPTH(INPUT_LOG_DEPTH), .T_W(DC_W)) u_inlog (
    .clk, .rst_n, .ckpt, .replay, .t,
    .io_msg_valid, .io_msg, .io_irq_valid, .io_irq_vec, .io_clk_en, .io_connect,
    .sys_msg_valid, .sys_msg, .sys_irq_valid, .sys_irq_vec,
    .overflow (in_ovf), .entries (in_entries)
  );

  // ---------------- CPU log ----------------
  logic cpu_ovf;
  logic [$clog2(CPU_LOG_DEPTH+1)-1:0] cpu_entries;

  cpu_log #(.DEPTH(CPU_LOG_DEPTH), .T_W(DC_W)) u_cpulog (
    .clk, .rst_n, .ckpt, .replay, .t,
    .ev_valid (cpu_ev_valid), .ev (cpu_ev),
    .src_mask (cpu_src_mask),
    .duty_valid (cpu_duty_valid), .duty_value (cpu_duty_value),
    .dvfs_valid (cpu_dvfs_valid), .dvfs_value (cpu_dvfs_value),
    .therm_irq (cpu_therm_irq), .ecc_irq (cpu_ecc_irq), .irq_info (cpu_irq_info),
    .overflow (cpu_ovf), .entries (cpu_entries)
  );

  assign err = {in_ovf || cpu_ovf, ovf_c2m || ovf_m2c || rq_ovf, late_c2m, late_m2c};
endmodule
