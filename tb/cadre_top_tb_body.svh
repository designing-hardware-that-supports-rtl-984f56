// Body shared by the end-to-end testbenches of cadre_top.
//
// The including module defines, before the include, the localparams
//   P_CKPT_INTERVAL, P_RECORD, P_IO_PCT, P_NEED_PERIODIC
// and instantiates cadre_top as "dut" with .* after it.
//
// Around the design it models what the design leaves outside:
//   * a processor: a small deterministic machine (LFSR and accumulator) that
//     issues reads and writes to 64 lines, folds every response, I/O message,
//     interrupt and CPU-log event into its accumulator, checks read data against
//     its own copy of memory, and saves / restores its registers on the
//     checkpoint handshakes;
//   * the two links: in-order channels with a random delay of THETA1..THETA2
//     cycles, drawn afresh in every run;
//   * a DRAM with a three-cycle read latency;
//   * I/O devices and the processor's environmental events, random.
// Test: record from a checkpoint, request a replay, replay twice, and check that
// each replay shows the processor and the DRAM exactly what the recording did,
// cycle for cycle, and leaves the processor in the same state. Each mechanism
// (periodic checkpoint, forced checkpoint, link message held by a synchronizer,
// message processed on arrival, memory-log rollback, refresh, scrub, I/O replay
// with devices gated, CPU-log replay, halt) is counted and must occur.

  import cadre_pkg::*;

  localparam int THETA1 = 1, THETA2 = 2, USED = 64;

  logic clk = 0, rst_n = 0;
  logic ckpt_force = 0, replay_req = 0;
  logic ckpt, replay, run, halt;
  dcount_t t;
  logic cfg_we_c2m = 0, cfg_we_m2c = 0;
  logic [RHO_W-1:0] cfg_addr = '0, cfg_data = '0;
  logic cpu_ckpt_req, cpu_ckpt_done = 0, cpu_restore_req, cpu_restore_done = 0;
  logic cpu_req_valid = 0;
  mem_req_t cpu_req = '0;
  logic cpu_resp_valid;
  data_t cpu_resp_data;
  logic cpu_ev_valid = 0;
  cpu_event_t cpu_ev = '0;
  logic cpu_src_mask, cpu_duty_valid, cpu_dvfs_valid, cpu_therm_irq, cpu_ecc_irq;
  logic [7:0] cpu_duty_value, cpu_dvfs_value, cpu_irq_info;
  logic c2m_tx_valid, c2m_rx_valid = 0;
  mem_req_t c2m_tx_data, c2m_rx_data = '0;
  logic [RHO_W-1:0] c2m_tx_rho, c2m_rx_rho = '0;
  logic m2c_tx_valid, m2c_rx_valid = 0;
  data_t m2c_tx_data, m2c_rx_data = '0;
  logic [RHO_W-1:0] m2c_tx_rho, m2c_rx_rho = '0;
  logic dram_cmd_valid;
  dram_cmd_e dram_cmd;
  addr_t dram_addr;
  logic [12:0] dram_row;
  data_t dram_wdata;
  logic dram_ready = 1, dram_rvalid = 0;
  data_t dram_rdata = '0;
  logic io_msg_valid = 0, io_irq_valid = 0;
  data_t io_msg = '0;
  logic [7:0] io_irq_vec = 0;
  logic io_clk_en, io_connect, sys_msg_valid, sys_irq_valid;
  data_t sys_msg;
  logic [7:0] sys_irq_vec;
  logic [3:0] err;
  logic [12:0] mem_log_entries;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // ---------------- mechanism counters ----------------
  int n_periodic = 0, n_forced = 0, n_held = 0, n_direct = 0, n_rollback_lines = 0;
  int n_refresh = 0, n_scrub = 0, n_io_replayed = 0, n_cpu_ev_replayed = 0, n_gated = 0;
  int n_halt = 0, n_reads_checked = 0, n_power_on = 0;
  bit force_pending = 0;

  // ---------------- processor model ----------------
  typedef struct {
    logic [31:0] lfsr;
    logic [63:0] acc;
  } cpu_regs_t;
  cpu_regs_t regs, saved_regs;
  data_t arch_mem [USED], saved_mem [USED];
  data_t expect_rd [$];
  int    idle_cycles = 0;

  function automatic logic [31:0] lfsr_next(logic [31:0] x);
    return {x[30:0], x[31] ^ x[21] ^ x[1] ^ x[0]};
  endfunction

  always @(posedge clk) begin
    cpu_req_valid <= 0;
    cpu_ckpt_done <= 0;
    cpu_restore_done <= 0;
    // responses are taken while running and while draining for a checkpoint
    if (rst_n && (run || cpu_ckpt_req) && cpu_resp_valid) begin
        checks++;
        n_reads_checked++;
        if (expect_rd.size() == 0 || cpu_resp_data !== expect_rd[0]) begin
          failures++;
          if (failures < 10) $display("t=%0d read returned %h", t, cpu_resp_data);
        end
        if (expect_rd.size() > 0) void'(expect_rd.pop_front());
        regs.acc = regs.acc * 31 + cpu_resp_data;
    end
    if (rst_n && run) begin
      if (sys_msg_valid) regs.acc = regs.acc ^ sys_msg;
      if (sys_irq_valid) regs.acc = regs.acc + 64'(sys_irq_vec);
      if (cpu_duty_valid) regs.acc = regs.acc + (64'(cpu_duty_value) << 8);
      if (cpu_dvfs_valid) regs.acc = regs.acc + (64'(cpu_dvfs_value) << 16);
      if (cpu_therm_irq || cpu_ecc_irq) regs.acc = regs.acc + (64'(cpu_irq_info) << 24);
      // next request
      regs.lfsr = lfsr_next(regs.lfsr);
      if (regs.lfsr[3:0] < 5 && expect_rd.size() < 4) begin
        mem_req_t r;
        r.we    = regs.lfsr[4];
        r.addr  = addr_t'(regs.lfsr[15:8] % USED);
        r.wdata = regs.acc;
        if (r.we) arch_mem[r.addr] = r.wdata;
        else      expect_rd.push_back(arch_mem[r.addr]);
        cpu_req_valid <= 1;
        cpu_req       <= r;
      end
    end
    // checkpoint handshakes: drain, then save (the deterministic reset clears the rest)
    if (rst_n && cpu_ckpt_req) begin
      idle_cycles++;
      if (idle_cycles > 20 && expect_rd.size() == 0) begin
        saved_regs = regs;
        foreach (arch_mem[i]) saved_mem[i] = arch_mem[i];
        cpu_ckpt_done <= 1;
        idle_cycles = 0;
      end
    end
    if (rst_n && cpu_restore_req) begin
      regs = saved_regs;
      foreach (arch_mem[i]) arch_mem[i] = saved_mem[i];
      expect_rd.delete();
      cpu_restore_done <= 1;
    end
  end

  // ---------------- links ----------------
  typedef struct { longint arrive; longint due; logic [127:0] data; logic [RHO_W-1:0] rho; } flight_t;
  flight_t c2m_q[$], m2c_q[$];
  longint c2m_last = -1, m2c_last = -1;

  function automatic longint pick_arrival(longint sent, ref longint last);
    longint a;
    a = sent + THETA1 + $urandom_range(0, THETA2 - THETA1);
    if (a <= last) a = last + 1;
    last = a;
    return a;
  endfunction

  always @(posedge clk) begin
    longint cur;
    cur = cyc;
    cyc = cyc + 1;
    c2m_rx_valid <= 0;
    m2c_rx_valid <= 0;
    if (ckpt) begin
      c2m_q.delete(); m2c_q.delete(); c2m_last = -1; m2c_last = -1;
    end
    if (c2m_tx_valid) begin
      flight_t f;
      f.arrive = pick_arrival(cur, c2m_last); f.due = cur + THETA2;
      f.data = 128'(c2m_tx_data); f.rho = c2m_tx_rho;
      c2m_q.push_back(f);
    end
    if (m2c_tx_valid) begin
      flight_t f;
      f.arrive = pick_arrival(cur, m2c_last); f.due = cur + THETA2;
      f.data = 128'(m2c_tx_data); f.rho = m2c_tx_rho;
      m2c_q.push_back(f);
    end
    if (c2m_q.size() > 0 && c2m_q[0].arrive == cur + 1) begin
      flight_t f;
      f = c2m_q.pop_front();
      if (f.arrive == f.due) n_direct++; else n_held++;
      c2m_rx_valid <= 1; c2m_rx_data <= mem_req_t'(f.data); c2m_rx_rho <= f.rho;
    end
    if (m2c_q.size() > 0 && m2c_q[0].arrive == cur + 1) begin
      flight_t f;
      f = m2c_q.pop_front();
      if (f.arrive == f.due) n_direct++; else n_held++;
      m2c_rx_valid <= 1; m2c_rx_data <= data_t'(f.data); m2c_rx_rho <= f.rho;
    end
  end

  // ---------------- DRAM ----------------
  data_t  dram [USED];
  longint rd_at = -1;
  data_t  rd_val;
  always @(posedge clk) begin
    dram_rvalid <= 0;
    if (rst_n && dram_cmd_valid && dram_ready) begin
      unique case (dram_cmd)
        DRAM_RD:    begin rd_at = cyc + 1; rd_val = dram[dram_addr % USED]; end
        DRAM_WR:    begin dram[dram_addr % USED] = dram_wdata; if (!run) n_rollback_lines++; end
        DRAM_REF:   n_refresh++;
        DRAM_SCRUB: n_scrub++;
      endcase
    end
    if (rd_at == cyc) begin dram_rvalid <= 1; dram_rdata <= rd_val; end
  end

  // ---------------- I/O devices and processor events ----------------
  always @(posedge clk) begin
    int pct;
    pct = replay ? 50 : P_IO_PCT;     // junk while replaying: it must be ignored
    io_msg_valid <= ($urandom_range(0, 99) < pct);
    io_irq_valid <= ($urandom_range(0, 199) < pct);
    io_msg       <= {$urandom, $urandom};
    io_irq_vec   <= 8'($urandom);
    cpu_ev_valid <= ($urandom_range(0, 299) < pct);
    cpu_ev       <= cpu_event_t'($urandom);
  end

  // ---------------- traces ----------------
  typedef struct packed {
    logic      resp_v;  data_t resp;
    logic      msg_v;   data_t msg;
    logic      irq_v;   logic [7:0] irq;
    logic [3:0] ev_v;   logic [7:0] ev;
    logic      cmd_v;   dram_cmd_e cmd; addr_t addr; logic [12:0] row; data_t wdata;
  } obs_t;
  obs_t rec_trace[$], rep_trace[$];

  function automatic obs_t observe();
    obs_t o;
    o = '0;
    o.resp_v = cpu_resp_valid; if (cpu_resp_valid) o.resp = cpu_resp_data;
    o.msg_v  = sys_msg_valid;  if (sys_msg_valid) o.msg = sys_msg;
    o.irq_v  = sys_irq_valid;  if (sys_irq_valid) o.irq = sys_irq_vec;
    o.ev_v   = {cpu_duty_valid, cpu_dvfs_valid, cpu_therm_irq, cpu_ecc_irq};
    if (o.ev_v != 0) o.ev = cpu_duty_valid ? cpu_duty_value : cpu_dvfs_valid ? cpu_dvfs_value : cpu_irq_info;
    o.cmd_v  = dram_cmd_valid;
    if (dram_cmd_valid) begin
      o.cmd = dram_cmd; o.addr = dram_addr; o.wdata = dram_wdata;
      if (dram_cmd == DRAM_REF) o.row = dram_row;
    end
    return o;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (ckpt && !replay) begin
      rec_trace.delete();
      if (force_pending) n_forced++;
      else if (n_power_on == 0) n_power_on++;
      else n_periodic++;
      force_pending = 0;
    end
    if (ckpt && replay) rep_trace.delete();
    if (run && !replay) rec_trace.push_back(observe());
    if (run && replay) begin
      rep_trace.push_back(observe());
      if (sys_msg_valid || sys_irq_valid) n_io_replayed++;
      if (cpu_duty_valid || cpu_dvfs_valid || cpu_therm_irq || cpu_ecc_irq) n_cpu_ev_replayed++;
    end
    if (replay && !io_clk_en && !io_connect && cpu_src_mask) n_gated++;
  end

  initial begin
    repeat (P_CKPT_INTERVAL * 4 + P_RECORD * 8 + 500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_replay(cpu_regs_t end_regs);
    checks++;
    if (rep_trace.size() != rec_trace.size()) begin
      failures++; $display("replay ran %0d cycles, recording %0d", rep_trace.size(), rec_trace.size());
    end
    for (int i = 0; i < rec_trace.size() && i < rep_trace.size(); i++) begin
      checks++;
      if (rec_trace[i] !== rep_trace[i]) begin
        failures++;
        if (failures < 10) $display("replay differs at t=%0d", i);
      end
    end
    checks++;
    if (regs.acc !== end_regs.acc || regs.lfsr !== end_regs.lfsr) begin
      failures++; $display("processor state after replay differs");
    end
  endtask

  task automatic wait_until(ref logic sig, input int limit, input string what);
    int n = 0;
    while (!sig && n < limit) begin @(negedge clk); n++; end
    checks++;
    if (!sig) begin failures++; $display("timeout waiting for %s", what); end
  endtask

  initial begin
    cpu_regs_t end_regs;
    regs.lfsr = 32'h1234_5678;
    regs.acc  = 64'h0;
    foreach (dram[i]) begin dram[i] = {$urandom, $urandom}; arch_mem[i] = dram[i]; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    wait_until(run, 1000, "power-on checkpoint");
    if (P_NEED_PERIODIC) begin
      while (n_periodic < 1) @(negedge clk);
    end
    // take a forced checkpoint, then record
    @(negedge clk); ckpt_force = 1; force_pending = 1;
    @(negedge clk); ckpt_force = 0;
    wait_until(cpu_ckpt_req, 10, "forced checkpoint");
    wait_until(run, 10000, "recording");
    while (t < dcount_t'(P_RECORD)) @(negedge clk);
    replay_req = 1;
    @(posedge clk);
    @(negedge clk); replay_req = 0;
    end_regs = regs;
    checks++;
    if (mem_log_entries == 0) begin failures++; $display("memory log empty before rollback"); end
    for (int r = 0; r < 2; r++) begin
      wait_until(replay, 10000, "replay");
      wait_until(run, 10000, "replay run");
      wait_until(halt, P_RECORD + 1000, "end of replay");
      n_halt++;
      compare_replay(end_regs);
      if (r == 0) begin
        @(negedge clk); replay_req = 1;
        @(negedge clk); replay_req = 0;
        wait_until(cpu_restore_req, 10000, "second rollback");
      end
    end
    // back to recording
    @(negedge clk); ckpt_force = 1; force_pending = 1;
    @(negedge clk); ckpt_force = 0;
    wait_until(run, 10000, "recording after replays");
    checks++;
    if (replay) begin failures++; $display("still in replay mode"); end
    repeat (200) @(negedge clk);
    checks++;
    if (err != 0) begin failures++; $display("error flags %b", err); end
    $display("power_on=%0d periodic=%0d forced=%0d held=%0d direct=%0d rollback_writes=%0d refresh=%0d scrub=%0d",
             n_power_on, n_periodic, n_forced, n_held, n_direct, n_rollback_lines, n_refresh, n_scrub);
    $display("io_replayed=%0d cpu_events_replayed=%0d gated_cycles=%0d halts=%0d reads_checked=%0d",
             n_io_replayed, n_cpu_ev_replayed, n_gated, n_halt, n_reads_checked);
    begin
      int counts [11];
      counts = '{P_NEED_PERIODIC ? n_periodic : 1, n_forced, n_held, n_direct, n_rollback_lines,
                 n_refresh, n_scrub, n_io_replayed, n_cpu_ev_replayed, n_gated, n_halt};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
