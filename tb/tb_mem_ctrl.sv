// tb_mem_ctrl: self-checking test of the deterministic memory controller.
//
// A DRAM model (64 lines used, read data three cycles after the command, not
// ready on every seventh cycle counted from the checkpoint) and a host that sends
// a fixed stream of 300 random reads and writes. Checked:
//   * every read returns the value last written (reference model);
//   * after the stream, a rollback restores DRAM to its contents at the checkpoint;
//   * after a restoring checkpoint the same stream produces the same DRAM command
//     trace, cycle for cycle: reads, writes, log reads, refreshes and scrubs;
//   * refreshes, scrubs and log reads all happened.
module tb_mem_ctrl;
  import cadre_pkg::*;
  localparam int USED = 64, NREQ = 300, RUN = 4000;
  logic clk = 0, rst_n = 0, ckpt = 0, restore = 0, rb_start = 0, rb_done, rb_busy;
  logic req_valid = 0, req_ready, resp_valid;
  mem_req_t req = '0;
  data_t resp_data;
  logic dram_cmd_valid, dram_ready, dram_rvalid;
  dram_cmd_e dram_cmd;
  addr_t dram_addr;
  logic [2:0] dram_row;
  data_t dram_wdata, dram_rdata;
  logic [11:0] scrub_saved_idx;
  logic [12:0] log_entries;

  mem_ctrl #(.LINES(4096), .ROWS(8), .REFRESH_INTERVAL(50), .SCRUB_INTERVAL(40)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int since = 0;
  data_t dram [USED], ref_mem [USED], snap [USED];
  mem_req_t stream [NREQ];
  string trace_a[$], trace_b[$];
  bit phase_b = 0, tracing = 0;
  int n_ref = 0, n_scrub = 0, n_rd = 0, n_wr = 0;
  // DRAM read pipeline
  int    rd_due = -1;
  data_t rd_val;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  assign dram_ready  = (since % 7 != 3);
  assign dram_rvalid = (rd_due == since);
  assign dram_rdata  = rd_val;

  // DRAM model: acts at the clock edge on the command presented in the cycle.
  always @(posedge clk) if (rst_n) begin
    if (dram_cmd_valid && dram_ready) begin
      string s;
      s = $sformatf("%0d %0d %0d %0d %h", since, dram_cmd, dram_addr, dram_row, dram_wdata);
      if (tracing && phase_b) trace_b.push_back(s);
      else if (tracing) trace_a.push_back(s);
      unique case (dram_cmd)
        DRAM_RD:    begin rd_due = since + 3; rd_val = dram[dram_addr % USED]; n_rd++; end
        DRAM_WR:    begin dram[dram_addr % USED] = dram_wdata; n_wr++; end
        DRAM_REF:   n_ref++;
        DRAM_SCRUB: n_scrub++;
      endcase
    end
  end

  always @(negedge clk) since++;

  task automatic checkpoint(bit rst);
    @(negedge clk); ckpt = 1; restore = rst;
    @(negedge clk); ckpt = 0; restore = 0; since = 0; rd_due = -1;
  endtask

  task automatic run_stream();
    int i = 0, gap = 0;
    tracing = 1;
    while (since < RUN) begin
      if (gap > 0) begin
        gap--;
        req_valid = 0;
      end else if (i < NREQ) begin
        req_valid = 1; req = stream[i];
      end else begin
        req_valid = 0;
      end
      @(posedge clk);
      if (req_valid && req_ready) begin
        if (req.we) ref_mem[req.addr] = req.wdata;
        gap = i % 3;
        i++;
      end
      if (resp_valid) begin
        checks++;
        if (!req.we && resp_data !== ref_mem[req.addr]) begin
          failures++; $display("read line %0d returned %h, expected %h", req.addr, resp_data, ref_mem[req.addr]);
        end
      end
      @(negedge clk);
    end
    req_valid = 0;
    tracing = 0;
    checks++;
    if (i != NREQ) begin failures++; $display("only %0d of %0d requests served", i, NREQ); end
  endtask

  initial begin
    for (int i = 0; i < USED; i++) begin dram[i] = {$urandom, $urandom}; ref_mem[i] = dram[i]; end
    for (int i = 0; i < NREQ; i++) begin
      stream[i].we    = $urandom_range(0, 1);
      stream[i].addr  = addr_t'($urandom_range(0, USED - 1));
      stream[i].wdata = {$urandom, $urandom};
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (333) @(negedge clk);     // let refresh and scrub wander before the checkpoint
    checkpoint(0);
    foreach (dram[i]) snap[i] = dram[i];
    run_stream();
    // roll back
    @(negedge clk); rb_start = 1;
    @(negedge clk); rb_start = 0;
    while (!rb_done) @(posedge clk);
    @(negedge clk);
    foreach (dram[i]) begin
      checks++;
      if (dram[i] !== snap[i]) begin failures++; $display("line %0d not rolled back", i); end
      ref_mem[i] = snap[i];
    end
    // replay
    phase_b = 1;
    checkpoint(1);
    run_stream();
    checks++;
    if (trace_a.size() != trace_b.size()) begin
      failures++; $display("trace lengths differ: %0d vs %0d", trace_a.size(), trace_b.size());
    end
    for (int i = 0; i < trace_a.size() && i < trace_b.size(); i++) begin
      checks++;
      if (trace_a[i] != trace_b[i]) begin
        failures++;
        if (failures < 10) $display("command %0d differs: %s / %s", i, trace_a[i], trace_b[i]);
      end
    end
    checks++;
    if (n_ref == 0 || n_scrub == 0 || n_rd <= NREQ / 2) begin
      failures++; $display("mechanism missing: ref=%0d scrub=%0d rd=%0d", n_ref, n_scrub, n_rd);
    end
    $display("commands=%0d refresh=%0d scrub=%0d reads=%0d writes=%0d", trace_a.size(), n_ref, n_scrub, n_rd, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
