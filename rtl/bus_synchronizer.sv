// bus_synchronizer: receiver end of a cycle-deterministic source-synchronous bus.
//
// A message sent at transmitter count x_T arrives at receiver count
// y_R = x_T + [THETA1, THETA2], where the spread comes from bus delay and from the
// bounded difference between the two domain-clock counters. Processing it at
// arrival would make the receiver's behaviour depend on analog timing. Instead the
// synchronizer processes every message at z_R = x_T + THETA2, the last count at
// which it could have arrived, which is the same in every execution.
//
// Datapath (following the synchronizer block diagram):
//   * a lookup table maps the received tag rho to x_T mod W (reset to the
//     identity, writable through cfg_*);
//   * the receiver's domain clock is a mod-W counter whose overflow advances a
//     domain counter;
//   * adder 1 forms y_R - THETA1 - (x_T mod W); clearing its low log2(W) bits gives
//     the start of the W-window that holds x_T, the latest count not after
//     y_R - THETA1 with the right residue;
//   * adder 2 adds (x_T mod W) + THETA2 to that window start, giving z_R;
//   * the message and z_R enter the holding queue; an equality comparator between
//     the domain count and the head's z_R releases it to the receiver core.
// Reconstruction is exact when THETA2 - THETA1 < W.
//
// Timing: in_valid/in_data/in_rho mark the arrival cycle (receiver count y_R).
// out_valid/out_data are asserted for exactly the one cycle in which the domain
// count equals z_R; a message whose arrival cycle is already z_R goes straight
// through in that cycle. late_err (sticky) flags a message whose z_R had already
// passed, which means the THETA bounds were violated; hq_overflow flags a full queue.
//
// The document's block diagram also has a circular queue fed by adder 1 and the
// domain counter; its contents are not described, and here the window start is
// computed directly instead. The queue depth is this design's choice.
module bus_synchronizer #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned RHO_W  = 2,
  parameter int unsigned DC_W   = 32,
  parameter int unsigned THETA1 = 1,
  parameter int unsigned THETA2 = 2,
  parameter int unsigned DEPTH  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ckpt,
  // lookup-table programming
  input  logic              cfg_we,
  input  logic [RHO_W-1:0]  cfg_addr,
  input  logic [RHO_W-1:0]  cfg_data,
  // arrival side (bus interface)
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  input  logic [RHO_W-1:0]  in_rho,
  // processing side (receiver core)
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic [DC_W-1:0]   rx_count,
  output logic              late_err,
  output logic              hq_overflow
);
  localparam int unsigned W = 2 ** RHO_W;

  initial assert (THETA2 >= THETA1 && THETA2 - THETA1 < W)
    else $error("uncertainty interval must be shorter than W");

  typedef logic [DC_W-1:0] cnt_t;
  typedef struct packed {
    cnt_t              zr;
    logic [DATA_W-1:0] data;
  } hq_entry_t;

  // ---------------- domain clock ----------------
  logic [RHO_W-1:0]      mod_cnt;
  logic [DC_W-RHO_W-1:0] dom_cnt;
  logic                  overflow;

  domain_clock #(.W(W), .DC_W(DC_W)) u_dc (
    .clk, .rst_n, .ckpt,
    .mod_cnt, .dom_cnt, .overflow,
    .count(rx_count)
  );

  // ---------------- tag lookup table ----------------
  logic [RHO_W-1:0] lut [W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < W; i++) lut[i] <= RHO_W'(i);
    end else if (cfg_we) begin
      lut[cfg_addr] <= cfg_data;
    end
  end

  // ---------------- z_R computation ----------------
  cnt_t xt_res, sum1, win_start, zr;
  always_comb begin
    xt_res    = cnt_t'(lut[in_rho]);
    sum1      = rx_count - cnt_t'(THETA1) - xt_res;
    win_start = {sum1[DC_W-1:RHO_W], {RHO_W{1'b0}}};
    zr        = win_start + xt_res + cnt_t'(THETA2);
  end

  // ---------------- holding queue and release comparator ----------------
  hq_entry_t hq_head;
  logic      hq_empty, hq_full;
  logic      head_due, bypass, push, pop;
  logic [$clog2(DEPTH+1)-1:0] hq_count;

  assign head_due = !hq_empty && (hq_head.zr == rx_count);
  assign bypass   = hq_empty && in_valid && (zr == rx_count);
  assign pop      = head_due;
  assign push     = in_valid && !bypass;

  holding_queue #(.WIDTH($bits(hq_entry_t)), .DEPTH(DEPTH)) u_hq (
    .clk, .rst_n,
    .clear    (ckpt),
    .push,
    .in_entry (hq_entry_t'{zr: zr, data: in_data}),
    .pop,
    .head     (hq_head),
    .empty    (hq_empty),
    .full     (hq_full),
    .overflow (hq_overflow),
    .count    (hq_count)
  );

  assign out_valid = head_due || bypass;
  assign out_data  = head_due ? hq_head.data : in_data;

  // A head entry whose z_R lies in the past (signed distance) will never match.
  logic head_late, in_late;
  cnt_t head_dist, in_dist;
  assign head_dist = rx_count - hq_head.zr;
  assign in_dist   = rx_count - zr;
  assign head_late = !hq_empty && !head_dist[DC_W-1] && (head_dist != '0);
  assign in_late   = in_valid && !in_dist[DC_W-1] && (in_dist != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          late_err <= 1'b0;
    else if (ckpt)       late_err <= 1'b0;
    else if (head_late || in_late) late_err <= 1'b1;
  end

  // Messages are released in order, so at most one can be due per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(head_due && bypass));
endmodule
