// domain_clock: the domain-clock counter of one clock domain.
//
// An up-counter driven by the local clock. As drawn for the receiver's bus
// interface, it is split into a mod-W counter and a domain counter: the mod-W
// counter counts 0..W-1 and its overflow advances the domain counter, so the full
// count is dom_cnt*W + mod_cnt. W is a power of two here, so the full count is the
// two fields side by side. The checkpoint broadcast (ckpt, one cycle, synchronous)
// clears both fields; the cycle after it the count reads 0.
//
// Interface: count is the registered count of the current cycle; mod_cnt and
// overflow are also brought out. Reset (rst_n) clears the counter as a checkpoint
// does. Splitting the count in two is taken from the synchronizer figure; the
// widths are this design's choice.
module domain_clock #(
  parameter int unsigned W    = 4,
  parameter int unsigned DC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ckpt,
  output logic [$clog2(W)-1:0]    mod_cnt,
  output logic [DC_W-$clog2(W)-1:0] dom_cnt,
  output logic                    overflow,
  output logic [DC_W-1:0]         count
);
  localparam int unsigned LW = $clog2(W);

  initial assert (W >= 2 && (1 << LW) == W) else $error("W must be a power of two");

  assign overflow = (mod_cnt == LW'(W - 1));
  assign count    = {dom_cnt, mod_cnt};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mod_cnt <= '0;
      dom_cnt <= '0;
    end else if (ckpt) begin
      mod_cnt <= '0;
      dom_cnt <= '0;
    end else begin
      mod_cnt <= overflow ? '0 : mod_cnt + 1'b1;
      if (overflow) dom_cnt <= dom_cnt + 1'b1;
    end
  end
endmodule
