// scrubber: memory scrub walker with a checkpointed line index.
//
// Every SCRUB_INTERVAL cycles it asks the memory controller to scrub (read,
// correct and write back) the line named by its index register, then advances the
// index through all LINES lines in order. A scrubber left running across a replay
// would be working on a different line than in the original run; here the index
// register is part of the checkpoint instead: at a checkpoint taken while
// recording (ckpt && !restore) its value is copied to saved_idx, and at the
// checkpoint that starts a replay (ckpt && restore) it is loaded back from
// saved_idx, so scrubbing resumes exactly where it was. The interval timer is
// cleared at every checkpoint so that scrub requests also fall on the same cycles.
//
// Interface: req/addr hold until ack. Saving and restoring the index follows the
// document; keeping the saved copy in a register here, the timer reset and the
// interval are this design's choices.
module scrubber #(
  parameter int unsigned LINES          = 4096,
  parameter int unsigned SCRUB_INTERVAL = 65536
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ckpt,
  input  logic restore,
  input  logic ack,
  output logic req,
  output logic [$clog2(LINES)-1:0] addr,
  output logic [$clog2(LINES)-1:0] saved_idx
);
  localparam int unsigned AW = $clog2(LINES);
  localparam int unsigned TW = $clog2(SCRUB_INTERVAL);

  logic [TW-1:0] timer;
  logic          expire;

  assign expire = (timer == TW'(SCRUB_INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer     <= '0;
      req       <= 1'b0;
      addr      <= '0;
      saved_idx <= '0;
    end else if (ckpt) begin
      timer <= '0;
      req   <= 1'b0;
      if (restore) addr      <= saved_idx;
      else         saved_idx <= addr;
    end else begin
      timer <= expire ? '0 : timer + 1'b1;
      if (req && ack) begin
        req  <= 1'b0;
        addr <= (addr == AW'(LINES - 1)) ? '0 : addr + 1'b1;
      end
      if (expire) req <= 1'b1;
    end
  end
endmodule
