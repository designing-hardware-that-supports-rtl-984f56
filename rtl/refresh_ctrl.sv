// refresh_ctrl: deterministic DRAM refresh scheduler.
//
// A refresh walker that requests a refresh of one row every REFRESH_INTERVAL
// cycles, walking the rows in order. It is made deterministic by resetting it at
// every checkpoint: the interval timer and the row counter both return to zero on
// the checkpoint broadcast, so as long as the controller's other inputs repeat,
// refreshes line up with the program's accesses exactly as in the original run.
// A checkpoint interval long enough for every row to be refreshed at least once
// keeps the DRAM contents valid.
//
// Interface: req rises when the timer expires and stays high with row until ack
// (the memory controller issuing the refresh). The timer keeps running while a
// request waits, so a late grant does not shift later requests. Resetting at the
// checkpoint follows the document; the interval and row count are this design's
// values for a DDR-style 7.8 us refresh period.
module refresh_ctrl #(
  parameter int unsigned REFRESH_INTERVAL = 6240,
  parameter int unsigned ROWS             = 8192
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ckpt,
  input  logic ack,
  output logic req,
  output logic [$clog2(ROWS)-1:0] row
);
  localparam int unsigned TW = $clog2(REFRESH_INTERVAL);
  localparam int unsigned RW = $clog2(ROWS);

  logic [TW-1:0] timer;
  logic          expire;

  assign expire = (timer == TW'(REFRESH_INTERVAL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer <= '0;
      req   <= 1'b0;
      row   <= '0;
    end else if (ckpt) begin
      timer <= '0;
      req   <= 1'b0;
      row   <= '0;
    end else begin
      timer <= expire ? '0 : timer + 1'b1;
      if (req && ack) begin
        req <= 1'b0;
        row <= (row == RW'(ROWS - 1)) ? '0 : row + 1'b1;
      end
      if (expire) req <= 1'b1;
    end
  end
endmodule
