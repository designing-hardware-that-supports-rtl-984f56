// bus_tx_tagger: transmitter end of a cycle-deterministic source-synchronous bus.
//
// The transmitter keeps its own domain-clock counter, cleared by the checkpoint
// broadcast like every other. Each message it puts on the bus carries a short tag
// rho, the low RHO_W bits of the transmitter's count x_T in the cycle the message is
// on the bus (rho = x_T mod W). From rho and its own count the receiver can recover
// x_T exactly as long as the bus's uncertainty interval is shorter than W counts.
//
// Timing: a message accepted on in_valid/in_data is driven on the bus (out_valid,
// out_data, out_rho) in the next cycle and held for that one cycle; one message per
// cycle. tx_count is the count that goes with the message on the bus.
// Using the raw low count bits as the tag is this design's choice; the document
// only says the tag lets the receiver determine x_T.
module bus_tx_tagger #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned RHO_W  = 2,
  parameter int unsigned DC_W   = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ckpt,
  input  logic              in_valid,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  output logic [RHO_W-1:0]  out_rho,
  output logic [DC_W-1:0]   tx_count
);
  logic [RHO_W-1:0]      mod_cnt;
  logic [DC_W-RHO_W-1:0] dom_cnt;
  logic                  overflow;

  domain_clock #(.W(2**RHO_W), .DC_W(DC_W)) u_dc (
    .clk, .rst_n, .ckpt,
    .mod_cnt, .dom_cnt, .overflow,
    .count(tx_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end
  end

  // The tag is the transmitter's count, modulo W, in the cycle the message is sent.
  assign out_rho = out_valid ? mod_cnt : '0;
endmodule
