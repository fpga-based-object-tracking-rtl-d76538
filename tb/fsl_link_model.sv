// fsl_link_model: behavioural model of a Fast Simplex Link (FSL) channel.
//
// Used only by testbenches to stand for the FIFO link that joins the processor
// and the display accelerator. A producer pushes a word with wr while full is
// low; the consumer sees the oldest word on rdata while exists is high and pops
// it with rd. Both sides share one clock; rst (synchronous, active high) empties
// the link. The depth defaults to 16 words.
module fsl_link_model #(
  parameter int DEPTH = 16,
  parameter int W     = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         wr,
  input  logic [W-1:0] wdata,
  output logic         full,
  output logic         exists,
  output logic [W-1:0] rdata,
  input  logic         rd
);
  logic [W-1:0] mem [DEPTH];
  int unsigned  rp, wp, cnt;

  assign full   = (cnt == DEPTH);
  assign exists = (cnt != 0);
  assign rdata  = mem[rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      rp  <= 0;
      wp  <= 0;
      cnt <= 0;
    end else begin
      if (wr && !full) begin
        mem[wp] <= wdata;
        wp <= (wp + 1) % DEPTH;
      end
      if (rd && exists) rp <= (rp + 1) % DEPTH;
      cnt <= cnt + ((wr && !full) ? 1 : 0) - ((rd && exists) ? 1 : 0);
    end
  end

  a_no_overflow  : assert property (@(posedge clk) disable iff (rst) wr |-> !full);
  a_no_underflow : assert property (@(posedge clk) disable iff (rst) rd |-> exists);
endmodule
