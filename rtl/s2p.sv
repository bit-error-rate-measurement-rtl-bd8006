// s2p: serial-to-parallel converter.
//
// Every cycle with in_valid the bit is stored at the next position, LSB first;
// after W bits `full` rises and dout holds the word until `clear`, which empties
// the register (clear wins over a bit arriving in the same cycle).  Bits that
// arrive while full are ignored.
//
// From the published design: only the block's place in the cipher.  Own
// choices: bit order, clear and full.
module s2p #(
  parameter int unsigned W = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic         full,
  output logic [W-1:0] dout
);

  logic [$clog2(W+1)-1:0] cnt;

  assign full = (cnt == ($clog2(W+1))'(W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      dout <= '0;
    end else if (clear) begin
      cnt  <= '0;
    end else if (in_valid && !full) begin
      dout[cnt] <= in_bit;
      cnt       <= cnt + 1'b1;
    end
  end

endmodule
