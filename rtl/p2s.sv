// p2s: parallel-to-serial converter.
//
// `load` captures a W-bit word; the bits then leave LSB first, one per
// handshake (out_valid && out_ready).  out_valid stays high while bits remain.
// A load during shifting restarts with the new word.
//
// From the published design: only the block's place in the cipher.  Own
// choices: bit order and handshake.
module p2s #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] din,
  output logic         out_valid,
  input  logic         out_ready,
  output logic         out_bit
);

  logic [W-1:0]         sr;
  logic [$clog2(W+1)-1:0] left;

  assign out_valid = (left != '0);
  assign out_bit   = sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr   <= '0;
      left <= '0;
    end else if (load) begin
      sr   <= din;
      left <= ($clog2(W+1))'(W);
    end else if (out_valid && out_ready) begin
      sr   <= sr >> 1;
      left <= left - 1'b1;
    end
  end

endmodule
