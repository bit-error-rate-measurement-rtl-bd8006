// pn_decoder: link decoder, the inverse of pn_encoder.  Every received bit is
// XORed with the next bit of the same 14-bit PN sequence and gathered, LSB
// first, into a DATA_W-bit word.  The finished word is offered on out_valid
// until out_ready; meanwhile in_ready is low and no bit is taken.  The PN
// register steps once per bit taken.  `seed_load` restarts the sequence and
// drops a partly gathered word.
//
// From the published design: the receiver regenerates the same PN sequence.
// Own choices: as for pn_encoder.
module pn_decoder
  import ber_pkg::*;
#(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  seed_t             seed,
  input  logic              in_valid,
  input  logic              in_bit,
  output logic              in_ready,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready
);

  logic  pn, take;
  seed_t pn_state;
  logic [$clog2(DATA_W)-1:0] cnt;

  assign in_ready = !out_valid && !seed_load;
  assign take     = in_valid && in_ready;

  lfsr #(.W(LFSR_W), .TAPS(LFSR_TAPS), .STEPS(1)) u_pn (
    .clk, .rst_n, .load(seed_load), .seed, .step(take),
    .state(pn_state), .bits(pn)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (seed_load) begin
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        out_data[cnt] <= in_bit ^ pn;
        if (cnt == ($clog2(DATA_W))'(DATA_W - 1)) begin
          cnt       <= '0;
          out_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
