// manchester_enc: serial Manchester encoder of the cipher.
//
// Each accepted bit b leaves as two chips on consecutive cycles: b, then ~b
// (1 -> "10", 0 -> "01").  in_ready is high only in the cycle after the
// second chip has been issued, so one bit is taken every second cycle and the
// chip stream is continuous.  Output is registered: the first chip appears
// the cycle after the bit is accepted.
//
// From the published design: a serial Manchester encoder inside the cipher.
// Own choices: the chip convention and the timing.
module manchester_enc (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_bit,
  output logic in_ready,
  output logic chip_valid,
  output logic chip
);

  logic second;   // next cycle issues the second chip
  logic held;

  assign in_ready = !second;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      second     <= 1'b0;
      held       <= 1'b0;
      chip_valid <= 1'b0;
      chip       <= 1'b0;
    end else if (second) begin
      chip       <= ~held;
      chip_valid <= 1'b1;
      second     <= 1'b0;
    end else if (in_valid) begin
      chip       <= in_bit;
      held       <= in_bit;
      chip_valid <= 1'b1;
      second     <= 1'b1;
    end else begin
      chip_valid <= 1'b0;
    end
  end

endmodule
