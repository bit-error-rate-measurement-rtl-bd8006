// manchester_dec: Manchester decoder of the decryption path, with erasures.
//
// Chips arrive one per in_valid cycle, first chip then second chip of each
// bit, each with an `erased` flag set for chips the delete step removed.  The
// bit is the first chip, or the complement of the second chip when the first
// was erased: this is how a deleted column is rebuilt.  out_valid pulses for
// one cycle after the second chip; `viol` flags a pair that should be
// complementary but is not (neither chip erased), i.e. a detected error.
//
// From the published design: the decode step and the need to rebuild deleted
// columns.  Own choices: erasure flags and the violation flag.
module manchester_dec (
  input  logic clk,
  input  logic rst_n,
  input  logic sync,       // next chip is a first chip
  input  logic in_valid,
  input  logic chip,
  input  logic erased,
  output logic out_valid,
  output logic out_bit,
  output logic viol
);

  logic have_first;
  logic c1, e1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      c1         <= 1'b0;
      e1         <= 1'b0;
      out_valid  <= 1'b0;
      out_bit    <= 1'b0;
      viol       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (sync) begin
        have_first <= 1'b0;
      end else if (in_valid) begin
        if (!have_first) begin
          c1         <= chip;
          e1         <= erased;
          have_first <= 1'b1;
        end else begin
          have_first <= 1'b0;
          out_valid  <= 1'b1;
          out_bit    <= e1 ? ~chip : c1;
          viol       <= !e1 && !erased && (c1 == chip);
        end
      end
    end
  end

endmodule
