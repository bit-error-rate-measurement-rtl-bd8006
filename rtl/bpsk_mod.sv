// bpsk_mod: BPSK modulator.
//
// Each accepted bit occupies SPB = 16 clock cycles, during which one period of
// a sampled sine carrier is sent on `sample`: the carrier as it is for a 1,
// inverted (180 degree phase shift) for a 0, so a 1 starts its period with
// positive samples and a 0 with negative ones.  Amplitude and frequency never
// change.  Carrier samples are round(127 * sin(2*pi*(k + 0.5)/16)), k = 0..15,
// built from a four-entry quarter-wave table; the half-sample offset keeps the
// first sample of every period away from zero.
//
// For the baseband channel model the modulator hands over the antipodal
// symbol of every period it has sent (bb_valid, bb_sym: 1 for +1, 0 for -1).
// The symbol is loaded into a one-entry output register in the cycle the
// period's last sample appears, and is held until bb_ready.  A bit is taken on
// in_valid && in_ready; in_ready is high when no period is running or the
// running one ends in this cycle.  If the previous symbol still waits when a
// period ends, the modulator pauses on the last sample (sample_valid low)
// until the channel takes it, so symbols and carrier periods stay paired.
// Without back-pressure the rate is one bit per 16 cycles.
//
// From the published design: phase 0 for a 1 and 180 degrees for a 0, constant
// amplitude and frequency, a 1 starting its period positive.  Own choices:
// 16 samples per bit, amplitude 127, and the registered baseband symbol
// output with its pause rule.
module bpsk_mod (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_bit,
  output logic              in_ready,
  input  logic              bb_ready,
  output logic              bb_valid,
  output logic              bb_sym,
  output logic              sample_valid,
  output logic signed [7:0] sample
);

  localparam int unsigned SPB = 16;
  localparam int unsigned PW  = $clog2(SPB);
  localparam logic [6:0] QTAB [4] = '{7'd25, 7'd71, 7'd106, 7'd125};

  logic [PW-1:0] phase;
  logic          busy, cur;
  logic [6:0]    mag;
  logic [1:0]    q;
  logic          last, stall, finish, take;

  assign last     = busy && phase == PW'(SPB - 1);
  assign stall    = last && bb_valid && !bb_ready;   // previous symbol not yet taken
  assign finish   = last && !stall;
  assign in_ready = !busy || finish;
  assign take     = in_valid && in_ready;

  // Magnitude of sample number `phase` within the period (16 samples: the
  // quarter table read forwards, backwards, forwards, backwards).
  always_comb begin
    q = phase[1:0];
    unique case (phase[3:2])
      2'd0, 2'd2: mag = QTAB[q];
      default:    mag = QTAB[2'd3 - q];
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      phase <= '0;
      cur   <= 1'b0;
    end else if (take) begin
      busy  <= 1'b1;
      phase <= '0;
      cur   <= in_bit;
    end else if (finish) begin
      busy  <= 1'b0;
    end else if (busy && !last) begin
      phase <= phase + 1'b1;
    end
  end

  // Baseband symbol of the period that ends, held until the channel takes it.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bb_valid <= 1'b0;
      bb_sym   <= 1'b0;
    end else if (finish) begin
      bb_valid <= 1'b1;
      bb_sym   <= cur;
    end else if (bb_ready) begin
      bb_valid <= 1'b0;
    end
  end

  // A waiting symbol must not change or vanish before the channel takes it.
  a_bb_hold: assert property (@(posedge clk) disable iff (!rst_n)
    bb_valid && !bb_ready |=> bb_valid && $stable(bb_sym));

  // Sample output, registered: positive half-period first for a 1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_valid <= 1'b0;
      sample       <= '0;
    end else begin
      sample_valid <= busy && !stall;
      if (busy && !stall) sample <= (phase[3] ^ cur) ? $signed({1'b0, mag}) : -$signed({1'b0, mag});
    end
  end

endmodule
