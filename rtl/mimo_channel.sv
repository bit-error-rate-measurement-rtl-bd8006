// mimo_channel: 2x2 flat-fading channel with additive noise, at baseband.
//
// Collects four BPSK symbols from the modulator into one space-time symbol S
// (antenna k % 2, slot k / 2), then forms for receive antenna j and slot t
//   r[j + 2t] = sum_i h[2j + i] * s[i][t] + n[j + 2t],   s = +1 / -1
// The gains h are the last four Rayleigh variates of a fading generator,
// the most recent as h[0], held for both slots (block fading); n are the last
// four Gaussian variates of a second generator, the most recent as n[0].  The
// gains travel with r to the detector, which is assumed to know the channel.  Because s is +1 or -1, no multiplier is
// needed.
//
// Interface: symbols arrive on bb_valid (one per BPSK bit); bb_ready is low
// while a finished ST symbol waits for the detector (out_valid && !out_ready).
// out_valid rises the cycle after the fourth symbol; `st_bits` are the four
// transmitted bits, for monitoring.
//
// From the published design: a 2x2 MIMO link through Rayleigh fading and noise,
// with the channel known at the detector.  Own choices: real-valued gains,
// block fading over the two slots, the symbol grouping and the formats.
module mimo_channel
  import ber_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 bb_valid,
  input  logic                 bb_sym,
  output logic                 bb_ready,
  input  logic                 fade_valid,
  input  logic [HW-1:0]        fade,
  input  logic                 noise_valid,
  input  logic signed [15:0]   noise,
  output logic                 out_valid,
  input  logic                 out_ready,
  output rmat_t                r,
  output hmat_t                h,
  output logic [3:0]           st_bits
);

  hmat_t                    h_hist;
  logic [3:0][15:0]         n_hist;
  logic [2:0]               sym_bits;
  logic [1:0]               cnt;
  logic [3:0]               s_all;
  rmat_t                    r_next;

  assign bb_ready = !out_valid || out_ready;
  assign s_all    = {bb_sym, sym_bits};

  always_comb begin
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 2; j++) begin
        logic signed [RW-1:0] acc;
        acc = RW'($signed(n_hist[j + 2*t]));
        for (int i = 0; i < 2; i++) begin
          if (s_all[i + 2*t]) acc = acc + $signed({3'b000, h_hist[2*j + i]});
          else                acc = acc - $signed({3'b000, h_hist[2*j + i]});
        end
        r_next[j + 2*t] = acc;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_hist    <= '0;
      n_hist    <= '0;
      sym_bits  <= '0;
      cnt       <= '0;
      out_valid <= 1'b0;
      r         <= '0;
      h         <= '0;
      st_bits   <= '0;
    end else begin
      if (fade_valid)  h_hist <= {h_hist[2:0], fade};
      if (noise_valid) n_hist <= {n_hist[2:0], noise};
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (bb_valid && bb_ready) begin
        cnt <= cnt + 1'b1;
        if (cnt == 2'd3) begin
          out_valid <= 1'b1;
          r         <= r_next;
          h         <= h_hist;
          st_bits   <= s_all;
        end else begin
          sym_bits[cnt] <= bb_sym;
        end
      end
    end
  end

endmodule
