// tb_ber_system: end-to-end test of the whole BER measurement system at its
// default sizes (16383-bit interleaver frames, 9-bit cipher blocks).
//
// Phase 1, no noise: at least two full interleaver frames of data go through
// encryption, the link, the noiseless fading channel, ML detection and
// decryption; every recovered block must equal the transmitted one (zero
// bit errors) and the bit count must match the blocks received.
// Phase 2, strong noise (sigma_n = 2.0): detection errors must appear and be
// counted, and the BER must lie well inside (0, 0.5].
// Along the way the test counts each mechanism of the design and fails if one
// never happened: interleaver and deinterleaver phase changes, stalls of the
// interleaver output (hold), back-pressure on the channel, ML decisions, both
// delete selections, permutation updates and the modulator's two carrier
// phases.
`timescale 1ns/1ps
module tb_ber_system;
  import ber_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               cfg_load, run;
  key_t               key;
  logic [15:0]        sigma_n;
  logic               tx_sample_valid;
  logic signed [7:0]  tx_sample;
  logic [31:0]        bit_count, err_count, block_count;

  ber_system dut (
    .clk, .rst_n, .cfg_load, .key,
    .crypt_seed(14'h1A5C), .pn_seed(14'h0F0F), .data_seed(14'h2B3D),
    .fade_seed_u1(16'hACE1), .fade_seed_u2(18'h1F00D),
    .noise_seed_u1(16'h1234), .noise_seed_u2(18'h2BEEF),
    .sigma_n, .run, .tx_sample_valid, .tx_sample,
    .bit_count, .err_count, .block_count
  );

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic perm_t mk_perm(input int unsigned a [NB]);
    perm_t p;
    for (int i = 0; i < NB; i++) p[i] = IW'(a[i]);
    return p;
  endfunction

  // mechanism counters
  longint cyc = 0;
  int n_ilv_switch = 0, n_dil_switch = 0, n_hold = 0, n_chan_stall = 0;
  int n_ml = 0, n_del0 = 0, n_del1 = 0, n_update = 0, n_pos = 0, n_neg = 0, n_dil_hold = 0;
  logic ilv_rd_q = 1'b0, dil_rd_q = 1'b0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.u_ilv.reading != ilv_rd_q) n_ilv_switch++;
      if (dut.u_dil.reading != dil_rd_q) n_dil_switch++;
      ilv_rd_q = dut.u_ilv.reading;
      dil_rd_q = dut.u_dil.reading;
      if (dut.u_ilv.bitReady && dut.u_ilv.hold) n_hold++;
      if (dut.u_dil.bitReady && dut.u_dil.hold) n_dil_hold++;
      if (dut.u_chan.out_valid && !dut.u_chan.out_ready) n_chan_stall++;
      if (dut.u_ml.out_valid && dut.u_ml.out_ready) n_ml++;
      if (dut.u_enc.out_valid && dut.u_enc.out_ready) begin
        n_update++;
        if (dut.u_enc.p2[0]) n_del1++; else n_del0++;
      end
      if (tx_sample_valid && tx_sample > 0) n_pos++;
      if (tx_sample_valid && tx_sample < 0) n_neg++;
    end
  end

  localparam int unsigned FRAME = 16383;

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired at block_count=%0d", block_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p1a [NB] = '{5, 1, 6, 7, 8, 4, 2, 0, 3};  // 5 7 2 / 1 8 0 / 6 4 3, column-major
    int unsigned p3a [NB] = '{2, 0, 1, 5, 3, 4, 8, 6, 7};
    int unsigned ka  [NB] = '{1, 2, 3, 4, 5, 6, 7, 8, 0};
    longint t0;
    logic [31:0] b1, e1, blk1;
    key = '{p1: mk_perm(p1a), p2: 3'b011, p3: mk_perm(p3a), k: mk_perm(ka), kd: 3'b100};
    cfg_load = 1'b0;
    run      = 1'b0;
    sigma_n  = 16'h0000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    cfg_load <= 1'b1;
    @(posedge clk);
    cfg_load <= 1'b0;
    run      <= 1'b1;

    // ---- phase 1: noiseless, two interleaver frames of data
    t0 = cyc;
    wait (bit_count >= 2 * FRAME);
    @(posedge clk);
    $display("phase 1: %0d blocks, %0d bits, %0d errors, %0d cycles", block_count, bit_count, err_count, cyc - t0);
    check(err_count == 0, "noiseless channel must give zero bit errors");
    check(bit_count == block_count * NB, "bit count must be NB per block");
    check(dut.u_dec.viol_count == 0, "no Manchester violations after decryption");
    b1 = bit_count; e1 = err_count; blk1 = block_count;

    // ---- phase 2: strong noise
    sigma_n <= 16'h2000;
    wait (bit_count >= b1 + 2 * FRAME);
    @(posedge clk);
    $display("phase 2: %0d bits, %0d errors, BER = %f", bit_count - b1, err_count - e1,
             real'(err_count - e1) / real'(bit_count - b1));
    check(err_count > e1, "noisy channel must produce bit errors");
    check(real'(err_count - e1) / real'(bit_count - b1) < 0.5, "BER must stay below 0.5");
    check(block_count > blk1, "blocks keep flowing under noise");

    $display("mechanisms: ilv_switch=%0d dil_switch=%0d hold=%0d dil_hold=%0d chan_stall=%0d ml=%0d del0=%0d del1=%0d upd=%0d pos=%0d neg=%0d",
             n_ilv_switch, n_dil_switch, n_hold, n_dil_hold, n_chan_stall, n_ml, n_del0, n_del1, n_update, n_pos, n_neg);
    check(n_ilv_switch >= 2, "interleaver changed phase (write->read->write)");
    check(n_dil_switch >= 2, "deinterleaver changed phase");
    check(n_hold > 0, "interleaver output held by the modulator");
    check(n_dil_hold > 0, "deinterleaver output held by the decoder");
    check(n_ml > 0, "ML detector decisions");
    check(n_del0 > 0 && n_del1 > 0, "both delete selections used");
    check(n_update >= int'(block_count), "permutation set updated per block");
    check(n_pos > 0 && n_neg > 0, "modulator produced both carrier half-waves");
    // the detector may never keep the channel waiting long at this rate, but count it
    $display("channel back-pressure cycles: %0d", n_chan_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
