// ml_detector: maximum-likelihood detector for the 2x2 BPSK space-time symbol.
//
// For received samples r and known gains h it evaluates, for all 16
// tentative ST symbols S (candidate c: bit i + 2t of c gives s[i][t]),
//   cost(c) = sum over j,t of (r[j+2t] - h[2j]*s[0][t] - h[2j+1]*s[1][t])^2
// and outputs the candidate of least cost.  The cost datapath is shared by
// all candidates, one candidate per clock: stage A forms the four errors
// (additions only, s = +1/-1), stage B squares them with four multipliers,
// stage C adds the squares.  A tag shift register (the FIFO section) delays
// each candidate's index by the datapath latency so that it meets its cost.
// The search section has three comparators: costs of even candidates go to
// comparator 1 (running minimum M1), odd ones to comparator 2 (M2), so each
// registered comparator sees a new cost only every second cycle; after the
// 16th cost, comparator 3 picks the smaller of M1 and M2 (M1 on a tie).
//
// Timing: a new ST symbol is taken every 16 cycles (symbol rate Fclk/16);
// the decision appears 21 cycles after the symbol is taken.  Decisions wait
// in a two-entry output queue; in_ready also needs a free queue entry for
// every symbol in flight.  out_bits follows the ST bit order of the channel.
//
// From the published design: 16 candidates, four multipliers, a shared
// pipelined cost datapath, a FIFO for the candidates, three comparators with
// the final choice between M1 and M2, and the Fclk/16 symbol rate.  Own
// choices: the pipeline depth, the tie rule and the output queue.
module ml_detector
  import ber_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  rmat_t         r,
  input  hmat_t         h,
  output logic          in_ready,
  output logic          out_valid,
  output logic [3:0]    out_bits,
  output logic [CW-1:0] out_cost,
  input  logic          out_ready
);

  typedef struct packed {
    logic       vld;
    logic [3:0] idx;
  } tag_t;

  typedef struct packed {
    logic [CW-1:0] cost;
    logic [3:0]    idx;
  } best_t;

  localparam int unsigned EW = RW + 2;

  rmat_t      r_q;
  hmat_t      h_q;
  logic       active;
  logic [3:0] cand;
  logic [1:0] credits;     // symbols taken and not yet handed on
  logic       accept, deliver;

  // ---- candidate generator and input registers
  assign in_ready = (!active || cand == 4'd15) && (credits < 2'd2);
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      cand   <= '0;
      r_q    <= '0;
      h_q    <= '0;
    end else begin
      if (active) cand <= cand + 1'b1;
      if (active && cand == 4'd15) active <= 1'b0;
      if (accept) begin
        r_q    <= r;
        h_q    <= h;
        active <= 1'b1;
        cand   <= '0;
      end
    end
  end

  // ---- stage A: errors
  logic signed [3:0][EW-1:0] e_a;
  tag_t tag_a, tag_b, tag_c;

  always_ff @(posedge clk) begin
    for (int t = 0; t < 2; t++)
      for (int j = 0; j < 2; j++) begin
        logic signed [EW-1:0] e;
        e = EW'($signed(r_q[j + 2*t]));
        for (int i = 0; i < 2; i++) begin
          if (cand[i + 2*t]) e = e - $signed({5'b0, h_q[2*j + i]});
          else               e = e + $signed({5'b0, h_q[2*j + i]});
        end
        e_a[j + 2*t] <= e;
      end
  end

  // ---- stage B: four multipliers
  logic [3:0][CW-3:0] sq_b;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) sq_b[k] <= (CW-2)'($signed(e_a[k]) * $signed(e_a[k]));
  end

  // ---- stage C: adder
  logic [CW-1:0] cost_c;
  always_ff @(posedge clk) begin
    cost_c <= CW'(sq_b[0]) + CW'(sq_b[1]) + CW'(sq_b[2]) + CW'(sq_b[3]);
  end

  // ---- FIFO section: the candidate index follows its cost
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_a <= '0;
      tag_b <= '0;
      tag_c <= '0;
    end else begin
      tag_a <= '{vld: active, idx: cand};
      tag_b <= tag_a;
      tag_c <= tag_b;
    end
  end

  // ---- search section: comparators 1 and 2
  best_t m1, m2;
  logic  fin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1  <= '0;
      m2  <= '0;
      fin <= 1'b0;
    end else begin
      fin <= tag_c.vld && tag_c.idx == 4'd15;
      if (tag_c.vld && !tag_c.idx[0] && (tag_c.idx == 4'd0 || cost_c < m1.cost))
        m1 <= '{cost: cost_c, idx: tag_c.idx};
      if (tag_c.vld &&  tag_c.idx[0] && (tag_c.idx == 4'd1 || cost_c < m2.cost))
        m2 <= '{cost: cost_c, idx: tag_c.idx};
    end
  end

  // ---- comparator 3 and the output queue
  best_t win;
  best_t q0, q1;
  logic  q0_v, q1_v;

  assign win       = (m1.cost <= m2.cost) ? m1 : m2;
  assign out_valid = q0_v;
  assign out_bits  = q0.idx;
  assign out_cost  = q0.cost;
  assign deliver   = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q0_v    <= 1'b0;
      q1_v    <= 1'b0;
      q0      <= '0;
      q1      <= '0;
      credits <= '0;
    end else begin
      credits <= credits + 2'(accept) - 2'(deliver);
      if (deliver) begin
        q0   <= q1;
        q0_v <= q1_v;
        q1_v <= 1'b0;
        if (fin) begin
          if (q1_v) begin q1 <= win; q1_v <= 1'b1; end
          else      begin q0 <= win; q0_v <= 1'b1; end
        end
      end else if (fin) begin
        if (!q0_v) begin q0 <= win; q0_v <= 1'b1; end
        else       begin q1 <= win; q1_v <= 1'b1; end
      end
    end
  end

  // A decision never finds the queue full: credits bound the symbols in flight.
  assert property (@(posedge clk) disable iff (!rst_n) fin |-> !(q0_v && q1_v && !deliver));

endmodule
