// interleaver: block interleaver of LEN = 2^AW - 1 = 16383 bits over a 2^AW x 1 memory.
// Write addresses come from a counter running 1..LEN, read addresses from a
// 14-bit LFSR restarted from SEED at every frame ("read after write").
// Address 0 is never used: an LFSR never produces 0, so the counter skips it
// too and the frame is 2^AW - 1 bits.
//
// A control unit alternates two phases over the single memory.  WRITE: each
// bit bIn with newBit (and in_ready) is written; after LEN bits the phase
// turns to READ.  READ: the memory's read port feeds the output register bout;
// bitReady says bout is valid; while hold is high the register keeps its
// value.  A bit is taken by the consumer on bitReady && !hold.  After LEN reads
// the phase returns to WRITE.  in_ready is low in READ.  Latency: a frame is
// read out starting the cycle after its last bit was written, one bit per
// cycle when hold stays low.
//
// From the published design: the 16384 x 1 memory, the 14-bit counter running
// 1..16383, the 14-bit LFSR read address, the port names (bIn, newBit, hold,
// bout, bitReady) and the held output register.  Own choices: the LFSR
// polynomial and start state, the two-phase control unit, in_ready and
// reading.
module interleaver #(
  parameter int unsigned   AW   = 14,
  parameter logic [AW-1:0] TAPS = 14'h3802,
  parameter logic [AW-1:0] SEED = 14'd1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bIn,
  input  logic newBit,
  output logic in_ready,
  input  logic hold,
  output logic bout,
  output logic bitReady,
  output logic reading
);

  localparam logic [AW-1:0] LEN = {AW{1'b1}};

  logic          mem [2**AW];
  logic [AW-1:0] cnt;        // linear address, 1..LEN
  logic [AW-1:0] addr_lfsr;  // pseudorandom address
  logic [AW-1:0] done_cnt;   // bits of the current phase handled
  logic          step_lfsr, restart, wr, rd, take;
  logic          lfsr_bit;

  assign in_ready = !reading;
  assign wr       = newBit && in_ready;
  assign take     = bitReady && !hold;
  assign rd       = reading && (!bitReady || take);
  assign restart  = (wr || rd) && (done_cnt == LEN - 1'b1);

  lfsr #(.W(AW), .TAPS(TAPS), .STEPS(1)) u_addr (
    .clk, .rst_n, .load(restart), .seed(SEED), .step(step_lfsr),
    .state(addr_lfsr), .bits(lfsr_bit)
  );

  assign step_lfsr = rd;

  always_ff @(posedge clk) begin
    if (wr) mem[cnt] <= bIn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      cnt      <= AW'(1);
      done_cnt <= '0;
      bitReady <= 1'b0;
      bout     <= 1'b0;
    end else begin
      if (take) bitReady <= 1'b0;
      if (rd) begin
        bout     <= mem[addr_lfsr];
        bitReady <= 1'b1;
      end
      if (wr || rd) begin
        cnt      <= (cnt == LEN) ? AW'(1) : cnt + 1'b1;
        done_cnt <= restart ? '0 : done_cnt + 1'b1;
        if (restart) reading <= !reading;
      end
    end
  end

  // The LFSR must be back at SEED whenever a frame starts.
  initial assert (SEED != '0);

endmodule
