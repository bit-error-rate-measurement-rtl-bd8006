// tb_cseec_encrypt: runs several keys and hundreds of blocks through the
// encryptor with a random out_ready.  Expected values come from the reference
// model below (the model encrypts; for decryption the model's
// ciphertext is fed in and the original plaintext expected back).  Also
// checks the latency from block accepted to out_valid (2*NB + 3 cycles for
// encryption, 2*NB + 4 for decryption) and that the ciphertext differs from
// the plaintext for the same block under successive permutation sets.
module tb_cseec_encrypt;
  import ber_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic  cfg_load, in_valid, in_ready, out_valid, out_ready;
  key_t  key;
  seed_t seed;
  blk_t  in_block, out_block;

  int checks = 0, failures = 0;

  // ---- reference model of the cipher, written from the algorithm

  typedef struct {
    perm_t p1, p3;
    dsel_t p2;
    logic [13:0] prng;
  } cstate_t;

  function automatic logic [13:0] m_lfsr(logic [13:0] s);
    return {s[12:0], s[13] ^ s[12] ^ s[11] ^ s[1]};
  endfunction

  function automatic cstate_t m_init(key_t key, logic [13:0] seed);
    cstate_t st;
    st.p1 = key.p1; st.p2 = key.p2; st.p3 = key.p3;
    st.prng = (seed == 0) ? 14'd1 : seed;
    return st;
  endfunction

  function automatic logic [NC-1:0] m_rseq(ref cstate_t st);
    logic [NC-1:0] r;
    for (int j = 0; j < NC; j++) begin
      r[j]    = st.prng[13];
      st.prng = m_lfsr(st.prng);
    end
    return r;
  endfunction

  function automatic void m_update(ref cstate_t st, input key_t key);
    perm_t a = st.p1, c = st.p3;
    for (int i = 0; i < NB; i++) begin
      st.p1[i] = a[key.k[i]];
      st.p3[i] = c[key.k[i]];
    end
    st.p2 = {st.p2[COLS-2:0], st.p2[COLS-1]} ^ key.kd;
  endfunction

  // Encrypt one block and advance the state.
  function automatic blk_t m_encrypt(ref cstate_t st, input key_t key, input blk_t b);
    blk_t s, v, c;
    logic [NC-1:0] t, r;
    for (int i = 0; i < NB; i++) s[i] = b[st.p1[i]];
    for (int i = 0; i < NB; i++) begin t[i] = s[i]; t[NB+i] = !s[i]; end
    r = m_rseq(st);
    t = t ^ r;
    for (int col = 0; col < COLS; col++)
      for (int row = 0; row < ROWS; row++)
        v[col*ROWS+row] = st.p2[col] ? t[col*ROWS+row] : t[(COLS+col)*ROWS+row];
    for (int i = 0; i < NB; i++) c[i] = v[st.p3[i]];
    m_update(st, key);
    return c;
  endfunction

  function automatic perm_t m_rand_perm();
    int unsigned a [NB];
    perm_t p;
    for (int i = 0; i < NB; i++) a[i] = i;
    for (int i = NB - 1; i > 0; i--) begin
      int unsigned j = $urandom_range(i, 0);
      int unsigned x = a[i]; a[i] = a[j]; a[j] = x;
    end
    for (int i = 0; i < NB; i++) p[i] = IW'(a[i]);
    return p;
  endfunction


  cseec_encrypt dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int LAT = 2 * NB + 3;

  initial begin
    cstate_t st;
    in_valid = 0; out_ready = 0; cfg_load = 0; in_block = '0; seed = '0; key = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      int nsame = 0;
      blk_t first_c;
      key  = '{p1: m_rand_perm(), p2: dsel_t'($urandom), p3: m_rand_perm(), k: m_rand_perm(), kd: dsel_t'($urandom)};
      seed = seed_t'($urandom);
      @(negedge clk); cfg_load = 1; @(negedge clk); cfg_load = 0;
      st = m_init(key, seed);
      for (int n = 0; n < 60; n++) begin
        blk_t plain, cipher, expv;
        int lat;
        plain  = (k == 0) ? 9'h0A5 : blk_t'($urandom);   // key 0: one block repeated
        cipher = m_encrypt(st, key, plain);
        in_block = plain;
        expv     = cipher;
        in_valid = 1;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
        lat = 0;
        while (!out_valid) begin @(negedge clk); lat++; end
        check(lat + 1 == LAT, $sformatf("latency %0d, expected %0d", lat + 1, LAT));
        repeat ($urandom_range(3, 0)) @(negedge clk);   // late out_ready
        check(out_valid, "out_valid holds until taken");
        check(out_block == expv, $sformatf("key %0d block %0d: got %h expected %h", k, n, out_block, expv));
        if (k == 0) begin
          if (n == 0) first_c = cipher; else if (cipher == first_c) nsame++;
        end
        out_ready = 1;
        @(negedge clk);
        out_ready = 0;
      end
      if (k == 0) check(nsame < 10, "same plaintext, changing ciphertext");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
