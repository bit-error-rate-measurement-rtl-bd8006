// tb_col_restore: delete-then-restore round trip.  For random coded blocks and
// selections the restored block must equal the original on every chip not
// flagged as erased, exactly one chip of every first/second pair must be
// flagged, and erased chips must read 0.
module tb_col_restore;
  import ber_pkg::*;
  cblk_t u, ur, er, model_er;
  dsel_t dsel;
  blk_t  v;
  int checks = 0, failures = 0;

  col_restore dut (.v(v), .dsel(dsel), .u(ur), .erased(er));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) begin
      u    = cblk_t'({$urandom, $urandom});
      dsel = dsel_t'($urandom);
      // model of the delete step
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          v[c*ROWS + r] = dsel[c] ? u[c*ROWS + r] : u[(COLS + c)*ROWS + r];
          model_er[c*ROWS + r]          = !dsel[c];
          model_er[(COLS + c)*ROWS + r] =  dsel[c];
        end
      #1;
      check(er == model_er, "erasure mask");
      check((ur & ~er) == (u & ~er), "kept chips in place");
      check((ur & er) == '0, "erased chips read 0");
      check((er[NB-1:0] ^ er[NC-1:NB]) == '1, "one chip of every pair erased");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
