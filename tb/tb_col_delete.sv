// tb_col_delete: for random coded blocks and delete selections, the kept
// block must hold, column by column, the first-chip column (select 1) or the
// second-chip column (select 0) of the coded block; also the 3 x 3 illustration:
// with select 011 the third data column is replaced by its partner column.
module tb_col_delete;
  import ber_pkg::*;
  cblk_t u;
  dsel_t dsel;
  blk_t  v;
  int checks = 0, failures = 0;

  col_delete dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3000) begin
      u    = cblk_t'({$urandom, $urandom});
      dsel = dsel_t'($urandom);
      #1;
      for (int c = 0; c < COLS; c++)
        for (int r = 0; r < ROWS; r++) begin
          int src;
          src = dsel[c] ? c * ROWS + r : (COLS + c) * ROWS + r;
          check(v[c*ROWS + r] == u[src], $sformatf("cell r%0d c%0d", r, c));
        end
    end
    u = {{NB{1'b0}}, {NB{1'b1}}};   // first chips 1, second chips 0
    dsel = 3'b011;
    #1;
    check(v == 9'b000_111_111, "columns 0, 1 kept from first chips, column 2 from second chips");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
