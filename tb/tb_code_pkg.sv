// tb_code_pkg -- checks the code constants against each other.
//
//   - GEN_POLY, with its implied X^10 term, must reproduce every column of
//     the systematic parity check matrix: column c of H is X^c mod g(X).
//   - g(X) must have period 341 (X^341 = 1 mod g(X), no smaller power).
//   - CONN_POLY must equal X^(10 + 341 - 24) mod g(X), the input connection
//     for a code shortened from length 341 to 24.
module tb_code_pkg;
  import code_pkg::*;
  import code_ref_pkg::*;

  int checks = 0, failures = 0;

  function automatic logic [PARITY-1:0] xmod(input int e);
    logic [PARITY-1:0] r;
    r = PARITY'(1);
    for (int i = 0; i < e; i++)
      r = {r[PARITY-2:0], 1'b0} ^ (r[PARITY-1] ? GEN_POLY : '0);
    return r;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [PARITY-1:0] col;
    int period;
    for (int c = 0; c < int'(CODE_N); c++) begin
      for (int r = 0; r < int'(PARITY); r++) col[r] = H_ROWS[r][c];
      check(col == xmod(c), $sformatf("H column %0d", c));
    end
    period = 0;
    for (int e = 1; e <= 1023 && period == 0; e++) if (xmod(e) == PARITY'(1)) period = e;
    check(period == 341, $sformatf("period of g(X) is %0d", period));
    check(CONN_POLY == xmod(int'(PARITY) + period - int'(CODE_N)), "connection polynomial");
    check(CODE_N == REF_N && CODE_K == REF_K && BURST_L == 5, "code size");
    check(2 * BURST_L <= PARITY, "burst bound n-k >= 2l");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
