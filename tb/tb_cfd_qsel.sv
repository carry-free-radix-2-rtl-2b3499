// tb_cfd_qsel: checks quotient-digit selection.
//
// Inputs are random rewritten remainders: |R| < 1, no digit above weight 1,
// no opposite pair at weights (1, 1/2) or (1/2, 1/4). For each, the selected
// digit q must keep the next remainder 2R - q*D strictly inside (-1, 1) for
// the two extreme divisors D = 1 and D = 1.5, and must equal the leading
// nonzero digit among weights 1 and 1/2.
module tb_cfd_qsel;
  import cfd_pkg::*;
  localparam int unsigned RW  = 36;
  localparam int unsigned ONE = 33;

  logic [RW-1:0] rp, rn;
  qdigit_e       q;
  int unsigned   checks = 0, failures = 0;
  int unsigned   seen_pos = 0, seen_neg = 0, seen_zero = 0;

  cfd_qsel #(.RW(RW), .ONE(ONE)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int dg(int i);
    return int'(rp[i]) - int'(rn[i]);
  endfunction

  initial begin
    longint r, one, rnext;
    int     qv, lead;
    bit     ok;
    one = longint'(1) <<< ONE;
    while (checks < 20000) begin
      rp = {$urandom(), $urandom()};
      rn = {$urandom(), $urandom()} & ~rp;
      rp[RW-1:ONE+1] = '0;
      rn[RW-1:ONE+1] = '0;
      r = longint'(rp) - longint'(rn);
      if (r >= one || r <= -one) continue;
      if (dg(ONE) * dg(ONE - 1) < 0 || dg(ONE - 1) * dg(ONE - 2) < 0) continue;
      #1;
      qv = (q == Q_POS) ? 1 : (q == Q_NEG) ? -1 : 0;
      lead = dg(ONE) != 0 ? dg(ONE) : dg(ONE - 1);
      ok = (qv == lead) && (q inside {Q_POS, Q_NEG, Q_ZERO});
      // D = 1 and D = 1.5 (in units of 2^-33)
      rnext = 2 * r - qv * one;
      ok &= rnext < one && rnext > -one;
      rnext = 2 * r - qv * (one + one / 2);
      ok &= rnext < one && rnext > -one;
      checks++;
      if (qv > 0) seen_pos++; else if (qv < 0) seen_neg++; else seen_zero++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL r=%0d q=%0d", r, qv);
      end
    end
    checks++;
    if (seen_pos == 0 || seen_neg == 0 || seen_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
