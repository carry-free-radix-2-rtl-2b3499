// tb_cfd_divider: end-to-end test of the divider at its default size (N = 32).
//
// Divides directed and random normalized significands and compares the
// quotient with floor(x * 2^(N-1) / d) computed with 64-bit integers, the
// exact flag with a zero integer remainder, the sign with x_sign ^ d_sign and
// the prescale flag with d > 1.1b. Each division must take N clocks (one per
// iteration) from the clock edge that accepts start to done. It also counts how often each mechanism of the
// design happened (prescaling, subtract/add/shift steps, rewrites, segment
// carries in the digit adjustment, final correction, exact results) and
// counts a failure for any that never did.
module tb_cfd_divider;
  import cfd_pkg::*;

  localparam int unsigned N = 32;
  localparam int unsigned NRAND = 20000;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         x_sign = 1'b0, d_sign = 1'b0;
  logic [N-1:0] x = '0, d = '0;
  logic         busy, done, q_sign, exact, prescaled;
  logic [N-1:0] q;

  int unsigned checks = 0, failures = 0;
  int unsigned n_scaled = 0, n_unscaled = 0, n_sub = 0, n_add = 0, n_shift = 0;
  int unsigned n_rewrite = 0, n_seg_carry = 0, n_pass2_carry = 0, n_corr = 0, n_exact = 0;

  cfd_divider dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters, sampled every iteration clock.
  always @(posedge clk) begin
    if (dut.iter) begin
      case (dut.op)
        Q_POS:   n_sub++;
        Q_NEG:   n_add++;
        default: n_shift++;
      endcase
      if (dut.rwp != dut.fp || dut.rwn != dut.fn) n_rewrite++;
    end
  end

  // Pass-2 carries (a 1111 segment passing a carry on), checked on each part.
  for (genvar s = 0; s < 9; s++) begin : g_mon
    always @(posedge clk) begin
      if (dut.iter) begin
        if (dut.u_adj_p.g_seg[s].u_seg.second[4] || dut.u_adj_n.g_seg[s].u_seg.second[4])
          n_pass2_carry++;
        if (dut.u_adj_p.g_seg[s].u_seg.first[4] || dut.u_adj_n.g_seg[s].u_seg.first[4])
          n_seg_carry++;
      end
    end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic divide(input logic [N-1:0] xv, input logic [N-1:0] dv,
                        input logic xs, input logic ds);
    longint unsigned num, eq, er;
    int unsigned cyc;
    num = longint'(xv) << (N - 1);
    eq  = num / longint'(dv);
    er  = num % longint'(dv);
    @(negedge clk);
    x = xv; d = dv; x_sign = xs; d_sign = ds; start = 1'b1;
    @(posedge clk);
    cyc = 0;
    @(negedge clk);
    start = 1'b0;
    x = $urandom(); d = $urandom();   // operands need only be held at the start edge
    while (!done) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    check(q == eq[N-1:0], $sformatf("q x=%h d=%h got %h exp %h", xv, dv, q, eq[N-1:0]));
    check(exact == (er == 0), $sformatf("exact x=%h d=%h got %0d", xv, dv, exact));
    check(q_sign == (xs ^ ds), "sign");
    check(prescaled == (dv[N-1:N-2] == 2'b11 && dv[N-3:0] != 0), "prescale flag");
    check(cyc == N, $sformatf("latency %0d, expected %0d", cyc, N));
    if (prescaled) n_scaled++; else n_unscaled++;
    if (exact) n_exact++;
    if (dut.rem_neg) n_corr++;
    // result must hold after done
    @(negedge clk);
    check(!done && !busy && q == eq[N-1:0], "result held after done");
  endtask

  initial begin
    logic [N-1:0] xv, dv;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed corners
    divide(32'h8000_0000, 32'h8000_0000, 1'b0, 1'b0);   // 1/1
    divide(32'hFFFF_FFFF, 32'h8000_0000, 1'b1, 1'b0);   // max/1
    divide(32'h8000_0000, 32'hFFFF_FFFF, 1'b0, 1'b1);   // 1/max
    divide(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1, 1'b1);
    divide(32'hC000_0000, 32'hC000_0000, 1'b0, 1'b0);   // d = 1.1b, not scaled
    divide(32'hC000_0001, 32'hC000_0001, 1'b0, 1'b0);   // just above, scaled
    divide(32'hFFFF_FFFF, 32'hC000_0000, 1'b0, 1'b0);
    divide(32'h8000_0000, 32'hC000_0001, 1'b0, 1'b0);
    divide(32'hC000_0000, 32'h8000_0000, 1'b0, 1'b0);   // 1.5 / 1 exact
    divide(32'hA000_0000, 32'hC000_0000, 1'b0, 1'b0);   // 1.25 / 1.5
    divide(32'hAAAA_AAAA, 32'hAAAA_AAAA, 1'b0, 1'b0);
    divide(32'h8000_0001, 32'hFFFF_FFFE, 1'b0, 1'b0);
    for (int i = 0; i < int'(NRAND); i++) begin
      xv = {1'b1, 31'($urandom())};
      dv = {1'b1, 31'($urandom())};
      if (i % 7 == 0) dv[30:20] = '0;          // divisors near 1
      if (i % 11 == 0) dv[30:20] = '1;         // divisors near 2
      if (i % 13 == 0) xv = dv;                // exact quotient 1
      if (i % 17 == 0) dv[15:0] = '0;          // short divisors
      divide(xv, dv, 1'($urandom()), 1'($urandom()));
    end
    $display("mechanisms: prescaled=%0d unscaled=%0d subtract=%0d add=%0d shift=%0d rewrite=%0d",
             n_scaled, n_unscaled, n_sub, n_add, n_shift, n_rewrite);
    $display("            table_carry=%0d pass2_carry=%0d correction=%0d exact=%0d",
             n_seg_carry, n_pass2_carry, n_corr, n_exact);
    check(n_scaled > 0, "prescaling never happened");
    check(n_unscaled > 0, "unscaled division never happened");
    check(n_sub > 0, "subtract step never happened");
    check(n_add > 0, "add step never happened");
    check(n_shift > 0, "shift-only step never happened");
    check(n_rewrite > 0, "rewrite never happened");
    check(n_seg_carry > 0, "segment table carry never happened");
    check(n_pass2_carry > 0, "pass-2 carry never happened");
    check(n_corr > 0, "final correction never happened");
    check(n_exact > 0, "exact result never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
