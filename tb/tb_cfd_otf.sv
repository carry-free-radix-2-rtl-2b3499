// tb_cfd_otf: checks on-the-fly conversion.
//
// Random sequences of W-1 signed quotient digits follow the leading 1. The
// expected quotient is the integer 2^(W-1) + sum(q_j * 2^(W-1-j)); after the
// last digit Q must equal it and QM must equal it minus one. Sequences whose
// value leaves [1, 2^W) are skipped. One digit is taken per clock.
module tb_cfd_otf;
  import cfd_pkg::*;
  localparam int unsigned W = 32;

  logic         clk = 1'b0, rst_n = 1'b0, init = 1'b0, shift = 1'b0;
  qdigit_e      qd = Q_ZERO;
  logic [W-1:0] q, qm;
  int unsigned  checks = 0, failures = 0;

  cfd_otf #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint  v;
    qdigit_e digs[W];
    int      qv;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    while (checks < 2000) begin
      v = longint'(1) <<< (W - 1);
      for (int j = 1; j < int'(W); j++) begin
        qv = $urandom_range(2) - 1;
        digs[j] = qv > 0 ? Q_POS : qv < 0 ? Q_NEG : Q_ZERO;
        v += longint'(qv) <<< (W - 1 - j);
      end
      if (v < 1 || v >= (longint'(1) <<< W)) continue;
      @(negedge clk); init = 1'b1;
      @(negedge clk); init = 1'b0; shift = 1'b1;
      for (int j = 1; j < int'(W); j++) begin
        qd = digs[j];
        @(negedge clk);
      end
      shift = 1'b0;
      @(negedge clk);   // holds while shift is low
      checks++;
      if (q != v[W-1:0] || qm != W'(v - 1)) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h qm=%h exp %h", q, qm, v[W-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
