// tb_cfd_addsub: checks the carry-free add/subtract stage.
//
// For random signed-bit remainders, divisors and operations it checks that
// the value of the two-part result, sum((sp_i - sn_i) * 2^i), equals
// (wp - wn) - op * dv computed with 64-bit integers, that no digit exceeds 2,
// and that each result digit depends only on its own position (digit i of sp
// is wp_i plus dv_i when adding, of sn is wn_i plus dv_i when subtracting).
module tb_cfd_addsub;
  import cfd_pkg::*;
  localparam int unsigned N  = 32;
  localparam int unsigned RW = rem_digits(N);

  logic [RW-1:0]  wp, wn;
  logic [N+1:0]   dv;
  qdigit_e        op;
  dig2_t [RW-1:0] sp, sn;
  int unsigned    checks = 0, failures = 0;

  cfd_addsub #(.N(N), .RW(RW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint val, exp_val;
    int     qv;
    bit     ok;
    for (int i = 0; i < 20000; i++) begin
      wp = {$urandom(), $urandom()};
      wn = {$urandom(), $urandom()} & ~wp;
      dv = {1'b1, N'($urandom()), 1'($urandom())};
      case ($urandom_range(2))
        0: begin op = Q_POS;  qv = 1;  end
        1: begin op = Q_NEG;  qv = -1; end
        default: begin op = Q_ZERO; qv = 0; end
      endcase
      #1;
      val = 0;
      ok  = 1;
      for (int k = 0; k < int'(RW); k++) begin
        val += (longint'(sp[k]) - longint'(sn[k])) <<< k;
        if (sp[k] > 2 || sn[k] > 2) ok = 0;
        if (sp[k] != wp[k] + ((qv < 0 && k <= int'(N) + 1) ? dv[k] : 0)) ok = 0;
        if (sn[k] != wn[k] + ((qv > 0 && k <= int'(N) + 1) ? dv[k] : 0)) ok = 0;
      end
      exp_val = longint'(wp) - longint'(wn) - qv * longint'(dv);
      checks++;
      if (!ok || val != exp_val) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d val=%0d exp=%0d", qv, val, exp_val);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
