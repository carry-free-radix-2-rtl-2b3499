// tb_cfd_refresh: checks the refresh step.
//
// For random binary parts p and n the refreshed signed-bit number must keep
// the value p - n, have no position set in both parts, and only clear bits
// (never set new ones).
module tb_cfd_refresh;
  localparam int unsigned RW = 36;

  logic [RW-1:0] p, n, rp, rn;
  int unsigned   checks = 0, failures = 0;

  cfd_refresh #(.RW(RW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // the worked example: 1010 - 0001 and 1101 - 1100
    p = 36'b1010; n = 36'b0001; #1;
    checks++; if (rp != 36'b1010 || rn != 36'b0001) failures++;
    p = 36'b1101; n = 36'b1100; #1;
    checks++; if (rp != 36'b0001 || rn != 36'b0000) failures++;
    for (int i = 0; i < 20000; i++) begin
      p = {$urandom(), $urandom()};
      n = {$urandom(), $urandom()};
      #1;
      checks++;
      if ((longint'(rp) - longint'(rn)) != (longint'(p) - longint'(n)) ||
          (rp & rn) != '0 || (rp & ~p) != '0 || (rn & ~n) != '0) begin
        failures++;
        if (failures < 10) $display("FAIL p=%h n=%h rp=%h rn=%h", p, n, rp, rn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
