// tb_cfd_sd_sign: checks the sign and zero test of a signed-bit number
// against the sign of its integer value, for random and zero inputs.
module tb_cfd_sd_sign;
  localparam int unsigned RW = 36;

  logic [RW-1:0] p, n;
  logic          neg, zero;
  int unsigned   checks = 0, failures = 0;

  cfd_sd_sign #(.RW(RW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    for (int i = 0; i < 20000; i++) begin
      p = {$urandom(), $urandom()};
      n = {$urandom(), $urandom()} & ~p;
      if (i % 50 == 0) begin p = '0; n = '0; end
      if (i % 7 == 0) begin p = p >> $urandom_range(35); n = n >> $urandom_range(35); n &= ~p; end
      #1;
      v = longint'(p) - longint'(n);
      checks++;
      if (neg != (v < 0) || zero != (v == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%h n=%h neg=%0d zero=%0d", p, n, neg, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
