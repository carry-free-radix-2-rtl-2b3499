// tb_cfd_rewrite: checks the rewrite of the leading digit pairs.
//
// Random signed-bit words of 36 digits whose value lies below 1 in magnitude
// (digit 33 has weight 1) are rewritten. The value must not change, no
// position may be set in both parts, every digit above weight 1 must be 0,
// and the digit pairs at weights (1, 1/2) and (1/2, 1/4) must not be
// opposite (1,-1 or -1,1). A directed case starts with the pair
// 1,-1 -> 0,1.
module tb_cfd_rewrite;
  localparam int unsigned RW  = 36;
  localparam int unsigned ONE = 33;

  logic [RW-1:0] ip, in_, op, on;
  int unsigned   checks = 0, failures = 0;

  cfd_rewrite #(.RW(RW), .LO(ONE - 2)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit(logic [RW-1:0] p, logic [RW-1:0] n, int i);
    return int'(p[i]) - int'(n[i]);
  endfunction

  task automatic check_now();
    bit ok;
    #1;
    ok = (longint'(op) - longint'(on)) == (longint'(ip) - longint'(in_));
    ok &= (op & on) == '0;
    ok &= op[RW-1:ONE+1] == '0 && on[RW-1:ONE+1] == '0;
    ok &= digit(op, on, ONE) * digit(op, on, ONE - 1) >= 0;
    ok &= digit(op, on, ONE - 1) * digit(op, on, ONE - 2) >= 0;
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL ip=%h in=%h op=%h on=%h", ip, in_, op, on);
    end
  endtask

  initial begin
    longint v;
    int     tried;
    // 1,-1,-1,-1 at weights 4..1/2 plus 1/8: value 5/8, rewritten at every stage
    ip = '0; in_ = '0;
    ip[35] = 1'b1; in_[34] = 1'b1; in_[33] = 1'b1; in_[32] = 1'b1; ip[30] = 1'b1;
    check_now();
    tried = 0;
    while (checks < 20000) begin
      ip  = {$urandom(), $urandom()};
      in_ = {$urandom(), $urandom()} & ~ip;
      v = longint'(ip) - longint'(in_);
      if (v < (longint'(1) <<< ONE) && v > -(longint'(1) <<< ONE)) check_now();
      tried++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
