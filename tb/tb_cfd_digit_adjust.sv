// tb_cfd_digit_adjust: checks the word-level digit adjustment.
//
// Random words of 36 digits 0..2, and directed words built so that a carry
// must run through several 1111 segments, must come out as the binary value
// sum(d_i * 2^i), with the carry out of the top segment as bit 36.
module tb_cfd_digit_adjust;
  import cfd_pkg::*;
  localparam int unsigned RW = 36;

  dig2_t [RW-1:0] dig;
  logic  [RW-1:0] bin;
  logic           ovf;
  int unsigned    checks = 0, failures = 0;

  cfd_digit_adjust #(.RW(RW)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    longint unsigned v;
    #1;
    v = 0;
    for (int i = 0; i < int'(RW); i++) v += longint'(dig[i]) << i;
    checks++;
    if ({ovf, bin} != v[RW:0]) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", {ovf, bin}, v[RW:0]);
    end
  endtask

  initial begin
    // carry from segment 0 rippling through 1111 segments
    for (int i = 0; i < int'(RW); i++) dig[i] = 2'd1;
    dig[0] = 2'd2; dig[1] = 2'd1; dig[2] = 2'd1; dig[3] = 2'd1;
    check_now();
    for (int i = 0; i < int'(RW); i++) dig[i] = 2'd2;
    check_now();
    for (int i = 0; i < int'(RW); i++) dig[i] = 2'd0;
    check_now();
    for (int n = 0; n < 20000; n++) begin
      for (int i = 0; i < int'(RW); i++) dig[i] = dig2_t'($urandom_range(2));
      if (n % 3 == 0)
        for (int i = 4; i < int'(RW); i++) if ($urandom_range(3) != 0) dig[i] = 2'd1;
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
