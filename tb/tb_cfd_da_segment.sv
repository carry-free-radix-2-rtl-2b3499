// tb_cfd_da_segment: exhaustive check of one digit-adjustment segment.
//
// Every segment of four digits 0..2 (81 cases), with and without an
// incoming carry, must come out as the binary value sum(d_i * 2^i) + cin,
// split into four bits and a carry of weight 16. The worked examples of the algorithm
// (1002 -> 01010, 2010 -> 10010, 2222 -> 11110, 1111 plus a carry-in -> carry-out)
// are part of the sweep.
module tb_cfd_da_segment;
  import cfd_pkg::*;

  dig2_t [3:0] dig;
  logic        cin, cout;
  logic [3:0]  bits;
  int unsigned checks = 0, failures = 0;

  cfd_da_segment dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int a = 0; a < 81; a++) begin
      for (int c = 0; c < 2; c++) begin
        v = c;
        for (int i = 0; i < 4; i++) begin
          dig[i] = dig2_t'((a / (3 ** i)) % 3);
          v += int'(dig[i]) << i;
        end
        cin = 1'(c);
        #1;
        checks++;
        if ({cout, bits} != 5'(v)) begin
          failures++;
          $display("FAIL digits %0d%0d%0d%0d cin=%0d -> %b%b", dig[3], dig[2], dig[1], dig[0], c, cout, bits);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
