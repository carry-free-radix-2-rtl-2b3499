// tb_cfd_divider_small: exhaustive test of an 8-bit divider.
//
// With N = 8 every pair of normalized significands (128 x 128 divisions) is
// divided, back to back, and each quotient, exact flag and latency is
// compared with integer arithmetic: q = floor(x * 2^7 / d). This covers every
// prescaling boundary and every remainder pattern the small word can reach.
module tb_cfd_divider_small;
  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         start = 1'b0;
  logic         x_sign = 1'b0, d_sign = 1'b0;
  logic [N-1:0] x = '0, d = '0;
  logic         busy, done, q_sign, exact, prescaled;
  logic [N-1:0] q;

  int unsigned checks = 0, failures = 0;

  cfd_divider #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned num, eq, er, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int xi = 128; xi < 256; xi++) begin
      for (int di = 128; di < 256; di++) begin
        num = xi << (N - 1);
        eq  = num / di;
        er  = num % di;
        @(negedge clk);
        x = N'(xi); d = N'(di); start = 1'b1;
        @(posedge clk);
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done) begin
          @(posedge clk);
          cyc++;
          @(negedge clk);
        end
        checks++;
        if (q != N'(eq) || exact != (er == 0) || cyc != N) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%h d=%h q=%h exp=%h exact=%0d cyc=%0d", xi, di, q, eq, exact, cyc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
