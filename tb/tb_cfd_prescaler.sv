// tb_cfd_prescaler: checks the 0.75 prescaling of dividend and divisor.
//
// In the 1.(N+1) output format an unscaled operand v reads as 4*v and a
// scaled one as 3*v (0.75 * 4), so the expected outputs are plain integer
// products. Prescaling must happen exactly when d > 1.1b. Directed values
// cover the boundary d = 1.1b and the extremes; the rest is random.
module tb_cfd_prescaler;
  localparam int unsigned N = 32;

  logic [N-1:0] x, d;
  logic [N+1:0] xs, ds;
  logic         scaled;
  int unsigned  checks = 0, failures = 0;

  cfd_prescaler #(.N(N)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [N-1:0] xv, input logic [N-1:0] dv);
    bit              exp_s;
    longint unsigned ex, ed;
    x = xv; d = dv;
    #1;
    exp_s = longint'(dv) > 64'hC000_0000;
    ex = exp_s ? 3 * longint'(xv) : 4 * longint'(xv);
    ed = exp_s ? 3 * longint'(dv) : 4 * longint'(dv);
    checks++;
    if (scaled !== exp_s || xs !== ex[N+1:0] || ds !== ed[N+1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h d=%h scaled=%0d xs=%h ds=%h", xv, dv, scaled, xs, ds);
    end
  endtask

  initial begin
    try(32'h8000_0000, 32'h8000_0000);
    try(32'hFFFF_FFFF, 32'hC000_0000);
    try(32'hFFFF_FFFF, 32'hC000_0001);
    try(32'h8000_0001, 32'hFFFF_FFFF);
    try(32'hBFFF_FFFF, 32'hBFFF_FFFF);
    for (int i = 0; i < 20000; i++)
      try({1'b1, 31'($urandom())}, {1'b1, 31'($urandom())});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
