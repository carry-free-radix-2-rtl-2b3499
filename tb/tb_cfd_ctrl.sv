// tb_cfd_ctrl: checks the iteration controller's sequencing.
//
// After a start it must give exactly one first clock, then N iteration
// clocks in all, then done for one clock, N clocks after the start edge;
// busy must cover the whole division, and a start during a division must be
// ignored. A start in the done clock must begin the next division at once.
module tb_cfd_ctrl;
  localparam int unsigned N = 32;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic load, iter, first, busy, done;
  int unsigned checks = 0, failures = 0;

  cfd_ctrl #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int n_iter, n_first, cyc, gap;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 20; run++) begin
      gap = $urandom_range(3);
      repeat (gap) begin
        @(negedge clk);
        check(!busy && !iter && !done, "idle outputs");
      end
      @(negedge clk);
      start = 1'b1;
      #1 check(load && busy, "load on start in idle");
      @(posedge clk);
      @(negedge clk);
      start = (run % 2 == 1);   // start held high during the run must be ignored
      n_iter = 0; n_first = 0; cyc = 0;
      while (!done && cyc < 100) begin
        check(busy && !load, "busy, no load while running");
        if (iter) n_iter++;
        if (first) begin
          n_first++;
          check(n_iter == 1, "first is the first iteration");
        end
        @(posedge clk);
        cyc++;
        @(negedge clk);
      end
      start = 1'b0;
      check(n_iter == N, $sformatf("iterations %0d", n_iter));
      check(n_first == 1, "one first clock");
      check(cyc == N, $sformatf("done after %0d clocks", cyc));
      #1 check(!busy && !iter, "done clock is not busy");
      @(negedge clk);
      check(!done, "done lasts one clock");
    end
    // back-to-back: a start in the done clock begins the next division
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done && cyc < 100) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    start = 1'b1;
    #1 check(done && load && busy, "start accepted in the done clock");
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    check(first && iter, "next division starts right after done");
    cyc = 0;
    while (!done && cyc < 100) begin
      @(posedge clk);
      cyc++;
      @(negedge clk);
    end
    check(cyc == N, $sformatf("back-to-back division took %0d clocks", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
