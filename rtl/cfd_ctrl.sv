// cfd_ctrl: iteration controller of the divider (the flow chart's loop).
//
// States: IDLE waits for start; ITER runs N iterations, one per clock; DONE
// lasts one clock, flags the result and may itself accept the next start.
// In the clock where start is seen in IDLE or DONE, load tells the datapath
// to prescale and capture the operands. In the first ITER clock, first is
// high: the datapath subtracts the divisor from the dividend and the leading
// quotient digit is fixed at 1. In each following ITER clock, the datapath
// shifts the remainder, applies the digit selected in the previous clock and
// appends that digit to the quotient.
//
// Timing: start seen in IDLE or DONE at clock edge 0 (operands captured at
// that edge) gives done high after edge N: N iteration clocks. busy is high
// from the load clock until done, so start is accepted whenever busy is low.
// The step order follows the described algorithm; state encoding, counter and
// handshake are this design's choice.
module cfd_ctrl #(
  parameter int unsigned N = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,    // capture prescaled operands (not busy and start)
  output logic iter,    // an iteration runs this clock
  output logic first,   // first iteration: R = X - D, digit 1
  output logic busy,
  output logic done
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_DONE} state_e;

  localparam int unsigned CW = $clog2(N + 1);

  state_e        state;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_ITER;
          cnt   <= '0;
        end
        S_ITER: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(N - 1)) state <= S_DONE;
        end
        default: begin                 // S_DONE
          state <= start ? S_ITER : S_IDLE;
          cnt   <= '0;
        end
      endcase
    end
  end

  assign load  = (state != S_ITER) && start;
  assign iter  = (state == S_ITER);
  assign first = (state == S_ITER) && (cnt == '0);
  assign busy  = (state == S_ITER) || load;
  assign done  = (state == S_DONE);

endmodule
