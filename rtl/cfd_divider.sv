// cfd_divider: carry-free radix-2 subtractive divider, N-bit / N-bit.
//
// Divides two normalized significands x and d (format 1.(N-1), MSB set,
// values in [1, 2)) and returns the truncated quotient x/d in format
// 1.(N-1), plus the quotient sign x_sign ^ d_sign. The partial remainder
// never passes through a carry-propagate adder: it is kept in signed-bit form
// and every iteration is
//   W      = 2R (first iteration: W = X, digit 1)
//   S      = W - q*D, digit by digit, digits 0..2 in each part   (cfd_addsub)
//   P, N   = digit adjustment of each part, segment tables       (cfd_digit_adjust)
//   R      = refresh: cancel +1/-1 at equal positions            (cfd_refresh)
//   R      = rewrite of the leading digit pairs                  (cfd_rewrite)
//   q      = leading digit of R: next quotient digit / operation (cfd_qsel)
// while the digits are converted on the fly into binary (cfd_otf). The
// divisor is prescaled by 0.75 when above 1.1b (cfd_prescaler), which keeps
// |R| < 1 so that the quotient digit can be read from the remainder alone.
//
// Remainder digit i has weight 2^(i-(N+1)); the word has RW digits (36 for
// N = 32), reaching up to weight 4. After the last iteration the sign of the
// remainder picks Q or Q-1ulp, so q is the exact truncation, and exact flags
// a zero remainder.
//
// Interface and timing: start is accepted when busy is low. The result is
// valid while done is high, one clock, N clocks after the edge that accepts
// start (the prescaled operands are captured at that edge, then N iterations
// of one clock each);
// q, q_sign and exact hold their value until the next start. Asynchronous
// active-low reset.
//
// Follows the described algorithm step by step (prescaling, signed-bit
// conversion, carry-free subtraction, four-digit table-based digit
// adjustment, refresh, rewrite, MSB quotient selection, on-the-fly
// conversion). This design's own choices: the handshake, one iteration per
// clock, the rewrite repeated over the top pairs, and the final correction
// by remainder sign.
module cfd_divider
  import cfd_pkg::*;
#(
  parameter int unsigned N   = 32,
  parameter int unsigned SEG = SEG_DIGITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         x_sign,
  input  logic [N-1:0] x,
  input  logic         d_sign,
  input  logic [N-1:0] d,
  output logic         busy,
  output logic         done,
  output logic         q_sign,
  output logic [N-1:0] q,
  output logic         exact,
  output logic         prescaled
);

  localparam int unsigned RW   = ((N + 4 + SEG - 1) / SEG) * SEG;
  localparam int unsigned ONE  = N + 1;        // digit index of weight 1

  // ---------------------------------------------------------------- control
  logic load, iter, first;

  cfd_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start,
    .load, .iter, .first, .busy, .done
  );

  // --------------------------------------------------------- prescaling
  logic [N+1:0] xs, ds;
  logic         scaled;

  cfd_prescaler #(.N(N)) u_pre (.x, .d, .xs, .ds, .scaled);

  // ---------------------------------------------------------- registers
  logic [N+1:0]  xs_r, ds_r;
  logic [RW-1:0] rp_r, rn_r;     // remainder, signed bits
  qdigit_e       qn_r;           // digit selected for the next iteration

  // --------------------------------------------------------- iteration
  logic [RW-1:0]        wp, wn;
  qdigit_e              op;
  dig2_t [RW-1:0]       sp, sn;
  logic [RW-1:0]        ap, an;
  logic                 ovf_p, ovf_n;
  logic [RW-1:0]        fp, fn;
  logic [RW-1:0]        rwp, rwn;
  qdigit_e              qsel;

  always_comb begin
    if (first) begin
      wp = '0;
      wp[N+1:0] = xs_r;          // dividend as a positive part
      wn = '0;
      op = Q_POS;                // R(1) = X - D, leading digit 1
    end else begin
      wp = {rp_r[RW-2:0], 1'b0}; // 2R
      wn = {rn_r[RW-2:0], 1'b0};
      op = qn_r;
    end
  end

  cfd_addsub #(.N(N), .RW(RW)) u_addsub (
    .wp, .wn, .dv(ds_r), .op, .sp, .sn
  );

  cfd_digit_adjust #(.RW(RW), .SEG(SEG)) u_adj_p (.dig(sp), .bin(ap), .ovf(ovf_p));
  cfd_digit_adjust #(.RW(RW), .SEG(SEG)) u_adj_n (.dig(sn), .bin(an), .ovf(ovf_n));

  cfd_refresh #(.RW(RW)) u_refresh (.p(ap), .n(an), .rp(fp), .rn(fn));

  cfd_rewrite #(.RW(RW), .LO(ONE - 2)) u_rewrite (
    .ip(fp), .in_(fn), .op(rwp), .on(rwn)
  );

  cfd_qsel #(.RW(RW), .ONE(ONE)) u_qsel (.rp(rwp), .rn(rwn), .q(qsel));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xs_r      <= '0;
      ds_r      <= '0;
      rp_r      <= '0;
      rn_r      <= '0;
      qn_r      <= Q_ZERO;
      q_sign    <= 1'b0;
      prescaled <= 1'b0;
    end else if (load) begin
      xs_r      <= xs;
      ds_r      <= ds;
      q_sign    <= x_sign ^ d_sign;
      prescaled <= scaled;
    end else if (iter) begin
      rp_r <= rwp;
      rn_r <= rwn;
      qn_r <= qsel;
    end
  end

  // ------------------------------------------- on-the-fly conversion
  logic [N-1:0] q_r, qm_r;

  cfd_otf #(.W(N)) u_otf (
    .clk, .rst_n,
    .init  (first),
    .shift (iter && !first),
    .qd    (qn_r),
    .q     (q_r),
    .qm    (qm_r)
  );

  // ----------------------------------------------- final correction
  logic rem_neg, rem_zero;

  cfd_sd_sign #(.RW(RW)) u_sign (.p(rp_r), .n(rn_r), .neg(rem_neg), .zero(rem_zero));

  assign q     = rem_neg ? qm_r : q_r;
  assign exact = rem_zero;

  // ------------------------------------------------------- assertions
  a_norm: assert property (@(posedge clk) disable iff (!rst_n)
    load |-> (x[N-1] && d[N-1]))
    else $error("operands must be normalized (MSB set)");
  a_no_ovf: assert property (@(posedge clk) disable iff (!rst_n)
    iter |-> !(ovf_p || ovf_n))
    else $error("digit adjustment overflowed the remainder word");
  a_sd: assert property (@(posedge clk) disable iff (!rst_n)
    (rp_r & rn_r) == '0)
    else $error("remainder digit both +1 and -1");
  a_bound: assert property (@(posedge clk) disable iff (!rst_n)
    iter |-> (rwp[RW-1:ONE+1] == '0 && rwn[RW-1:ONE+1] == '0))
    else $error("remainder left the range |R| < 1");

endmodule
