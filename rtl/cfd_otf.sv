// cfd_otf: on-the-fly conversion of the signed-bit quotient to binary.
//
// Two registers are kept while the quotient digits arrive, most significant
// first: Q, the quotient so far, and QM = Q - 2^-k, one unit of the last
// position less. Each new digit is appended by shifting, without any carry:
//   digit  1:  Q <- Q,1   QM <- Q,0
//   digit  0:  Q <- Q,0   QM <- QM,1
//   digit -1:  Q <- QM,1  QM <- QM,0
// init loads Q = 1 and QM = 0, which is the leading quotient digit 1 fixed
// by the first subtraction. After all digits, Q is the quotient and QM the
// quotient one unit lower, so a final correction is a choice, not an add.
//
// Timing: one digit per clock when shift is high; init has priority. Q and QM
// are W bits wide and hold their value otherwise. Follows the described
// on-the-fly conversion rules; the shift-register form is this design's.
module cfd_otf
  import cfd_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,    // load Q = 1, QM = 0
  input  logic         shift,   // append digit qd
  input  qdigit_e      qd,
  output logic [W-1:0] q,       // converted quotient
  output logic [W-1:0] qm       // converted quotient minus one unit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q  <= '0;
      qm <= '0;
    end else if (init) begin
      q  <= W'(1);
      qm <= '0;
    end else if (shift) begin
      unique case (qd)
        Q_POS: begin
          q  <= {q[W-2:0], 1'b1};
          qm <= {q[W-2:0], 1'b0};
        end
        Q_NEG: begin
          q  <= {qm[W-2:0], 1'b1};
          qm <= {qm[W-2:0], 1'b0};
        end
        default: begin
          q  <= {q[W-2:0], 1'b0};
          qm <= {qm[W-2:0], 1'b1};
        end
      endcase
    end
  end

endmodule
