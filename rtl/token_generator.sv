// Token generator of the (sigma, rho) regulator.
//
// A re-settable count-down counter is loaded with n, counts down once per
// cycle and, after reaching 1, is reloaded with n from the R register. A
// comparator issues one token in each cycle where the count c satisfies
// c >= n - m + 1, i.e. in the first m cycles of every n-cycle period, which
// gives the rate rho = m/n. Tokens are only issued while the token bank
// enables the comparator (bank not full); tokens that would overflow the bank
// are dropped.
//
// Interface: `load` (one cycle) latches n and m and restarts the period; the
// first count, c = n, is seen in the cycle after `load`. `token` is
// combinational from the counter, the R register and `enable`.
//
// From the reference architecture: counter, reload register, reload at 1, comparison with
// n - m + 1, 8-bit counter. Choices of this implementation: the comparison direction (>=, so that
// exactly m tokens are made per period), m = 0 gives no tokens, m >= n gives a
// token every cycle, n = 0 behaves as n = 1. n must fit in the CNT_W-bit
// counter; larger values are truncated (an assertion reports a load of one).
module token_generator
  import flow_reg_pkg::*;
#(
  parameter int unsigned CNT_W_P = CNT_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic [N_W-1:0] n,
  input  logic [M_W-1:0] m,
  input  logic           enable,
  output logic           token
);

  logic [N_W-1:0]     n_q;     // R register
  logic [M_W-1:0]     m_q;
  logic [CNT_W_P-1:0] cnt_q;   // count-down counter c

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_q   <= '0;
      m_q   <= '0;
      cnt_q <= '0;
    end else if (load) begin
      n_q   <= n;
      m_q   <= m;
      cnt_q <= CNT_W_P'(n);
    end else if (cnt_q <= 1) begin
      cnt_q <= CNT_W_P'(n_q);   // reached 1: re-set to n
    end else begin
      cnt_q <= cnt_q - 1'b1;
    end
  end

  // c >= n - m + 1  <=>  c + m >= n + 1, evaluated without underflow.
  localparam int unsigned SUM_W = ((N_W > M_W) ? N_W : M_W) + 2;
  logic [SUM_W-1:0] lhs, rhs;
  always_comb begin
    lhs   = SUM_W'(cnt_q) + SUM_W'(m_q);
    rhs   = SUM_W'(n_q) + SUM_W'(1);
    token = enable && (m_q != '0) && (lhs >= rhs);
  end

  a_n_fits: assert property (@(posedge clk) disable iff (!rst_n)
                             load |-> (32'(n) < (32'd1 << CNT_W_P)))
    else $error("token_generator: n=%0d does not fit the %0d-bit counter", n, CNT_W_P);

endmodule
