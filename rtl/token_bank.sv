// Token bank of the (sigma, rho) regulator: a saturating credit counter.
//
// The bank holds x tokens. Loading the regulation parameters sets x to its
// maximum, max(sigma, 1) (a bank of at least one token). Each token from the
// token generator adds one and each transfer reported by the flow monitor
// removes one. While x equals the maximum the bank disables the comparator of
// the token generator, so x never exceeds the maximum.
//
// Interface: `load` (one cycle) latches sigma and fills the bank; `token` and
// `sent` are single-cycle pulses and may coincide; `x` is the registered token
// count; `enable` is combinational from x. The regulator guarantees that `sent`
// only arrives when a token is held (checked by an assertion).
//
// From the reference architecture: initial and maximum value 1 or sigma, +1 per token,
// -1 per transfer, comparator disabled when x = sigma. Choice of this implementation: the reset
// value is an empty bank, so an unconfigured regulator admits nothing.
module token_bank
  import flow_reg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [SIGMA_W-1:0] sigma,
  input  logic               token,
  input  logic               sent,
  output logic [SIGMA_W-1:0] x,
  output logic               enable
);

  logic [SIGMA_W-1:0] max_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_q <= SIGMA_W'(1);
      x     <= '0;
    end else if (load) begin
      max_q <= (sigma > SIGMA_W'(1)) ? sigma : SIGMA_W'(1);
      x     <= (sigma > SIGMA_W'(1)) ? sigma : SIGMA_W'(1);
    end else begin
      case ({token && (x < max_q), sent})
        2'b10:   x <= x + 1'b1;
        2'b01:   x <= x - 1'b1;
        default: x <= x;
      endcase
    end
  end

  assign enable = (x < max_q);

  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   (sent && !load) |-> (x != '0))
    else $error("token_bank: transfer sent with an empty bank");

endmodule
