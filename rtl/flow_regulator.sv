// Single-flow (sigma, rho) regulator with rho = m/n.
//
// The control path consists of the token generator (period counter and
// comparator, m tokens every n cycles) and the token bank (saturating credit
// counter of size max(sigma, 1)); the data path is a one-transfer register
// with a flow monitor on its output. A transfer is admitted (Ready high) only
// while a token is free: the bank holds x tokens, and one of them is already
// owed by a transfer waiting in the register, so Ready requires x > full.
// Each transfer leaving the register takes one token from the bank. The
// output therefore never carries more than sigma + rho*t transfers in any
// window of t cycles.
//
// Interface: `cfg_load` (one cycle) loads `cfg` = (n, m, sigma), restarts the
// period and fills the bank; before the first load the regulator admits
// nothing. Input and output are valid/ready handshakes; accepted transfers
// leave one cycle later at the earliest. `tokens` is the bank content x.
//
// From the reference architecture: the structure and parameters of the token generator,
// token bank and monitor. Choices of this implementation: the valid/ready data register with
// back-pressure, and counting a waiting transfer against the bank.
module flow_regulator
  import flow_reg_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_load,
  input  reg_params_t        cfg,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [DATA_W-1:0]  in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [DATA_W-1:0]  out_data,
  output logic [SIGMA_W-1:0] tokens,
  output logic               full
);

  logic token, bank_enable, sent, grant;

  token_generator u_gen (
    .clk, .rst_n,
    .load   (cfg_load),
    .n      (cfg.n),
    .m      (cfg.m),
    .enable (bank_enable),
    .token  (token)
  );

  token_bank u_bank (
    .clk, .rst_n,
    .load   (cfg_load),
    .sigma  (cfg.sigma),
    .token  (token),
    .sent   (sent),
    .x      (tokens),
    .enable (bank_enable)
  );

  // A free token: one more than the one owed by a waiting transfer.
  assign grant = !cfg_load && (tokens > SIGMA_W'(full));

  reg_datapath #(.DATA_W(DATA_W)) u_dp (
    .clk, .rst_n,
    .grant,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .full,
    .sent
  );

endmodule
