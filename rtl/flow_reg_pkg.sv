// Shared widths and types of the (sigma, rho) flow regulator.
//
// A flow is regulated with three integers: n (cycles per period), m (tokens
// per period), so that the rate is rho = m/n transfers/cycle, and sigma (the
// burstiness, i.e. the size of the token bank). n, m and sigma are 10 bits
// wide and the period counter 8 bits, as in the synthesised reference
// configuration. The flow ID width (5 bits, enough for 24 flows) is this
// design's own choice.
package flow_reg_pkg;

  localparam int unsigned N_W     = 10;  // width of n
  localparam int unsigned M_W     = 10;  // width of m
  localparam int unsigned SIGMA_W = 10;  // width of sigma and of the token count x
  localparam int unsigned CNT_W   = 8;   // width of the period count-down counter
  localparam int unsigned FID_W   = 5;   // width of a flow ID

  typedef logic [FID_W-1:0] flow_id_t;

  // Regulation parameters of one flow.
  typedef struct packed {
    logic [N_W-1:0]     n;
    logic [M_W-1:0]     m;
    logic [SIGMA_W-1:0] sigma;
  } reg_params_t;

  // One entry of the parameter table: (f_i, (n_i, m_i, sigma_i)).
  typedef struct packed {
    logic        valid;
    flow_id_t    fid;
    reg_params_t p;
  } table_entry_t;

endpackage
