// FSM controller of the multiflow regulator.
//
// Each of NUM_REG regulators is either free or holds the parameters of one
// flow (the flow is then active). For a transfer presented with flow ID f:
//  - f active in regulator i: the transfer is steered to regulator i in the
//    same cycle and the master sees that regulator's Ready (RUN state);
//  - f inactive: in the same cycle its parameters are read from the table and
//    latched (first extra cycle), a free regulator or else the least recently
//    used one is chosen, and in the CONFIG state that regulator is loaded
//    (second extra cycle). The transfer is accepted from the cycle after.
//  - f not in the table: `unknown_flow` pulses and the transfer is held.
// To keep transfers in order on the shared output, a transfer is only steered
// to regulator i while no other regulator holds one in its data register; the
// CONFIG state likewise waits until the chosen regulator's register is empty.
// A regulator counts as used when it is loaded or accepts a transfer.
//
// Interface: the table search is combinational on `in_fid`; `reg_valid`,
// `in_ready` and `cfg_load` are combinational from the state and inputs;
// `reconfig` pulses with each load.
//
// From the reference architecture: identify the flow ID, regulate at once when active,
// otherwise two extra cycles (read, configure) into an available or
// recently-not-used regulator. Choices of this implementation: LRU order as the replacement rule,
// the ordering rule, and the handling of unknown flows.
module mf_controller
  import flow_reg_pkg::*;
#(
  parameter int unsigned NUM_REG = 3
) (
  input  logic               clk,
  input  logic               rst_n,
  // master side
  input  logic               in_valid,
  input  flow_id_t           in_fid,
  output logic               in_ready,
  // parameter table search
  input  logic               tbl_hit,
  input  reg_params_t        tbl_params,
  // regulators
  output logic [NUM_REG-1:0] reg_valid,
  input  logic [NUM_REG-1:0] reg_ready,
  input  logic [NUM_REG-1:0] reg_full,
  output logic [NUM_REG-1:0] cfg_load,
  output reg_params_t        cfg_params,
  // status
  output logic               reconfig,
  output logic               unknown_flow,
  output logic [NUM_REG-1:0] active
);

  localparam int unsigned SEL_W = (NUM_REG > 1) ? $clog2(NUM_REG) : 1;

  typedef enum logic [0:0] { S_RUN, S_CONFIG } state_t;

  state_t             state_q;
  logic [NUM_REG-1:0] active_q;
  flow_id_t           fid_q   [NUM_REG];
  logic [SEL_W-1:0]   rank_q  [NUM_REG];   // 0 = most recently used
  logic [SEL_W-1:0]   victim_q;
  reg_params_t        params_q;
  flow_id_t           new_fid_q;

  // Flow look-up among the regulators.
  logic             hit;
  logic [SEL_W-1:0] hit_idx;
  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = NUM_REG - 1; i >= 0; i--) begin
      if (active_q[i] && (fid_q[i] == in_fid)) begin
        hit     = 1'b1;
        hit_idx = SEL_W'(i);
      end
    end
  end

  // Replacement choice: lowest free regulator, else the least recently used.
  logic [SEL_W-1:0] victim;
  always_comb begin
    victim = '0;
    for (int i = NUM_REG - 1; i >= 0; i--)
      if (32'(rank_q[i]) == NUM_REG - 1) victim = SEL_W'(i);
    for (int i = NUM_REG - 1; i >= 0; i--)
      if (!active_q[i]) victim = SEL_W'(i);
  end

  // No other regulator holds a transfer.
  logic others_empty;
  always_comb begin
    others_empty = 1'b1;
    for (int i = 0; i < NUM_REG; i++)
      if (reg_full[i] && (SEL_W'(i) != hit_idx)) others_empty = 1'b0;
  end

  logic route;
  assign route = (state_q == S_RUN) && in_valid && hit && others_empty;

  always_comb begin
    reg_valid = '0;
    in_ready  = 1'b0;
    if (route) begin
      reg_valid[hit_idx] = 1'b1;
      in_ready           = reg_ready[hit_idx];
    end
  end

  logic do_cfg, do_fetch;
  assign do_cfg   = (state_q == S_CONFIG) && !reg_full[victim_q];
  assign do_fetch = (state_q == S_RUN) && in_valid && !hit && tbl_hit;

  always_comb begin
    cfg_load = '0;
    if (do_cfg) cfg_load[victim_q] = 1'b1;
  end
  assign cfg_params   = params_q;
  assign reconfig     = do_cfg;
  assign unknown_flow = (state_q == S_RUN) && in_valid && !hit && !tbl_hit;
  assign active       = active_q;

  // Index whose use updates the LRU order this cycle.
  logic             touch;
  logic [SEL_W-1:0] touch_idx;
  always_comb begin
    touch     = 1'b0;
    touch_idx = hit_idx;
    if (do_cfg) begin
      touch     = 1'b1;
      touch_idx = victim_q;
    end else if (route && reg_ready[hit_idx]) begin
      touch     = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_RUN;
      active_q  <= '0;
      victim_q  <= '0;
      params_q  <= '0;
      new_fid_q <= '0;
      for (int i = 0; i < NUM_REG; i++) begin
        fid_q[i]  <= '0;
        rank_q[i] <= SEL_W'(i);
      end
    end else begin
      case (state_q)
        S_RUN: if (do_fetch) begin
          params_q  <= tbl_params;       // parameter read cycle
          new_fid_q <= in_fid;
          victim_q  <= victim;
          state_q   <= S_CONFIG;
        end
        S_CONFIG: if (do_cfg) begin      // configuration cycle
          active_q[victim_q] <= 1'b1;
          fid_q[victim_q]    <= new_fid_q;
          state_q            <= S_RUN;
        end
        default: state_q <= S_RUN;
      endcase
      if (touch) begin
        for (int i = 0; i < NUM_REG; i++) begin
          if (rank_q[i] < rank_q[touch_idx]) rank_q[i] <= rank_q[i] + 1'b1;
        end
        rank_q[touch_idx] <= '0;
      end
    end
  end

  a_ready_needs_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                        in_ready |-> in_valid);

endmodule
