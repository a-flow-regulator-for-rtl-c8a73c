// Multiflow (sigma, rho) regulator for one valid/ready channel.
//
// Regulates several flows that share one channel, each flow identified by a
// flow ID sent with every transfer. It holds a parameter table of
// (flow ID, n, m, sigma) entries and NUM_REG single-flow regulators that run
// in parallel, each loaded with the parameters of one active flow; the
// regulators of flows that are not sending keep collecting tokens. An input
// demultiplexer steers each transfer to the regulator of its flow, an output
// multiplexer merges the regulated transfers, and the FSM controller loads
// the regulator of a flow on its first transfer (two extra cycles), reusing
// the least recently used regulator when none is free.
//
// Interface: the master side is in_valid/in_ready/in_data plus in_fid (the
// flow ID, stable while in_valid is high); the interconnect side is
// out_valid/out_ready/out_data. A transfer of an active flow is accepted in
// the cycle it is offered, provided its regulator has a token, and appears at
// the output one cycle later. Table entries are written with tbl_we/tbl_idx/
// tbl_entry. `reconfig` and `unknown_flow` are single-cycle status pulses.
//
// From the reference architecture: three regulators, a three-entry table, FSM controller,
// flow ID sideband, the ready of the selected regulator driving the master's
// ready. Choices of this implementation: the generic payload, in-order output (one transfer in
// flight across the regulators), and holding transfers of unknown flows.
module multiflow_regulator
  import flow_reg_pkg::*;
#(
  parameter int unsigned DATA_W      = 37,
  parameter int unsigned NUM_REG     = 3,
  parameter int unsigned NUM_ENTRIES = 3,
  localparam int unsigned IDX_W = (NUM_ENTRIES > 1) ? $clog2(NUM_ENTRIES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // parameter table write port
  input  logic               tbl_we,
  input  logic [IDX_W-1:0]   tbl_idx,
  input  table_entry_t       tbl_entry,
  // master side
  input  logic               in_valid,
  output logic               in_ready,
  input  flow_id_t           in_fid,
  input  logic [DATA_W-1:0]  in_data,
  // interconnect side
  output logic               out_valid,
  input  logic               out_ready,
  output logic [DATA_W-1:0]  out_data,
  // status
  output logic               reconfig,
  output logic               unknown_flow,
  output logic [NUM_REG-1:0] active
);

  logic               tbl_hit;
  reg_params_t        tbl_params;
  logic [NUM_REG-1:0] r_valid, r_ready, r_full, r_load, r_out_valid;
  reg_params_t        cfg_params;
  logic [DATA_W-1:0]  r_out_data [NUM_REG];

  param_table #(.NUM_ENTRIES(NUM_ENTRIES)) u_table (
    .clk, .rst_n,
    .wr_en     (tbl_we),
    .wr_idx    (tbl_idx),
    .wr_entry  (tbl_entry),
    .rd_fid    (in_fid),
    .rd_hit    (tbl_hit),
    .rd_params (tbl_params)
  );

  mf_controller #(.NUM_REG(NUM_REG)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_fid, .in_ready,
    .tbl_hit, .tbl_params,
    .reg_valid  (r_valid),
    .reg_ready  (r_ready),
    .reg_full   (r_full),
    .cfg_load   (r_load),
    .cfg_params (cfg_params),
    .reconfig, .unknown_flow, .active
  );

  for (genvar i = 0; i < NUM_REG; i++) begin : g_reg
    flow_regulator #(.DATA_W(DATA_W)) u_reg (
      .clk, .rst_n,
      .cfg_load  (r_load[i]),
      .cfg       (cfg_params),
      .in_valid  (r_valid[i]),
      .in_ready  (r_ready[i]),
      .in_data   (in_data),
      .out_valid (r_out_valid[i]),
      .out_ready (out_ready),
      .out_data  (r_out_data[i]),
      .tokens    (),
      .full      (r_full[i])
    );
  end

  // Output multiplexer: at most one regulator holds a transfer.
  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    for (int i = 0; i < NUM_REG; i++) begin
      if (r_out_valid[i]) begin
        out_valid = 1'b1;
        out_data  = r_out_data[i];
      end
    end
  end

  a_one_in_flight: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(r_full));
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                 (out_valid && !out_ready) |=> (out_valid && $stable(out_data)));

endmodule
