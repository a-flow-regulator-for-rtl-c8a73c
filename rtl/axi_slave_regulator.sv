// Slave-side multiflow regulator for the AXI read-data (R) channel.
//
// Placed between a slave and the interconnect, it regulates the read data the
// slave returns, per flow. The request channel (AR) passes by unchanged; the
// regulator only watches its handshakes and records each request's flow ID
// under its AXI ID in the flow ID table. Each R transfer from the slave is
// then tagged with the flow ID found under its RID and passed through a
// multiflow regulator (parameter table, three regulators, FSM controller),
// exactly as on the master side.
//
// Interface: AR snoop inputs (valid, ready, id, flow ID); R channel from the
// slave (s_r*) and towards the interconnect (m_r*), AXI valid/ready
// handshakes. Regulated R transfers leave one cycle after acceptance at the
// earliest. A response whose ID was never recorded carries flow ID 0.
//
// From the reference architecture: slave regulators differ from the master regulator
// only in flow ID management, via the AXI transaction ID. Choices of this implementation: the
// choice of the R channel, the snooping of AR, and the default flow ID.
module axi_slave_regulator
  import flow_reg_pkg::*;
#(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned ID_W        = 4,
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
  // AR channel, observed only
  input  logic               ar_valid,
  input  logic               ar_ready,
  input  logic [ID_W-1:0]    ar_id,
  input  flow_id_t           ar_fid,
  // R channel from the slave
  input  logic               s_rvalid,
  output logic               s_rready,
  input  logic [ID_W-1:0]    s_rid,
  input  logic [DATA_W-1:0]  s_rdata,
  input  logic [1:0]         s_rresp,
  input  logic               s_rlast,
  // R channel to the interconnect
  output logic               m_rvalid,
  input  logic               m_rready,
  output logic [ID_W-1:0]    m_rid,
  output logic [DATA_W-1:0]  m_rdata,
  output logic [1:0]         m_rresp,
  output logic               m_rlast,
  // status
  output logic               reconfig,
  output logic               unknown_flow,
  output logic [NUM_REG-1:0] active
);

  localparam int unsigned PAY_W = ID_W + DATA_W + 3;

  logic     id_valid;
  flow_id_t id_fid, r_fid;

  flow_id_table #(.ID_W(ID_W)) u_ids (
    .clk, .rst_n,
    .wr_en    (ar_valid && ar_ready),
    .wr_id    (ar_id),
    .wr_fid   (ar_fid),
    .rd_id    (s_rid),
    .rd_valid (id_valid),
    .rd_fid   (id_fid)
  );

  assign r_fid = id_valid ? id_fid : '0;

  multiflow_regulator #(
    .DATA_W(PAY_W), .NUM_REG(NUM_REG), .NUM_ENTRIES(NUM_ENTRIES)
  ) u_mfr (
    .clk, .rst_n,
    .tbl_we, .tbl_idx, .tbl_entry,
    .in_valid  (s_rvalid),
    .in_ready  (s_rready),
    .in_fid    (r_fid),
    .in_data   ({s_rid, s_rdata, s_rresp, s_rlast}),
    .out_valid (m_rvalid),
    .out_ready (m_rready),
    .out_data  ({m_rid, m_rdata, m_rresp, m_rlast}),
    .reconfig, .unknown_flow, .active
  );

endmodule
